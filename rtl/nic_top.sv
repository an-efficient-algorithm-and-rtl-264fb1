// nic_top: receive path of the multiprocessor network interface card.
//
// Packets enter the input buffer. The control unit (two speculating control
// units) decides with the History Based Dynamic Algorithm whether each packet
// is accepted into the shared packet buffer, which keeps one FIFO queue per
// application. A rejected packet of the highest-priority application goes to
// the priority buffer instead of being lost; the priority controller moves it
// into the packet buffer (WritetoBuffer) when its queue has room, and the
// control unit counts the move and answers DONE. The packet buffer has one
// output port per host processor, so several packets leave in the same cycle,
// and one interrupt announces a group of stored packets.
//
// Interface: in_valid/in_ready/in_pkt is the packet input (one per cycle).
// Port p of deq_* serves host processor p: raise deq_req[p] with a queue
// number in deq_app[p]; deq_ok[p] and deq_pkt[p] answer in the same cycle and
// the packet is removed at the clock edge. qlen gives the packets stored per
// queue, buf_full a full packet buffer and prio_count the packets waiting
// in the priority buffer. irq/irq_ack is the host interrupt; drop_valid/drop_app reports each
// lost packet; stats holds event counters. One clock, active-low
// asynchronous reset.
//
// The arrangement of the blocks follows the proposed architecture; the
// packet input handshake, the port protocol and the counters are this
// design's choices.
module nic_top
  import nic_pkg::*;
#(
  parameter int unsigned N_APPS   = N_APPS_DEF,
  parameter int unsigned BUF_PKTS = BUF_PKTS_DEF,
  parameter int unsigned ALPHA    = ALPHA_DEF,
  parameter int unsigned HIST_A   = HIST_A_DEF,
  parameter int unsigned HIST_B   = HIST_B_DEF,
  parameter int unsigned PSIZE [N_APPS] = PSIZE_AVG,
  parameter int unsigned PRIO_APP = PRIO_APP_DEF,
  parameter int unsigned N_PORTS  = N_PORTS_DEF,
  parameter int unsigned IB_DEPTH = 16,
  parameter int unsigned PB_DEPTH = 8,
  localparam int unsigned QW = $clog2(BUF_PKTS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  pkt_t             in_pkt,
  output logic             in_ready,
  input  logic             deq_req [N_PORTS],
  input  logic [APP_W-1:0] deq_app [N_PORTS],
  output logic             deq_ok  [N_PORTS],
  output pkt_t             deq_pkt [N_PORTS],
  output logic [QW-1:0]    qlen    [N_APPS],
  output logic             buf_full,
  output logic [$clog2(PB_DEPTH+1)-1:0] prio_count,
  output logic             irq,
  input  logic             irq_ack,
  output logic             drop_valid,
  output logic [APP_W-1:0] drop_app,
  output nic_stats_t       stats
);

  localparam int unsigned IB_CW = $clog2(IB_DEPTH + 1);

  pkt_t             ib_peek [4];
  logic [IB_CW-1:0] ib_count;
  logic [1:0]       ib_pop_n;

  logic             cu_wr_valid, pc_wr, pb_wr_valid;
  pkt_t             cu_wr_pkt, pc_wr_pkt, pb_wr_pkt;
  logic [QW-1:0]    pb_total;
  logic             pr_valid, pr_taken, mv_req, mv_grant, mv_done;
  pkt_t             pr_pkt;
  logic [QW-1:0]    cu_qlen [N_APPS];
  logic [QW-1:0]    cu_total;
  logic [1:0]       cu_hist [N_APPS];

  input_buffer #(.DEPTH(IB_DEPTH), .PEEK(4)) u_ib (
    .clk, .rst_n, .in_valid, .in_pkt, .in_ready,
    .pop_n(ib_pop_n), .peek(ib_peek), .count(ib_count));

  control_unit #(
    .N_APPS(N_APPS), .BUF_PKTS(BUF_PKTS), .ALPHA(ALPHA), .HIST_A(HIST_A),
    .HIST_B(HIST_B), .PSIZE(PSIZE), .PRIO_APP(PRIO_APP), .N_PORTS(N_PORTS),
    .IB_CW(IB_CW)
  ) u_cu (
    .clk, .rst_n,
    .ib_peek, .ib_count, .ib_pop_n,
    .deq_ok, .deq_app,
    .wr_valid(cu_wr_valid), .wr_pkt(cu_wr_pkt),
    .pr_valid, .pr_pkt, .pr_taken,
    .mv_req, .mv_grant, .mv_done,
    .cu_qlen, .cu_total, .cu_hist,
    .drop_valid, .drop_app,
    .n_packets(stats.packets), .n_accepted(stats.accepted),
    .n_dropped(stats.dropped), .n_flushes(stats.flushes),
    .n_pairs(stats.pairs), .n_hist_acc(stats.hist_acc),
    .n_moves(stats.moves));

  priority_controller #(
    .N_APPS(N_APPS), .BUF_PKTS(BUF_PKTS), .ALPHA(ALPHA), .HIST_A(HIST_A),
    .HIST_B(HIST_B), .PSIZE(PSIZE), .PRIO_APP(PRIO_APP), .PB_DEPTH(PB_DEPTH)
  ) u_pc (
    .clk, .rst_n,
    .pr_valid, .pr_pkt, .pr_taken,
    .prio_qlen(cu_qlen[PRIO_APP]), .total(cu_total),
    .prio_hist(cu_hist[PRIO_APP]),
    .mv_req, .mv_grant, .mv_done,
    .write_to_buffer(pc_wr), .wb_pkt(pc_wr_pkt),
    .pb_count(prio_count), .n_saved(stats.prio_saved), .n_lost(stats.prio_lost));

  // the control unit and the priority controller never write in one cycle
  assign pb_wr_valid = cu_wr_valid || pc_wr;
  assign pb_wr_pkt   = pc_wr ? pc_wr_pkt : cu_wr_pkt;

  packet_buffer #(.N_APPS(N_APPS), .BUF_PKTS(BUF_PKTS), .N_PORTS(N_PORTS)) u_pb (
    .clk, .rst_n,
    .wr_valid(pb_wr_valid), .wr_pkt(pb_wr_pkt),
    .deq_req, .deq_app, .deq_ok, .deq_pkt,
    .qlen, .total(pb_total), .full(buf_full));

  irq_coalescer u_irq (
    .clk, .rst_n, .stored(pb_wr_valid), .irq_ack, .irq,
    .n_irqs(stats.irqs), .n_stored(stats.stored));

  // the controller's counters include at most one write still on its way
  a_counts_agree: assert property (@(posedge clk) disable iff (!rst_n)
                                   (pb_total <= cu_total) && (cu_total <= pb_total + 1'b1));

endmodule
