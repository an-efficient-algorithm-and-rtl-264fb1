// priority_controller: keeps rejected highest-priority packets in the
// priority buffer and moves them into the packet buffer when their queue has
// room again.
//
// Placing: when the control unit rejects a packet of the highest-priority
// application (pr_valid), the packet is taken into the priority buffer if the
// buffer has space (pr_taken, the reply to the control unit), otherwise it is
// rejected. Moving: the controller watches the control unit's committed
// counters and evaluates the HBDA rule for the priority application. When the
// priority buffer holds a packet and the rule would admit it, it raises
// mv_req. In the cycle the control unit grants the move, WritetoBuffer is high
// and the head packet is written into the packet buffer; that grant is the
// report of one moved packet. The controller then waits for the control
// unit's DONE before it may move the next packet.
//
// The place/reject/move behaviour, WritetoBuffer and the DONE wait follow the
// source. Moving one packet per handshake, using the HBDA rule as the test for
// "enough space", and the buffer depth are this design's choices.
module priority_controller
  import nic_pkg::*;
#(
  parameter int unsigned N_APPS   = N_APPS_DEF,
  parameter int unsigned BUF_PKTS = BUF_PKTS_DEF,
  parameter int unsigned ALPHA    = ALPHA_DEF,
  parameter int unsigned HIST_A   = HIST_A_DEF,
  parameter int unsigned HIST_B   = HIST_B_DEF,
  parameter int unsigned PSIZE [N_APPS] = PSIZE_AVG,
  parameter int unsigned PRIO_APP = PRIO_APP_DEF,
  parameter int unsigned PB_DEPTH = 8,
  localparam int unsigned QW  = $clog2(BUF_PKTS + 1),
  localparam int unsigned PCW = $clog2(PB_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // rejected priority packet from the control unit
  input  logic           pr_valid,
  input  pkt_t           pr_pkt,
  output logic           pr_taken,
  // control unit's committed counters for the priority application
  input  logic [QW-1:0]  prio_qlen,
  input  logic [QW-1:0]  total,
  input  logic [1:0]     prio_hist,
  // move handshake
  output logic           mv_req,
  input  logic           mv_grant,
  input  logic           mv_done,
  // write into the packet buffer
  output logic           write_to_buffer,
  output pkt_t           wb_pkt,
  // status
  output logic [PCW-1:0] pb_count,
  output logic [31:0]    n_saved,       // packets placed in the priority buffer
  output logic [31:0]    n_lost         // rejected: priority buffer full
);

  typedef enum logic [0:0] {PC_IDLE, PC_WAIT_DONE} pc_state_t;
  pc_state_t state;

  logic pb_empty, pb_full, room;
  pkt_t pb_head;

  priority_buffer #(.DEPTH(PB_DEPTH)) u_pbuf (
    .clk, .rst_n,
    .push(pr_taken), .push_pkt(pr_pkt),
    .pop(write_to_buffer), .head(pb_head),
    .empty(pb_empty), .full(pb_full), .count(pb_count));

  hbda_decide #(.N_APPS(N_APPS), .BUF_PKTS(BUF_PKTS), .ALPHA(ALPHA),
                .HIST_A(HIST_A), .HIST_B(HIST_B), .PSIZE(PSIZE)) u_room (
    .app(APP_W'(PRIO_APP)), .qlen(prio_qlen), .total(total), .hist(prio_hist),
    .thr(), .thr_h(), .accept(room), .by_history());

  assign pr_taken        = pr_valid && !pb_full;
  assign mv_req          = (state == PC_IDLE) && !pb_empty && room;
  assign write_to_buffer = mv_req && mv_grant;
  assign wb_pkt          = pb_head;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= PC_IDLE;
      n_saved <= '0;
      n_lost  <= '0;
    end else begin
      case (state)
        PC_IDLE:      if (write_to_buffer) state <= PC_WAIT_DONE;
        PC_WAIT_DONE: if (mv_done)         state <= PC_IDLE;
        default:                           state <= PC_IDLE;
      endcase
      n_saved <= n_saved + 32'(pr_taken);
      n_lost  <= n_lost  + 32'(pr_valid && !pr_taken);
    end
  end

  a_grant_only_on_req: assert property (@(posedge clk) disable iff (!rst_n)
                                        mv_grant |-> mv_req);

endmodule
