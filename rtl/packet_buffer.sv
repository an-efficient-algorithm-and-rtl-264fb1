// packet_buffer: shared packet memory with one logical FIFO queue per
// application and several output ports.
//
// All applications share BUF_PKTS packet slots. Each queue is a linked list
// through the slots (head, tail, length per queue, a next-pointer per slot);
// unused slots are handed out first from a counter of never-used slots and
// then from a circular free list, which takes back up to N_PORTS slots per
// cycle. One packet is written per cycle on the write port. Each of the
// N_PORTS output ports (one per host processor) can remove the head packet of
// any queue in the same cycle; when several ports ask for the same queue
// they receive consecutive packets, lowest port first, as far as the queue
// holds packets. A port's request is answered in the same cycle: deq_ok and
// deq_pkt are combinational, and the packet is removed at the clock edge.
//
// The shared memory with per-application FIFO queues and multiple output
// ports follows the source; the linked-list organisation, free list and port
// ordering are this design's choices. The controller keeps the buffer from
// overflowing; writing into a full buffer is an assertion failure.
module packet_buffer
  import nic_pkg::*;
#(
  parameter int unsigned N_APPS   = N_APPS_DEF,
  parameter int unsigned BUF_PKTS = BUF_PKTS_DEF,
  parameter int unsigned N_PORTS  = N_PORTS_DEF,
  localparam int unsigned SW = $clog2(BUF_PKTS),
  localparam int unsigned QW = $clog2(BUF_PKTS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port
  input  logic             wr_valid,
  input  pkt_t             wr_pkt,
  // output ports
  input  logic             deq_req [N_PORTS],
  input  logic [APP_W-1:0] deq_app [N_PORTS],
  output logic             deq_ok  [N_PORTS],
  output pkt_t             deq_pkt [N_PORTS],
  // occupancy
  output logic [QW-1:0]    qlen    [N_APPS],
  output logic [QW-1:0]    total,
  output logic             full
);

  logic [DATA_W-1:0] data_mem [BUF_PKTS];
  logic [SW-1:0]     next_mem [BUF_PKTS];
  logic [SW-1:0]     free_mem [BUF_PKTS];

  logic [SW-1:0] head [N_APPS];
  logic [SW-1:0] tail [N_APPS];
  logic [QW-1:0] fresh;            // slots never used so far are fresh..M-1
  logic [SW-1:0] fl_rd, fl_wr;     // free list pointers
  logic [QW-1:0] fl_cnt;

  function automatic logic [SW-1:0] inc_wrap(logic [SW-1:0] p, int unsigned n);
    int unsigned s = int'(p) + n;
    return SW'((s >= BUF_PKTS) ? s - BUF_PKTS : s);
  endfunction

  // ---------------------------------------------------------------- reads
  localparam int RW = $clog2(N_PORTS + 1);
  logic [RW-1:0] rank     [N_PORTS];   // ports before p asking the same queue
  logic [SW-1:0] deq_slot [N_PORTS];
  logic [RW-1:0] pops     [N_APPS];
  logic [SW-1:0] new_head [N_APPS];    // head after this cycle's pops

  always_comb begin
    for (int unsigned q = 0; q < N_APPS; q++) pops[q] = '0;
    for (int unsigned p = 0; p < N_PORTS; p++) begin
      rank[p] = '0;
      for (int unsigned r = 0; r < p; r++)
        if (deq_req[r] && deq_app[r] == deq_app[p]) rank[p] = rank[p] + 1'b1;
      deq_ok[p]   = deq_req[p] && (int'(deq_app[p]) < N_APPS) &&
                    (QW'(rank[p]) < qlen[deq_app[p]]);
      deq_slot[p] = head[deq_app[p]];
      for (int unsigned r = 0; r < N_PORTS - 1; r++)
        if (RW'(r) < rank[p]) deq_slot[p] = next_mem[deq_slot[p]];
      deq_pkt[p].app  = deq_app[p];
      deq_pkt[p].data = data_mem[deq_slot[p]];
    end
    for (int unsigned q = 0; q < N_APPS; q++) begin
      for (int unsigned p = 0; p < N_PORTS; p++)
        if (deq_ok[p] && int'(deq_app[p]) == q) pops[q] = pops[q] + 1'b1;
      new_head[q] = head[q];
      for (int unsigned r = 0; r < N_PORTS; r++)
        if (RW'(r) < pops[q]) new_head[q] = next_mem[new_head[q]];
    end
  end

  // ---------------------------------------------------------------- write
  logic          wr_fire, from_fresh;
  logic [SW-1:0] alloc;
  int unsigned   n_freed;

  assign wr_fire    = wr_valid && !full && (int'(wr_pkt.app) < N_APPS);
  assign from_fresh = (fresh < QW'(BUF_PKTS));
  assign alloc      = from_fresh ? SW'(fresh) : free_mem[fl_rd];

  logic enq [N_APPS];
  always_comb
    for (int unsigned q = 0; q < N_APPS; q++) enq[q] = wr_fire && (int'(wr_pkt.app) == q);

  always_comb begin
    n_freed = 0;
    for (int unsigned p = 0; p < N_PORTS; p++) if (deq_ok[p]) n_freed++;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned q = 0; q < N_APPS; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        qlen[q] <= '0;
      end
      total  <= '0;
      fresh  <= '0;
      fl_rd  <= '0;
      fl_wr  <= '0;
      fl_cnt <= '0;
    end else begin
      for (int unsigned q = 0; q < N_APPS; q++) begin
        if (enq[q] && (qlen[q] == QW'(pops[q]))) head[q] <= alloc;
        else                                     head[q] <= new_head[q];
        if (enq[q]) tail[q] <= alloc;
        qlen[q] <= qlen[q] + QW'(enq[q]) - QW'(pops[q]);
      end
      total <= total + QW'(wr_fire) - QW'(n_freed);
      if (wr_fire) begin
        if (from_fresh) fresh <= fresh + 1'b1;
        else            fl_rd <= inc_wrap(fl_rd, 1);
      end
      fl_wr  <= inc_wrap(fl_wr, n_freed);
      fl_cnt <= fl_cnt + QW'(n_freed) - QW'(wr_fire && !from_fresh);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_fire) begin
      data_mem[alloc] <= wr_pkt.data;
      if (qlen[wr_pkt.app] != '0) next_mem[tail[wr_pkt.app]] <= alloc;
    end
    begin
      int unsigned k;
      k = 0;
      for (int unsigned p = 0; p < N_PORTS; p++)
        if (deq_ok[p]) begin
          free_mem[inc_wrap(fl_wr, k)] <= deq_slot[p];
          k++;
        end
    end
  end

  assign full = (total == QW'(BUF_PKTS));

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_valid |-> !full);

endmodule
