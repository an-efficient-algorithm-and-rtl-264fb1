// hbda_engine: one control unit's packet-processing engine.
//
// A control unit decides, for one packet at a time, whether it is accepted
// into the packet buffer. The engine takes a snapshot of the packet and of its
// own copy of the variables (queue length of the packet's application, total
// occupancy, reject history) when start is high, evaluates the HBDA rule in
// the next cycle and holds the outcome in an output register.
//
// Timing: start in cycle c, done and the decision visible in cycle c+2. A new
// start may be given in the cycle done is high, so one engine decides one
// packet every two cycles. The two-cycle processing latency is this design's
// choice; the source only says that deciding a packet is the slowest step.
module hbda_engine
  import nic_pkg::*;
#(
  parameter int unsigned N_APPS   = N_APPS_DEF,
  parameter int unsigned BUF_PKTS = BUF_PKTS_DEF,
  parameter int unsigned ALPHA    = ALPHA_DEF,
  parameter int unsigned HIST_A   = HIST_A_DEF,
  parameter int unsigned HIST_B   = HIST_B_DEF,
  parameter int unsigned PSIZE [N_APPS] = PSIZE_AVG,
  localparam int unsigned QW = $clog2(BUF_PKTS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [APP_W-1:0] app,
  input  logic [QW-1:0]    qlen,
  input  logic [QW-1:0]    total,
  input  logic [1:0]       hist,
  output logic             busy,       // a packet is being processed
  output logic             done,       // decision valid this cycle
  output logic             accept,
  output logic             by_history
);

  // stage A: snapshot
  logic             a_vld;
  logic [APP_W-1:0] a_app;
  logic [QW-1:0]    a_qlen, a_total;
  logic [1:0]       a_hist;
  // stage B: decision
  logic             b_vld, b_acc, b_hist;
  logic             d_acc, d_hist;

  hbda_decide #(
    .N_APPS(N_APPS), .BUF_PKTS(BUF_PKTS), .ALPHA(ALPHA),
    .HIST_A(HIST_A), .HIST_B(HIST_B), .PSIZE(PSIZE)
  ) u_decide (
    .app(a_app), .qlen(a_qlen), .total(a_total), .hist(a_hist),
    .thr(), .thr_h(), .accept(d_acc), .by_history(d_hist)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_vld <= 1'b0; a_app <= '0; a_qlen <= '0; a_total <= '0; a_hist <= '0;
      b_vld <= 1'b0; b_acc <= 1'b0; b_hist <= 1'b0;
    end else begin
      a_vld <= start;
      if (start) begin
        a_app <= app; a_qlen <= qlen; a_total <= total; a_hist <= hist;
      end
      b_vld <= a_vld;
      if (a_vld) begin
        b_acc  <= d_acc;
        b_hist <= d_hist;
      end
    end
  end

  assign busy       = a_vld;
  assign done       = b_vld;
  assign accept     = b_acc;
  assign by_history = b_hist;

  // The engine is not pipelined: a new packet may only start when the
  // previous one is in its decision cycle or the engine is idle.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 a_vld |-> !start);

endmodule
