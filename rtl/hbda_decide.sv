// hbda_decide: History Based Dynamic Algorithm (HBDA) admission decision.
//
// For a packet of application i it computes
//   T  = (alpha / psize_i) * (M - Q)
//   T' = T + History_i(1) * M/a + History_i(2) * M/b
// where Q is the total buffer occupancy, M the buffer size in packets and
// History_i(1)/(2) say whether the last / second-last packet of application i
// was rejected. The packet is accepted when Q_i < T, or, when one of the last
// two packets of i was rejected, when Q_i < T'. This is the flow of the HBDA
// algorithm with a = 2 and b = 4 by default.
//
// alpha / psize_i is a per-application constant in fixed point with
// FRAC_BITS fraction bits, computed at elaboration, so the datapath is one
// constant-table lookup, one multiplier, two constant adds and two compares.
// Design choice beyond the algorithm: a packet is also refused when the
// buffer is physically full (Q >= M), because T' can exceed the free space.
//
// Purely combinational; hist[0] is History(1), hist[1] is History(2).
module hbda_decide
  import nic_pkg::*;
#(
  parameter int unsigned N_APPS   = N_APPS_DEF,
  parameter int unsigned BUF_PKTS = BUF_PKTS_DEF,
  parameter int unsigned ALPHA    = ALPHA_DEF,
  parameter int unsigned HIST_A   = HIST_A_DEF,
  parameter int unsigned HIST_B   = HIST_B_DEF,
  parameter int unsigned PSIZE [N_APPS] = PSIZE_AVG,
  localparam int unsigned QW = $clog2(BUF_PKTS + 1),
  localparam int unsigned KW = $clog2((ALPHA << FRAC_BITS) + 1),
  localparam int unsigned TW = QW + KW - FRAC_BITS + 2
) (
  input  logic [APP_W-1:0] app,
  input  logic [QW-1:0]    qlen,     // Q_i(t) of the packet's application
  input  logic [QW-1:0]    total,    // Q(t), sum of all queue lengths
  input  logic [1:0]       hist,     // {History(2), History(1)}
  output logic [TW-1:0]    thr,      // T(t)
  output logic [TW-1:0]    thr_h,    // T'(t)
  output logic             accept,
  output logic             by_history // accepted only thanks to T'
);

  localparam int unsigned PW = QW + KW;
  localparam logic [TW-1:0] M_A = TW'(BUF_PKTS / HIST_A);
  localparam logic [TW-1:0] M_B = TW'(BUF_PKTS / HIST_B);

  logic [KW-1:0] k;
  logic [QW-1:0] free_space;
  logic [PW-1:0] prod;
  logic          below_t, below_th, room;

  always_comb begin
    k = '0;
    for (int unsigned i = 0; i < N_APPS; i++)
      if (app == APP_W'(i)) k = KW'(alpha_over_psize(ALPHA, PSIZE[i]));
  end

  assign free_space = (total >= QW'(BUF_PKTS)) ? '0 : QW'(BUF_PKTS) - total;
  assign prod       = PW'(free_space) * PW'(k);
  assign thr        = TW'(prod >> FRAC_BITS);
  assign thr_h      = thr + (hist[0] ? M_A : '0) + (hist[1] ? M_B : '0);

  assign room     = total < QW'(BUF_PKTS);
  assign below_t  = TW'(qlen) < thr;
  assign below_th = TW'(qlen) < thr_h;

  assign accept     = room && (below_t || ((hist != 2'b00) && below_th));
  assign by_history = room && !below_t && (hist != 2'b00) && below_th;

endmodule
