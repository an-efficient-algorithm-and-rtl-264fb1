// control_unit: two speculating control units that run the HBDA admission
// decision on the incoming packets and keep the buffer-management counters.
//
// Deciding whether to accept a packet is the slow step of the receive path,
// and almost all packets are accepted. So control unit 1 processes the oldest
// packet p1 in the input buffer while control unit 2, with its own copy of the
// variables updated as if p1 had been accepted, processes p2 at the same time.
//  * p1 accepted: p2's decision stands. Control unit 2's variables, with p2's
//    outcome applied, are copied to control unit 1, and the next two packets
//    start.
//  * p1 rejected: control unit 2's work is flushed. Control unit 1 applies
//    p1's rejection, its variables are copied to control unit 2, control
//    unit 1 processes p2 again and control unit 2 takes p3, assuming p2 is
//    accepted.
// The variables are the per-application queue lengths Q_i, the total Q and
// the two-packet reject history of each application. Dequeues reported by the
// packet buffer decrement both copies every cycle.
//
// Accepted packets go to the packet buffer write port: p1 in the commit cycle,
// p2 one cycle later. A rejected packet of the highest-priority application is
// offered to the priority controller (pr_valid); other rejected packets, and
// priority packets it cannot take, are reported on drop_valid.
// Priority moves: when the priority controller raises mv_req the control unit
// stops starting new packets; once nothing is in flight and the write port is
// free it grants the move (mv_grant, the cycle the packet is written), adds
// it to its counters and answers with mv_done (DONE) in the next cycle.
//
// Timing: a pair started in cycle c commits in cycle c+2, and the next pair
// starts in that same cycle, so the unit decides two packets every two cycles
// while p1s are accepted, one every two cycles after a flush.
// The two-unit scheme, the flush-and-reprocess rule, the counter update on a
// priority move and the DONE reply follow the source. The latency, the
// one-cycle-later write of p2, the mv_req/mv_grant handshake and the rule that
// the controller's reject is recorded in the history even when the priority
// buffer keeps the packet are this design's choices.
module control_unit
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
  parameter int unsigned IB_CW    = 5,       // width of the input buffer count
  localparam int unsigned QW = $clog2(BUF_PKTS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // input buffer
  input  pkt_t             ib_peek [4],
  input  logic [IB_CW-1:0] ib_count,
  output logic [1:0]       ib_pop_n,
  // dequeues done by the packet buffer's output ports
  input  logic             deq_ok  [N_PORTS],
  input  logic [APP_W-1:0] deq_app [N_PORTS],
  // packet buffer write port (accepted packets)
  output logic             wr_valid,
  output pkt_t             wr_pkt,
  // rejected highest-priority packet offered to the priority controller
  output logic             pr_valid,
  output pkt_t             pr_pkt,
  input  logic             pr_taken,
  // priority move handshake
  input  logic             mv_req,
  output logic             mv_grant,
  output logic             mv_done,
  // committed variables (control unit 1's copy)
  output logic [QW-1:0]    cu_qlen [N_APPS],
  output logic [QW-1:0]    cu_total,
  output logic [1:0]       cu_hist [N_APPS],
  // dropped packets
  output logic             drop_valid,
  output logic [APP_W-1:0] drop_app,
  // statistics
  output logic [31:0]      n_packets,    // packets decided
  output logic [31:0]      n_accepted,   // accepted into the packet buffer
  output logic [31:0]      n_dropped,
  output logic [31:0]      n_flushes,    // speculative decisions flushed
  output logic [31:0]      n_pairs,      // commits with both units used
  output logic [31:0]      n_hist_acc,   // accepted through T'
  output logic [31:0]      n_moves       // priority moves counted
);

  typedef struct packed {
    logic [N_APPS-1:0][QW-1:0] q;
    logic [QW-1:0]             t;
    logic [N_APPS-1:0][1:0]    h;
  } vars_t;

  function automatic vars_t apply(vars_t v, logic [APP_W-1:0] app, logic acc);
    vars_t r = v;
    for (int unsigned i = 0; i < N_APPS; i++)
      if (app == APP_W'(i)) begin
        if (acc) r.q[i] = v.q[i] + 1'b1;
        r.h[i] = {v.h[i][0], !acc};
      end
    if (acc) r.t = v.t + 1'b1;
    return r;
  endfunction

  vars_t vars1, vars2;                 // variables of control units 1 and 2
  logic  inflight, two;
  pkt_t  p1, p2;
  logic  pend_valid;
  pkt_t  pend_pkt;

  // engines
  logic             e1_start, e2_start;
  logic [APP_W-1:0] e1_app, e2_app;
  logic [QW-1:0]    e1_q, e2_q, e1_t, e2_t;
  logic [1:0]       e1_h, e2_h;
  logic             e1_done, e1_acc, e1_byh, e2_done, e2_acc, e2_byh;
  logic             e1_busy, e2_busy;   // observed by assertions only

  hbda_engine #(.N_APPS(N_APPS), .BUF_PKTS(BUF_PKTS), .ALPHA(ALPHA),
                .HIST_A(HIST_A), .HIST_B(HIST_B), .PSIZE(PSIZE)) u_cu1 (
    .clk, .rst_n, .start(e1_start), .app(e1_app), .qlen(e1_q), .total(e1_t),
    .hist(e1_h), .busy(e1_busy), .done(e1_done), .accept(e1_acc),
    .by_history(e1_byh));

  hbda_engine #(.N_APPS(N_APPS), .BUF_PKTS(BUF_PKTS), .ALPHA(ALPHA),
                .HIST_A(HIST_A), .HIST_B(HIST_B), .PSIZE(PSIZE)) u_cu2 (
    .clk, .rst_n, .start(e2_start), .app(e2_app), .qlen(e2_q), .total(e2_t),
    .hist(e2_h), .busy(e2_busy), .done(e2_done), .accept(e2_acc),
    .by_history(e2_byh));

  // ------------------------------------------------------------ next state
  vars_t            d1, d2, base, spec, nvars1, nvars2;
  logic             commit, start, use2, flush;
  logic [IB_CW-1:0] avail;
  pkt_t             s1, s2;
  logic             n_pend_valid;
  pkt_t             n_pend_pkt;
  logic             rej_valid;       // a committed packet was rejected
  pkt_t             rej_pkt;
  logic [1:0]       acc_inc, dec_inc, byh_inc;

  always_comb begin
    // dequeues seen by both copies
    d1 = vars1;
    d2 = vars2;
    for (int unsigned p = 0; p < N_PORTS; p++)
      if (deq_ok[p])
        for (int unsigned i = 0; i < N_APPS; i++)
          if (deq_app[p] == APP_W'(i)) begin
            d1.q[i] = d1.q[i] - 1'b1;
            d2.q[i] = d2.q[i] - 1'b1;
            d1.t    = d1.t - 1'b1;
            d2.t    = d2.t - 1'b1;
          end

    commit       = inflight && e1_done;
    ib_pop_n     = 2'd0;
    wr_valid     = pend_valid;
    wr_pkt       = pend_pkt;
    n_pend_valid = 1'b0;
    n_pend_pkt   = pend_pkt;
    rej_valid    = 1'b0;
    rej_pkt      = p1;
    flush        = 1'b0;
    byh_inc      = 2'd0;
    acc_inc      = 2'd0;
    dec_inc      = 2'd0;
    base         = d1;

    if (commit) begin
      if (e1_acc && two) begin
        // p1 accepted: control unit 2's variables plus p2's outcome
        base      = apply(d2, p2.app, e2_acc);
        ib_pop_n  = 2'd2;
        dec_inc   = 2'd2;
        wr_valid  = 1'b1;
        wr_pkt    = p1;
        acc_inc   = e2_acc ? 2'd2 : 2'd1;
        byh_inc   = 2'(e1_byh) + 2'(e2_acc && e2_byh);
        n_pend_valid = e2_acc;
        n_pend_pkt   = p2;
        rej_valid = !e2_acc;
        rej_pkt   = p2;
      end else begin
        base      = apply(d1, p1.app, e1_acc);
        ib_pop_n  = 2'd1;
        dec_inc   = 2'd1;
        wr_valid  = e1_acc;
        wr_pkt    = p1;
        acc_inc   = e1_acc ? 2'd1 : 2'd0;
        byh_inc   = 2'(e1_acc && e1_byh);
        rej_valid = !e1_acc;
        rej_pkt   = p1;
        flush     = !e1_acc && two;
      end
    end

    // priority move: only when nothing is in flight and the port is free
    mv_grant = mv_req && !inflight && !pend_valid;
    if (mv_grant)
      for (int unsigned i = 0; i < N_APPS; i++)
        if (i == PRIO_APP) begin
          base.q[i] = base.q[i] + 1'b1;
          base.t    = base.t + 1'b1;
        end

    // start the next packet(s)
    avail = ib_count - IB_CW'(ib_pop_n);
    start = (!inflight || commit) && !mv_req && (avail != '0);
    use2  = start && (avail >= IB_CW'(2));
    s1    = ib_peek[ib_pop_n];
    s2    = ib_peek[ib_pop_n + 2'd1];
    spec  = apply(base, s1.app, 1'b1);   // control unit 2 assumes s1 accepted

    e1_start = start;
    e1_app   = s1.app;
    e1_q     = base.q[s1.app];
    e1_t     = base.t;
    e1_h     = base.h[s1.app];
    e2_start = use2;
    e2_app   = s2.app;
    e2_q     = spec.q[s2.app];
    e2_t     = spec.t;
    e2_h     = spec.h[s2.app];

    if (inflight && !commit) begin
      nvars1 = d1;
      nvars2 = d2;
    end else begin
      nvars1 = base;
      nvars2 = start ? spec : base;
    end

    // rejected packets
    pr_valid   = rej_valid && (int'(rej_pkt.app) == PRIO_APP);
    pr_pkt     = rej_pkt;
    drop_valid = rej_valid && !(pr_valid && pr_taken);
    drop_app   = rej_pkt.app;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vars1      <= '0;
      vars2      <= '0;
      inflight   <= 1'b0;
      two        <= 1'b0;
      p1         <= '0;
      p2         <= '0;
      pend_valid <= 1'b0;
      pend_pkt   <= '0;
      mv_done    <= 1'b0;
      n_packets  <= '0;
      n_accepted <= '0;
      n_dropped  <= '0;
      n_flushes  <= '0;
      n_pairs    <= '0;
      n_hist_acc <= '0;
      n_moves    <= '0;
    end else begin
      vars1      <= nvars1;
      vars2      <= nvars2;
      pend_valid <= n_pend_valid;
      pend_pkt   <= n_pend_pkt;
      mv_done    <= mv_grant;
      if (start) begin
        inflight <= 1'b1;
        two      <= use2;
        p1       <= s1;
        p2       <= s2;
      end else if (commit) begin
        inflight <= 1'b0;
        two      <= 1'b0;
      end
      n_packets  <= n_packets  + 32'(dec_inc);
      n_accepted <= n_accepted + 32'(acc_inc);
      n_dropped  <= n_dropped  + 32'(drop_valid);
      n_flushes  <= n_flushes  + 32'(flush);
      n_pairs    <= n_pairs    + 32'(commit && e1_acc && two);
      n_hist_acc <= n_hist_acc + 32'(byh_inc);
      n_moves    <= n_moves    + 32'(mv_grant);
    end
  end

  always_comb
    for (int unsigned i = 0; i < N_APPS; i++) begin
      cu_qlen[i] = vars1.q[i];
      cu_hist[i] = vars1.h[i];
    end
  assign cu_total = vars1.t;

  // both engines of a pair start and finish together
  a_pair_sync: assert property (@(posedge clk) disable iff (!rst_n)
                                (inflight && two) |-> (e1_done == e2_done));
  a_pair_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                (inflight && two) |-> (e1_busy == e2_busy));
  a_no_overfill: assert property (@(posedge clk) disable iff (!rst_n)
                                  vars1.t <= QW'(BUF_PKTS));
  a_no_port_clash: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(mv_grant && wr_valid));

endmodule
