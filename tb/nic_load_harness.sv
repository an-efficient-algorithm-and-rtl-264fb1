// nic_load_harness: drives one nic_top configuration with bursty traffic at
// a given load and measures its packet loss. Used by tb_workloads, which runs
// several harnesses side by side, one per configuration.
//
// Traffic follows the bursty uniform model: busy periods of mean length 10
// packets, all for one application chosen uniformly per burst, separated by
// idle periods chosen so that load = L_busy / (L_busy + L_idle). The packet
// input takes at most one packet per cycle and is held while in_ready is low.
// Two host processors dequeue: each asks for a packet from a random
// non-empty queue with probability 0.36 per cycle, about 10 packets per 14
// cycles together. The load model and the dequeue rates are this bench's
// own reading of "bursty uniform traffic" and "average dequeue time of 14
// clock cycles for the burst of 10 packets".
//
// Interface: after each rising edge of rst_n the harness runs run_cycles of
// traffic at load_pct percent, drains the design, checks it and raises done.
// Results (sent, dropped, priority-application sent/dropped) and its own
// checks and failures are outputs. Scoreboard: every dequeued packet was sent
// to that queue and comes out once, in order outside the priority queue; at
// the end every sent packet is either dequeued or reported dropped, and the
// design's counters agree.
module nic_load_harness
  import nic_pkg::*;
#(
  parameter int     BUF_PKTS = BUF_PKTS_DEF,
  parameter int     ALPHA    = ALPHA_DEF,
  parameter int     HIST_A   = HIST_A_DEF,
  parameter int     HIST_B   = HIST_B_DEF,
  parameter psize_t PSIZE    = PSIZE_AVG
) (
  input  logic clk,
  input  logic rst_n,
  input  int   load_pct,
  input  int   run_cycles,
  output logic done,
  output int   n_sent,
  output int   n_drop,
  output int   n_prio_sent,
  output int   n_prio_drop,
  output int   checks,
  output int   failures
);
  localparam int QW = $clog2(BUF_PKTS + 1);

  logic in_valid, in_ready;
  pkt_t in_pkt;
  logic deq_req [2];
  logic [APP_W-1:0] deq_app [2];
  logic deq_ok [2];
  pkt_t deq_pkt [2];
  logic [QW-1:0] qlen [6];
  logic buf_full;
  logic [3:0] prio_count;
  logic irq, irq_ack;
  logic drop_valid;
  logic [APP_W-1:0] drop_app;
  nic_stats_t stats;

  nic_top #(.BUF_PKTS(BUF_PKTS), .ALPHA(ALPHA), .HIST_A(HIST_A), .HIST_B(HIST_B),
            .PSIZE(PSIZE)) dut (.*);

  int  app_of [int];
  bit  seen [int];
  int  last_tag [6];
  int  dequeued;
  bit  traffic_on, draining;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL M=%0d load=%0d: %s", BUF_PKTS, load_pct, what); end
  endtask

  // ---------------------------------------------------------------- source
  initial begin
    int burst_left, idle_left, burst_app;
    in_valid = 0; in_pkt = '0;
    forever begin
      @(negedge clk);
      if (!rst_n) begin in_valid = 0; burst_left = 0; idle_left = 0; continue; end
      if (in_valid && !in_ready) continue;                  // held
      in_valid = 0;
      if (!traffic_on) continue;
      if (burst_left == 0 && idle_left == 0) begin
        burst_left = $urandom_range(1, 19);                 // mean 10
        idle_left  = (burst_left * (100 - load_pct) + $urandom_range(0, load_pct - 1)) / load_pct;
        burst_app  = $urandom_range(0, 5);
      end
      if (burst_left > 0) begin
        in_valid    = 1;
        in_pkt.app  = APP_W'(burst_app);
        in_pkt.data = DATA_W'(n_sent);
        app_of[n_sent] = burst_app;
        n_sent++;
        if (burst_app == PRIO_APP_DEF) n_prio_sent++;
        burst_left--;
      end else idle_left--;
    end
  end

  // ---------------------------------------------------------------- hosts
  always @(negedge clk) begin
    for (int p = 0; p < 2; p++) begin
      int a;
      a = $urandom_range(0, 5);
      for (int k = 0; k < 6 && qlen[a] == 0; k++) a = (a + 1) % 6;
      deq_app[p] = APP_W'(a);
      deq_req[p] = rst_n && (draining || ($urandom_range(0, 99) < 36));
    end
    irq_ack = irq && ($urandom_range(0, 3) == 0);
  end

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++) if (deq_ok[p]) begin
      int tag;
      tag = int'(deq_pkt[p].data);
      check(app_of.exists(tag) && app_of[tag] == int'(deq_app[p]) && !seen.exists(tag) &&
            (int'(deq_app[p]) == PRIO_APP_DEF || tag > last_tag[deq_app[p]]),
            $sformatf("packet %0d out of queue %0d", tag, deq_app[p]));
      seen[tag] = 1;
      last_tag[deq_app[p]] = tag;
      dequeued++;
    end
    if (drop_valid) begin
      n_drop++;
      if (int'(drop_app) == PRIO_APP_DEF) n_prio_drop++;
    end
  end

  // ---------------------------------------------------------------- control
  initial begin
    done = 0; checks = 0; failures = 0;
    forever begin
      @(posedge rst_n);
      done = 0; traffic_on = 1; draining = 0;
      n_sent = 0; n_drop = 0; n_prio_sent = 0; n_prio_drop = 0; dequeued = 0;
      app_of.delete(); seen.delete();
      last_tag = '{default: -1};
      repeat (run_cycles) @(posedge clk);
      traffic_on = 0;
      repeat (50) @(posedge clk);
      draining = 1;
      repeat (2 * BUF_PKTS) @(posedge clk);
      check(n_sent == dequeued + n_drop && prio_count == 0, "packets not conserved");
      check(int'(stats.packets) == n_sent && int'(stats.dropped) == n_drop &&
            int'(stats.stored) == dequeued, "counters disagree");
      check(int'(stats.pairs) > 0 && int'(stats.stored) > int'(stats.irqs),
            "no speculation pairs or no interrupt coalescing");
      done = 1;
    end
  end

endmodule
