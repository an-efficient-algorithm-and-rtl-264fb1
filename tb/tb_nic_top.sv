// tb_nic_top: end-to-end run of the NIC receive path at its default sizes
// (six applications, 600-packet buffer, alpha 128, priority application 2,
// two host ports).
//
// Bursty traffic: bursts of packets for one application (mean length 10),
// separated by idle gaps that set the offered load. Two host processors
// dequeue at random from non-empty queues, about 10 packets per 14 cycles
// together. In the middle of the run the processors stop for a while so that
// the buffer fills and the admission control, the history threshold and the
// priority buffer all come into play; then they drain everything.
// Scoreboard: every dequeued packet must have been sent to that queue, come
// out once, and (outside the priority queue, which can be refilled from the
// priority buffer) in sending order. At the end every sent packet has been
// either dequeued or reported dropped, and the counters agree. Each mechanism
// (speculation pairs, flushes, history acceptance, priority save, move and
// loss, full buffer, input back-pressure, two packets out in one cycle, one
// interrupt for several packets) must occur at least once.
module tb_nic_top;
  import nic_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pkt_t in_pkt = '0;
  logic in_ready;
  logic deq_req [2];
  logic [APP_W-1:0] deq_app [2];
  logic deq_ok [2];
  pkt_t deq_pkt [2];
  logic [9:0] qlen [6];
  logic buf_full;
  logic [3:0] prio_count;
  logic irq, irq_ack = 0;
  logic drop_valid;
  logic [APP_W-1:0] drop_app;
  nic_stats_t stats;

  nic_top dut (.*);

  localparam int RUN_CYCLES = 30000;
  int checks = 0, failures = 0, cycle = 0;
  int sent = 0, dequeued = 0, dropped = 0;
  int app_of [int];          // tag -> application
  bit seen [int];
  int last_tag [6];
  int n_backpressure = 0, n_full = 0, n_double = 0, n_same_q = 0;
  bit traffic_on = 1, hosts_stalled = 0, draining = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // ---------------------------------------------------------------- source
  initial begin
    int burst_left = 0, idle_left = 0, burst_app = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (in_valid && !in_ready) begin n_backpressure++; continue; end  // hold
      in_valid = 0;
      if (!traffic_on) continue;
      if (burst_left == 0 && idle_left == 0) begin
        burst_left = $urandom_range(5, 15);                 // mean 10
        idle_left  = burst_left * 3 / 7;                   // load 0.7
        burst_app  = $urandom_range(0, 5);
      end
      if (burst_left > 0) begin
        in_valid    = 1;
        in_pkt.app  = APP_W'(burst_app);
        in_pkt.data = DATA_W'(sent);
        app_of[sent] = burst_app;
        sent++;
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
      if (p == 1 && $urandom_range(0, 3) == 0) a = int'(deq_app[0]);
      deq_app[p] = APP_W'(a);
      deq_req[p] = !hosts_stalled && (draining ? 1'b1 : ($urandom_range(0, 99) < 36));
    end
    irq_ack = irq && ($urandom_range(0, 7) == 0);
  end

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++) if (deq_ok[p]) begin
      int tag;
      tag = int'(deq_pkt[p].data);
      checks++;
      if (!app_of.exists(tag) || app_of[tag] != int'(deq_app[p]) || seen.exists(tag) ||
          (int'(deq_app[p]) != 2 && tag <= last_tag[deq_app[p]])) begin
        failures++; $display("FAIL cyc=%0d port %0d tag %0d queue %0d", cycle, p, tag, deq_app[p]);
      end
      seen[tag] = 1;
      last_tag[deq_app[p]] = tag;
      dequeued++;
    end
    if (deq_ok[0] && deq_ok[1]) n_double++;
    if (deq_ok[0] && deq_ok[1] && deq_app[0] == deq_app[1]) n_same_q++;
    if (drop_valid) dropped++;
    if (buf_full) n_full++;
  end

  task automatic mechanism(string name, int count);
    checks++;
    $display("  %-28s %0d", name, count);
    if (count == 0) begin failures++; $display("FAIL %s never happened", name); end
  endtask

  initial begin
    deq_req = '{0, 0}; deq_app = '{0, 0};
    last_tag = '{default: -1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (RUN_CYCLES / 3) @(posedge clk);
    hosts_stalled = 1;                       // processors busy elsewhere
    repeat (RUN_CYCLES / 6) @(posedge clk);
    hosts_stalled = 0;
    repeat (RUN_CYCLES / 2) @(posedge clk);
    traffic_on = 0;
    repeat (50) @(posedge clk);
    draining = 1;
    repeat (3000) @(posedge clk);
    // conservation and counters
    checks++;
    if (sent != dequeued + dropped || prio_count != 0) begin
      failures++; $display("FAIL sent=%0d dequeued=%0d dropped=%0d prio=%0d", sent, dequeued, dropped, prio_count);
    end
    for (int a = 0; a < 6; a++) begin
      checks++;
      if (qlen[a] != 0) begin failures++; $display("FAIL queue %0d not drained", a); end
    end
    checks++;
    if (int'(stats.packets) != sent || int'(stats.dropped) != dropped ||
        int'(stats.stored) != dequeued ||
        int'(stats.stored) != int'(stats.accepted) + int'(stats.moves) ||
        int'(stats.prio_saved) != int'(stats.moves)) begin
      failures++; $display("FAIL statistics");
    end
    $display("sent=%0d dequeued=%0d dropped=%0d loss ratio=%0.4f cycles=%0d",
             sent, dequeued, dropped, real'(dropped) / real'(sent), cycle);
    mechanism("speculative pairs", int'(stats.pairs));
    mechanism("speculation flushes", int'(stats.flushes));
    mechanism("accepted through T'", int'(stats.hist_acc));
    mechanism("priority packets saved", int'(stats.prio_saved));
    mechanism("priority moves", int'(stats.moves));
    mechanism("priority buffer full, lost", int'(stats.prio_lost));
    mechanism("non-priority drops", dropped - int'(stats.prio_lost));
    mechanism("buffer full cycles", n_full);
    mechanism("input back-pressure cycles", n_backpressure);
    mechanism("two packets out in a cycle", n_double);
    mechanism("two from the same queue", n_same_q);
    mechanism("packets per interrupt > 1", (int'(stats.stored) > int'(stats.irqs)) ? 1 : 0);
    $display("  interrupts %0d for %0d stored packets", stats.irqs, stats.stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYCLES + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
