// tb_control_unit: the dual control unit against a one-packet-at-a-time HBDA
// model.
//
// The tb plays the input buffer, the packet buffer's dequeue ports and the
// priority controller. Traffic comes in bursts; between bursts, while the
// unit is idle, packets are dequeued and sometimes a priority move is
// requested. A move is also requested in the middle of some bursts, where
// the unit must finish the packets in flight, start nothing new and then
// grant. Every decided packet (written, offered to the priority controller or
// dropped) must come out in input order with the decision the sequential
// model makes on the same history, whatever the speculation did. The first
// burst, into an empty buffer, must be decided at two packets per two cycles.
module tb_control_unit;
  import nic_pkg::*;

  localparam int unsigned M = 600;
  localparam int unsigned QW = $clog2(M + 1);

  logic clk = 0, rst_n = 0;
  pkt_t ib_peek [4];
  logic [4:0] ib_count;
  logic [1:0] ib_pop_n;
  logic deq_ok [2];
  logic [APP_W-1:0] deq_app [2];
  logic wr_valid, pr_valid, pr_taken = 0, mv_req = 0, mv_grant, mv_done;
  pkt_t wr_pkt, pr_pkt;
  logic [QW-1:0] cu_qlen [6];
  logic [QW-1:0] cu_total;
  logic [1:0] cu_hist [6];
  logic drop_valid;
  logic [APP_W-1:0] drop_app;
  logic [31:0] n_packets, n_accepted, n_dropped, n_flushes, n_pairs, n_hist_acc, n_moves;

  control_unit dut (.*);

  pkt_t ib [$];      // packets not yet popped
  pkt_t sent [$];    // packets not yet decided, in input order
  int   mq [6];
  int   mt = 0;
  bit [1:0] mh [6];
  int checks = 0, failures = 0, seq = 0, cycle = 0;
  int m_acc = 0, m_rej = 0, m_hist = 0, m_moves = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always_comb begin
    for (int i = 0; i < 4; i++) ib_peek[i] = (i < ib.size()) ? ib[i] : '0;
    ib_count = 5'((ib.size() > 16) ? 16 : ib.size());
  end

  function automatic bit model_accept(int a, output bit byh);
    int ps [6] = '{8, 2, 8, 1, 4, 16};
    int t1 = 128 * (M - mt) / ps[a];
    int t2 = t1 + (mh[a][0] ? M / 2 : 0) + (mh[a][1] ? M / 4 : 0);
    bit acc = (mt < M) && ((mq[a] < t1) || (mh[a] != 0 && mq[a] < t2));
    byh = acc && !(mq[a] < t1);
    return acc;
  endfunction

  // check one decided packet against the model and update the model
  task automatic decided(pkt_t p, bit acc, bit app_only);
    bit e, byh;
    checks++;
    if (app_only && sent.size() != 0) p.data = sent[0].data;
    if (sent.size() == 0 || sent[0] != p) begin
      failures++; $display("FAIL cyc=%0d packet out of order data=%0d", cycle, p.data);
      return;
    end
    void'(sent.pop_front());
    e = model_accept(int'(p.app), byh);
    if (e != acc) begin
      failures++; $display("FAIL cyc=%0d data=%0d app=%0d acc=%0b exp=%0b q=%0d t=%0d h=%0d",
                           cycle, p.data, p.app, acc, e, mq[p.app], mt, mh[p.app]);
    end
    if (acc) begin mq[p.app]++; mt++; m_acc++; if (byh) m_hist++; end
    else m_rej++;
    mh[p.app] = {mh[p.app][0], !acc};
  endtask

  // observe outputs every cycle
  always @(negedge clk) if (rst_n) begin
    #2;
    if (wr_valid) decided(wr_pkt, 1'b1, 1'b0);
    if (pr_valid || drop_valid) begin
      if (pr_valid) decided(pr_pkt, 1'b0, 1'b0);
      else          decided({drop_app, DATA_W'(0)}, 1'b0, 1'b1);
      checks++;
      if (drop_valid != !(pr_valid && pr_taken)) begin
        failures++; $display("FAIL drop_valid");
      end
      if (pr_valid && pr_pkt.app != 3'd2) begin failures++; $display("FAIL pr_valid app"); end
    end
    if (mv_grant) begin mq[2]++; mt++; m_moves++; end
  end

  always @(posedge clk) begin
    for (int i = 0; i < int'(ib_pop_n); i++) void'(ib.pop_front());
    pr_taken <= ($urandom_range(0, 1) == 1);
  end

  task automatic push_burst(int n, int hot);
    for (int i = 0; i < n; i++) begin
      pkt_t p;
      p.app  = APP_W'(($urandom_range(0, 2) == 0) ? $urandom_range(0, 5) : hot);
      p.data = DATA_W'(seq++);
      ib.push_back(p);
      sent.push_back(p);
    end
  endtask

  task automatic wait_idle();
    while (ib.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  task automatic compare_counters();
    checks++;
    if (int'(cu_total) != mt) begin failures++; $display("FAIL total %0d vs %0d", cu_total, mt); end
    for (int a = 0; a < 6; a++) begin
      checks++;
      if (int'(cu_qlen[a]) != mq[a] || cu_hist[a] != mh[a]) begin
        failures++; $display("FAIL app %0d q=%0d/%0d h=%0b/%0b", a, cu_qlen[a], mq[a], cu_hist[a], mh[a]);
      end
    end
  endtask

  initial begin
    int t0, burst_cycles;
    deq_ok = '{0, 0}; deq_app = '{0, 0};
    mq = '{default: 0}; mh = '{default: 2'b00};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // rate: 64 packets into the empty buffer, all accepted
    t0 = cycle;
    push_burst(64, 1);
    while (ib.size() != 0) @(posedge clk);
    burst_cycles = cycle - t0;
    checks++;
    if (burst_cycles > 64 + 2) begin
      failures++; $display("FAIL 64 packets took %0d cycles", burst_cycles);
    end
    $display("64 accepted packets decided in %0d cycles", burst_cycles);
    wait_idle();
    compare_counters();

    for (int b = 0; b < 80; b++) begin
      @(negedge clk);
      push_burst($urandom_range(10, 50), $urandom_range(0, 5));
      // (the priority controller only asks while the buffer has room)
      if (b % 5 == 2 && mt + 2 < M) begin
        // a move requested while packets are in flight
        repeat ($urandom_range(1, 6)) @(negedge clk);
        mv_req = 1;
        @(negedge clk);
        #3;
        begin
          int left;
          left = sent.size();
          while (!mv_grant) begin @(negedge clk); #3; end
          // only the pair in flight may be decided before the grant
          checks++;
          if (left - sent.size() > 2) begin
            failures++; $display("FAIL %0d packets decided during move request", left - sent.size());
          end
        end
        @(negedge clk);
        mv_req = 0;
        checks++;
        if (!mv_done) begin failures++; $display("FAIL no DONE after move"); end
      end
      wait_idle();
      compare_counters();
      // dequeues while idle
      @(negedge clk);
      for (int k = $urandom_range(0, 14); k > 0; k--) begin
        @(negedge clk);
        for (int p = 0; p < 2; p++) begin
          int a;
          a = $urandom_range(0, 5);
          if (p == 1 && $urandom_range(0, 2) == 0) a = int'(deq_app[0]);
          deq_app[p] = APP_W'(a);
          deq_ok[p]  = (mq[a] > ((p == 1 && deq_ok[0] && int'(deq_app[0]) == a) ? 1 : 0));
        end
        @(posedge clk);
        for (int p = 0; p < 2; p++) if (deq_ok[p]) begin mq[deq_app[p]]--; mt--; end
      end
      @(negedge clk);
      deq_ok = '{0, 0};
      @(negedge clk);
      compare_counters();
    end
    repeat (4) @(posedge clk);
    checks++;
    if (int'(n_packets) != m_acc + m_rej || int'(n_accepted) != m_acc ||
        int'(n_hist_acc) != m_hist || int'(n_moves) != m_moves) begin
      failures++; $display("FAIL statistics %0d %0d %0d %0d", n_packets, n_accepted, n_hist_acc, n_moves);
    end
    $display("accepted=%0d rejected=%0d by_history=%0d pairs=%0d flushes=%0d moves=%0d",
             m_acc, m_rej, m_hist, n_pairs, n_flushes, m_moves);
    checks++;
    if (n_pairs == 0 || n_flushes == 0 || m_hist == 0 || m_moves == 0 || m_rej == 0 || sent.size() != 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
