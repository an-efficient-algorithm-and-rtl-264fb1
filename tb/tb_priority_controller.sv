// tb_priority_controller: the tb plays the control unit.
//
// It offers rejected priority packets at random, changes the committed
// counters so that the priority queue alternates between "room" and "no
// room", grants moves at random and answers DONE after a random delay. A
// model predicts pr_taken (space in the priority buffer), mv_req (idle, a
// packet waiting and the HBDA rule admits it), the packet written with
// WritetoBuffer (oldest first) and that no second move starts before DONE.
module tb_priority_controller;
  import nic_pkg::*;

  localparam int unsigned M = 600;

  logic clk = 0, rst_n = 0;
  logic pr_valid = 0;
  pkt_t pr_pkt = '0;
  logic pr_taken;
  logic [9:0] prio_qlen = 0, total = 0;
  logic [1:0] prio_hist = 0;
  logic mv_req, mv_grant = 0, mv_done = 0;
  logic write_to_buffer;
  pkt_t wb_pkt;
  logic [3:0] pb_count;
  logic [31:0] n_saved, n_lost;

  pkt_t model [$];
  bit waiting = 0;
  int done_delay = 0;
  int checks = 0, failures = 0, seq = 0;
  int n_moves = 0, n_taken = 0, n_refused = 0, n_blocked = 0;

  always #5 clk = ~clk;

  priority_controller dut (.clk, .rst_n, .pr_valid, .pr_pkt, .pr_taken,
                           .prio_qlen, .total, .prio_hist, .mv_req, .mv_grant,
                           .mv_done, .write_to_buffer, .wb_pkt, .pb_count,
                           .n_saved, .n_lost);

  function automatic bit room(int q, int t, int h);
    int mt = 16 * (M - t);                   // alpha 128 / psize 8
    int mth = mt + (h[0] ? M / 2 : 0) + (h[1] ? M / 4 : 0);
    return (t < M) && ((q < mt) || (h != 0 && q < mth));
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit e_req, taken_now, wr_now;
      @(negedge clk);
      mv_done = 0;
      if (waiting) begin
        if (done_delay == 0) begin mv_done = 1; waiting = 0; end
        else done_delay--;
      end
      pr_valid = ((cyc / 400) % 2 == 0) ? ($urandom_range(0, 2) == 0) : ($urandom_range(0, 9) == 0);
      pr_pkt   = {APP_W'(2), DATA_W'(seq)};
      // counters: every 100 cycles a different occupancy
      if (cyc % 100 == 0) begin
        total     = 10'($urandom_range(560, 600));
        prio_qlen = 10'($urandom_range(0, 500));
        prio_hist = 2'($urandom_range(0, 3));
      end
      #1;
      checks++;
      if (pr_taken != (pr_valid && model.size() < 8)) begin
        failures++; $display("FAIL cyc=%0d pr_taken", cyc);
      end
      e_req = !waiting && !mv_done && model.size() > 0 &&
              room(int'(prio_qlen), int'(total), int'(prio_hist));
      // the dut leaves its wait state on the DONE edge
      if (mv_done) e_req = 0;
      checks++;
      if (mv_req != e_req) begin
        failures++; $display("FAIL cyc=%0d mv_req=%0b exp=%0b", cyc, mv_req, e_req);
      end
      if (model.size() > 0 && !room(int'(prio_qlen), int'(total), int'(prio_hist))) n_blocked++;
      mv_grant = mv_req && ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (write_to_buffer != (mv_req && mv_grant)) failures++;
      if (write_to_buffer) begin
        checks++;
        if (wb_pkt != model[0]) begin failures++; $display("FAIL wb_pkt order"); end
      end
      taken_now = pr_taken;
      wr_now = write_to_buffer;
      @(posedge clk);
      #1;
      if (wr_now) begin
        void'(model.pop_front()); n_moves++;
        waiting = 1; done_delay = $urandom_range(0, 3);
      end
      if (pr_valid) begin
        if (taken_now) begin model.push_back(pr_pkt); n_taken++; end
        else n_refused++;
        seq++;
      end
      mv_grant = 0;
      checks++;
      if (int'(pb_count) != model.size() || int'(n_saved) != n_taken || int'(n_lost) != n_refused)
        begin failures++; $display("FAIL counters"); end
    end
    $display("moves=%0d taken=%0d refused=%0d blocked=%0d", n_moves, n_taken, n_refused, n_blocked);
    checks++;
    if (n_moves == 0 || n_refused == 0 || n_blocked == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
