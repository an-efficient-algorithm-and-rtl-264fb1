// tb_hbda_engine: checks the latency and the decision of one control unit.
//
// Random packets are started back to back every two cycles (the engine's
// throughput). Each decision must appear exactly two cycles after its start
// and match an integer model of the HBDA rule.
module tb_hbda_engine;
  import nic_pkg::*;

  localparam int unsigned M = 600;
  localparam int unsigned QW = $clog2(M + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [APP_W-1:0] app = 0;
  logic [QW-1:0] qlen = 0, total = 0;
  logic [1:0] hist = 0;
  logic busy, done, accept, by_history;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  hbda_engine dut (.clk, .rst_n, .start, .app, .qlen, .total, .hist,
                   .busy, .done, .accept, .by_history);

  function automatic bit model(int a, q, t, h);
    int ps [6] = '{8, 2, 8, 1, 4, 16};
    int mt = 128 * (M - t) / ps[a];
    int mth = mt + (h[0] ? M / 2 : 0) + (h[1] ? M / 4 : 0);
    return (t < M) && ((q < mt) || (h != 0 && q < mth));
  endfunction

  initial begin
    bit exp_acc;
    int start_cycle;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int a, q, t, h;
      a = $urandom_range(0, 5); q = $urandom_range(0, 600);
      t = $urandom_range(500, 600); h = $urandom_range(0, 3);
      @(negedge clk);
      start = 1; app = APP_W'(a); qlen = QW'(q); total = QW'(t); hist = 2'(h);
      exp_acc = model(a, q, t, h);
      start_cycle = cycle;
      @(negedge clk);
      start = 0; app = 0; qlen = 0; total = 0; hist = 0;  // inputs sampled once
      checks++;
      if (done || !busy) begin failures++; $display("FAIL early done"); end
      @(negedge clk);
      checks++;
      if (!done || accept != exp_acc || cycle - start_cycle != 2) begin
        failures++;
        $display("FAIL n=%0d done=%0b acc=%0b exp=%0b", n, done, accept, exp_acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
