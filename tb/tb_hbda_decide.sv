// tb_hbda_decide: checks the HBDA decision against an integer model.
//
// With power-of-two packet sizes the fixed-point factor alpha/psize is exact,
// so the model computes T = alpha*(M-Q)/psize_i and T' = T + H1*M/2 + H2*M/4
// directly and applies the accept rule (Q_i < T, or a recent reject and
// Q_i < T', with room in the buffer). Hand-worked corner cases come first,
// then random inputs.
module tb_hbda_decide;
  import nic_pkg::*;

  localparam int unsigned M = 600;
  localparam int unsigned QW = $clog2(M + 1);

  logic [APP_W-1:0] app;
  logic [QW-1:0]    qlen, total;
  logic [1:0]       hist;
  logic [24:0]      thr, thr_h;
  logic             accept, by_history;
  int checks = 0, failures = 0;

  hbda_decide dut (.app, .qlen, .total, .hist, .thr, .thr_h, .accept, .by_history);

  function automatic void model(input int a, q, t, h, output int mt, mth, output bit macc);
    int ps [6] = '{8, 2, 8, 1, 4, 16};
    mt  = 128 * (M - t) / ps[a];
    mth = mt + (h[0] ? M / 2 : 0) + (h[1] ? M / 4 : 0);
    macc = (t < M) && ((q < mt) || (h != 0 && q < mth));
  endfunction

  task automatic check(input int a, q, t, h);
    int mt, mth; bit macc;
    app = APP_W'(a); qlen = QW'(q); total = QW'(t); hist = 2'(h);
    #1;
    model(a, q, t, h, mt, mth, macc);
    checks++;
    if (int'(thr) != mt || int'(thr_h) != mth || accept != macc) begin
      failures++;
      $display("FAIL app=%0d q=%0d t=%0d h=%0d: T=%0d/%0d T'=%0d/%0d acc=%0b/%0b",
               a, q, t, h, thr, mt, thr_h, mth, accept, macc);
    end
  endtask

  initial begin
    // queue 5 (16 units): T = 128*10/16 = 80 at Q = 590
    check(5, 79, 590, 0);  // accepted by T
    check(5, 80, 590, 0);  // rejected, no history
    check(5, 80, 590, 1);  // T' = 380: accepted
    check(5, 379, 590, 1); check(5, 380, 590, 1);
    check(5, 80, 590, 2);  // T' = 230
    check(5, 529, 590, 3); check(5, 530, 590, 3); // T' = 530
    check(3, 0, 600, 3);   // full buffer: refused whatever the history
    check(3, 599, 599, 0); // T = 128
    check(0, 0, 0, 0);     // empty buffer, T = 9600
    for (int i = 0; i < 4000; i++)
      check($urandom_range(0, 5), $urandom_range(0, 600), $urandom_range(0, 600),
            $urandom_range(0, 3));
    // by_history marks acceptances through T' only
    app = 3'd5; qlen = 10'd100; total = 10'd590; hist = 2'b01; #1;
    checks++; if (!(accept && by_history)) failures++;
    hist = 2'b00; #1;
    checks++; if (accept || by_history) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
