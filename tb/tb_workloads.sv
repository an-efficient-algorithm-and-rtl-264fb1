// tb_workloads: packet loss of the NIC receive path over the evaluated
// traffic conditions.
//
// Fourteen configurations run side by side, each in its own nic_load_harness:
//   0     average traffic mix, 600-packet buffer, alpha 128, a,b = 2,4 (defaults)
//   1     heavy traffic mix, 600-packet buffer, alpha 128
//   2     actual traffic mix, 600-packet buffer, alpha 64
//   3-5   average mix with buffers of 500, 700 and 800 packets
//   6-9   average mix with alpha 16, 32, 64 and 256
//   10-13 average mix with history weights (a,b) = (2,2), (2,8), (4,4), (4,8)
// Each is run at loads 0.5, 0.6, 0.7, 0.8 and 0.9 with bursty uniform traffic
// (mean burst 10 packets) and two host processors taking about 10 packets
// per 14 cycles. Between load points the designs are reset. The bench prints
// the loss ratio (dropped / received packets) of every point and of the
// priority application (application 2).
//
// Self-checks: each harness checks its design's packet flow (see
// nic_load_harness). Across points the bench checks that loss grows from the
// lowest to the highest load, and that the 800-packet buffer loses no more
// than the 500-packet one summed over all loads. The absolute loss values,
// and the ranking of the alpha and (a,b) settings, depend on this bench's
// traffic and dequeue model and are reported, not checked.
module tb_workloads;
  import nic_pkg::*;

  localparam int NCFG  = 14;
  localparam int NLOAD = 5;
  localparam int RUN   = 40000;
  localparam string NAME [NCFG] = '{
    "average M=600 a=128 2,4", "heavy   M=600 a=128 2,4", "actual  M=600 a=64  2,4",
    "average M=500 a=128 2,4", "average M=700 a=128 2,4", "average M=800 a=128 2,4",
    "average M=600 a=16  2,4", "average M=600 a=32  2,4", "average M=600 a=64  2,4",
    "average M=600 a=256 2,4", "average M=600 a=128 2,2", "average M=600 a=128 2,8",
    "average M=600 a=128 4,4", "average M=600 a=128 4,8"};
  localparam int CFG_M   [NCFG] = '{600, 600, 600, 500, 700, 800, 600, 600, 600, 600, 600, 600, 600, 600};
  localparam int CFG_AL  [NCFG] = '{128, 128,  64, 128, 128, 128,  16,  32,  64, 256, 128, 128, 128, 128};
  localparam int CFG_A   [NCFG] = '{  2,   2,   2,   2,   2,   2,   2,   2,   2,   2,   2,   2,   4,   4};
  localparam int CFG_B   [NCFG] = '{  4,   4,   4,   4,   4,   4,   4,   4,   4,   4,   2,   8,   4,   8};
  localparam int CFG_MIX [NCFG] = '{  0,   1,   2,   0,   0,   0,   0,   0,   0,   0,   0,   0,   0,   0};

  logic clk = 0, rst_n = 0;
  int   load_pct = 50;
  logic done [NCFG];
  int   sent [NCFG], drop [NCFG], psent [NCFG], pdrop [NCFG], hchecks [NCFG], hfail [NCFG];
  real  loss [NCFG][NLOAD];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam psize_t MIX = (CFG_MIX[c] == 1) ? PSIZE_HEAVY :
                             (CFG_MIX[c] == 2) ? PSIZE_ACTUAL : PSIZE_AVG;
    nic_load_harness #(.BUF_PKTS(CFG_M[c]), .ALPHA(CFG_AL[c]), .HIST_A(CFG_A[c]),
                       .HIST_B(CFG_B[c]), .PSIZE(MIX)) h (
      .clk, .rst_n, .load_pct, .run_cycles(RUN), .done(done[c]), .n_sent(sent[c]),
      .n_drop(drop[c]), .n_prio_sent(psent[c]), .n_prio_drop(pdrop[c]),
      .checks(hchecks[c]), .failures(hfail[c]));
  end

  function automatic bit all_done();
    for (int c = 0; c < NCFG; c++) if (!done[c]) return 0;
    return 1;
  endfunction

  initial begin
    real s500, s800;
    for (int l = 0; l < NLOAD; l++) begin
      load_pct = 50 + 10 * l;
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      repeat (2) @(posedge clk);
      while (!all_done()) @(posedge clk);
      @(posedge clk);
      for (int c = 0; c < NCFG; c++) begin
        loss[c][l] = real'(drop[c]) / real'(sent[c]);
        $display("%s load %0.1f: received %6d dropped %6d loss %0.4f | application 2: %5d of %5d lost",
                 NAME[c], real'(load_pct) / 100.0, sent[c], drop[c], loss[c][l], pdrop[c], psent[c]);
      end
    end
    for (int c = 0; c < NCFG; c++) begin
      checks++;
      if (!(loss[c][NLOAD-1] > loss[c][0])) begin
        failures++; $display("FAIL %s: loss at 0.9 not above loss at 0.5", NAME[c]);
      end
    end
    s500 = 0; s800 = 0;
    for (int l = 0; l < NLOAD; l++) begin s500 += loss[3][l]; s800 += loss[5][l]; end
    checks++;
    if (s800 > s500) begin failures++; $display("FAIL larger buffer loses more"); end
    for (int c = 0; c < NCFG; c++) begin checks += hchecks[c]; failures += hfail[c]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NLOAD * (RUN + 3000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
