// tb_packet_buffer: the shared packet buffer against per-queue FIFO models.
//
// Phases alternate between filling (many writes, few reads) and draining.
// Every cycle both output ports ask for random queues, sometimes the same one;
// the model predicts which requests are served (lowest port first, as far as
// the queue holds packets) and which packet each port receives. The buffer is
// driven full, so slots come back through the free list and are reused.
module tb_packet_buffer;
  import nic_pkg::*;

  localparam int unsigned M = 600;
  localparam int unsigned QW = $clog2(M + 1);

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0;
  pkt_t wr_pkt = '0;
  logic deq_req [2];
  logic [APP_W-1:0] deq_app [2];
  logic deq_ok [2];
  pkt_t deq_pkt [2];
  logic [QW-1:0] qlen [6];
  logic [QW-1:0] total;
  logic full;

  logic [DATA_W-1:0] model [6][$];
  int model_total = 0;
  int checks = 0, failures = 0, seq = 0;
  int n_full = 0, n_double = 0, n_same_q = 0, n_writes = 0;

  always #5 clk = ~clk;

  packet_buffer dut (.clk, .rst_n, .wr_valid, .wr_pkt, .deq_req, .deq_app,
                     .deq_ok, .deq_pkt, .qlen, .total, .full);

  initial begin
    deq_req = '{0, 0}; deq_app = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 12000; cyc++) begin
      bit fill;
      int e_ok [2];
      int taken [6];
      @(negedge clk);
      fill = ((cyc / 1500) % 2 == 0);
      wr_valid = (model_total < M) && (fill ? ($urandom_range(0, 9) != 0) : ($urandom_range(0, 3) == 0));
      wr_pkt.app  = APP_W'($urandom_range(0, 5));
      wr_pkt.data = DATA_W'(seq);
      for (int p = 0; p < 2; p++) begin
        deq_req[p] = fill ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
        deq_app[p] = APP_W'($urandom_range(0, 5));
      end
      if ($urandom_range(0, 3) == 0) deq_app[1] = deq_app[0];
      #1;
      // expected results
      taken = '{default: 0};
      for (int p = 0; p < 2; p++) begin
        int q;
        q = int'(deq_app[p]);
        e_ok[p] = deq_req[p] && (taken[q] < model[q].size());
        checks++;
        if (deq_ok[p] != e_ok[p]) begin
          failures++; $display("FAIL cyc=%0d port %0d ok=%0b exp=%0b", cyc, p, deq_ok[p], e_ok[p]);
        end else if (e_ok[p]) begin
          checks++;
          if (deq_pkt[p].data != model[q][taken[q]] || deq_pkt[p].app != deq_app[p]) begin
            failures++; $display("FAIL cyc=%0d port %0d data=%0d exp=%0d", cyc, p,
                                 deq_pkt[p].data, model[q][taken[q]]);
          end
        end
        if (e_ok[p]) taken[q]++;
      end
      if (e_ok[0] && e_ok[1]) n_double++;
      if (e_ok[0] && e_ok[1] && deq_app[0] == deq_app[1]) n_same_q++;
      checks++;
      if (int'(total) != model_total || full != (model_total == M)) begin
        failures++; $display("FAIL total=%0d exp=%0d", total, model_total);
      end
      for (int q = 0; q < 6; q++) begin
        checks++;
        if (int'(qlen[q]) != model[q].size()) failures++;
      end
      if (full) n_full++;
      @(posedge clk);
      #1;
      for (int q = 0; q < 6; q++)
        for (int k = 0; k < taken[q]; k++) begin
          void'(model[q].pop_front());
          model_total--;
        end
      if (wr_valid) begin
        model[wr_pkt.app].push_back(wr_pkt.data);
        model_total++; seq++; n_writes++;
      end
    end
    $display("writes=%0d full_cycles=%0d double=%0d same_queue=%0d", n_writes, n_full, n_double, n_same_q);
    checks++;
    if (n_full == 0 || n_same_q == 0 || n_writes < 2 * M) begin
      failures++; $display("FAIL coverage");
    end
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
