// tb_input_buffer: random pushes and pops of 0..2 packets against a queue
// model. Every cycle the count and the first four peeked packets are compared
// with the model; the buffer is also driven full to see in_ready drop.
module tb_input_buffer;
  import nic_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pkt_t in_pkt = '0;
  logic in_ready;
  logic [1:0] pop_n = 0;
  pkt_t peek [4];
  logic [4:0] count;
  pkt_t model [$];
  int checks = 0, failures = 0, seq = 0, full_seen = 0;

  always #5 clk = ~clk;

  input_buffer dut (.clk, .rst_n, .in_valid, .in_pkt, .in_ready, .pop_n, .peek, .count);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare
      checks++;
      if (int'(count) != model.size()) begin
        failures++; $display("FAIL count %0d vs %0d", count, model.size());
      end
      for (int i = 0; i < 4 && i < model.size(); i++) begin
        checks++;
        if (peek[i] != model[i]) begin failures++; $display("FAIL peek %0d", i); end
      end
      checks++;
      if (in_ready != (model.size() < 16)) failures++;
      if (!in_ready) full_seen++;
      // next stimulus: phases of filling and draining
      in_valid = ((cyc / 200) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      in_pkt.app  = APP_W'($urandom_range(0, 5));
      in_pkt.data = DATA_W'(seq);
      pop_n = ((cyc / 200) % 2 == 0) ? 2'($urandom_range(0, 3) == 0) : 2'($urandom_range(0, 2));
      if (int'(pop_n) > model.size()) pop_n = 2'(model.size());
      @(posedge clk);
      #1;
      // model update (ready was sampled before the edge)
      for (int i = 0; i < int'(pop_n); i++) void'(model.pop_front());
      if (in_valid && model.size() + int'(pop_n) < 16) begin model.push_back(in_pkt); seq++; end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
