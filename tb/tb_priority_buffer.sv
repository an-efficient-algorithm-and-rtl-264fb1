// tb_priority_buffer: random pushes and pops against a queue model, with
// phases that fill the buffer to full and drain it to empty.
module tb_priority_buffer;
  import nic_pkg::*;

  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  pkt_t push_pkt = '0, head;
  logic empty, full;
  logic [3:0] count;
  pkt_t model [$];
  int checks = 0, failures = 0, seq = 0, n_full = 0, n_empty = 0;

  always #5 clk = ~clk;

  priority_buffer dut (.clk, .rst_n, .push, .push_pkt, .pop, .head, .empty, .full, .count);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != model.size() || empty != (model.size() == 0) ||
          full != (model.size() == 8)) begin
        failures++; $display("FAIL count=%0d model=%0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (head != model[0]) begin failures++; $display("FAIL head"); end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      push = ((cyc / 50) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      pop  = ((cyc / 50) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      if (model.size() == 0) pop = 0;
      if (model.size() == 8 && !pop) push = 0;
      push_pkt = {APP_W'(2), DATA_W'(seq)};
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) begin model.push_back(push_pkt); seq++; end
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL not full/empty"); end
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
