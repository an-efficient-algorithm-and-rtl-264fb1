// tb_irq_coalescer: bursts of stored packets must raise one interrupt each
// while the host has not acknowledged; an acknowledge clears the line, and a
// packet stored in the acknowledge cycle raises the next interrupt.
module tb_irq_coalescer;
  logic clk = 0, rst_n = 0;
  logic stored = 0, irq_ack = 0;
  logic irq;
  logic [31:0] n_irqs, n_stored;
  int checks = 0, failures = 0;
  bit m_irq = 0;
  int m_irqs = 0, m_stored = 0;

  always #5 clk = ~clk;

  irq_coalescer dut (.clk, .rst_n, .stored, .irq_ack, .irq, .n_irqs, .n_stored);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: a burst of 10 packets gives one interrupt
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); stored = 1;
      @(posedge clk); #1;
      if (!m_irq) m_irqs++;
      m_irq = 1; m_stored++;
    end
    @(negedge clk); stored = 0;
    checks++;
    if (n_irqs != 1 || n_stored != 10 || !irq) begin
      failures++; $display("FAIL burst irqs=%0d stored=%0d", n_irqs, n_stored);
    end
    // random traffic with acknowledges
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      checks++;
      if (irq != m_irq || int'(n_irqs) != m_irqs || int'(n_stored) != m_stored) begin
        failures++; $display("FAIL cyc=%0d irq=%0b/%0b n=%0d/%0d", cyc, irq, m_irq, n_irqs, m_irqs);
      end
      stored  = ($urandom_range(0, 2) == 0);
      irq_ack = irq && ($urandom_range(0, 9) == 0);
      @(posedge clk); #1;
      if (stored && (!m_irq || irq_ack)) begin m_irq = 1; m_irqs++; end
      else if (irq_ack) m_irq = 0;
      if (stored) m_stored++;
    end
    checks++;
    if (m_irqs * 2 > m_stored) begin failures++; $display("FAIL no coalescing"); end
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
