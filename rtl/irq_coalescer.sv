// irq_coalescer: one host interrupt for a group of stored packets.
//
// A NIC that interrupts the host for every stored packet spends far more time
// in interrupt handling than the packets allow. Here the interrupt line goes
// high when a packet is stored and no interrupt is pending, and stays high
// until the host acknowledges it; packets stored meanwhile are covered by the
// same interrupt, since the host processors drain several packets per
// interrupt through the output ports. A packet stored in the acknowledge
// cycle raises a new interrupt. The counters give the number of interrupts
// and of stored packets. That one interrupt serves several packets follows the
// source; the level/acknowledge protocol is this design's choice.
module irq_coalescer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stored,     // a packet was written into the packet buffer
  input  logic        irq_ack,    // host has taken the interrupt
  output logic        irq,
  output logic [31:0] n_irqs,
  output logic [31:0] n_stored
);

  logic raise;

  assign raise = stored && (!irq || irq_ack);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq      <= 1'b0;
      n_irqs   <= '0;
      n_stored <= '0;
    end else begin
      if (raise)        irq <= 1'b1;
      else if (irq_ack) irq <= 1'b0;
      n_irqs   <= n_irqs + 32'(raise);
      n_stored <= n_stored + 32'(stored);
    end
  end

endmodule
