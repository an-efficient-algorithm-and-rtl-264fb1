// priority_buffer: small FIFO for highest-priority packets.
//
// When the controller rejects a packet of the highest-priority application,
// the packet is kept here instead of being dropped, and later moved into the
// packet buffer by the priority controller. One push and one pop per cycle,
// first-word fall-through: head is valid whenever not empty. DEPTH is this
// design's choice; the source only calls the buffer "small".
module priority_buffer
  import nic_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  pkt_t          push_pkt,
  input  logic          pop,
  output pkt_t          head,
  output logic          empty,
  output logic          full,
  output logic [CW-1:0] count
);

  pkt_t          mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign head  = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wr_ptr] <= push_pkt;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
