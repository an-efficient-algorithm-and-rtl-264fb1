// input_buffer: FIFO for incoming packets in front of the control units.
//
// Packets arrive one per cycle (valid/ready). The control units look at the
// first PEEK packets at once (p1, p2 and, in the cycle a pair is committed,
// the two after them) and remove up to two packets per cycle with pop_n.
// Storage is a circular array of DEPTH entries; count says how many are held.
// A push and a pop in the same cycle are allowed. Depth, peek width and the
// handshake are this design's choices: the source only shows an input buffer
// from which control unit 1 takes p1 and control unit 2 takes p2.
module input_buffer
  import nic_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned PEEK  = 4,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  pkt_t          in_pkt,
  output logic          in_ready,
  input  logic [1:0]    pop_n,          // packets removed this cycle, 0..2
  output pkt_t          peek [PEEK],    // peek[0] is the oldest packet
  output logic [CW-1:0] count
);

  pkt_t          mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          push;

  function automatic logic [AW-1:0] wrap(logic [AW-1:0] p, int unsigned n);
    int unsigned s = int'(p) + n;
    return AW'((s >= DEPTH) ? s - DEPTH : s);
  endfunction

  assign in_ready = (count < CW'(DEPTH));
  assign push     = in_valid && in_ready;

  always_comb
    for (int unsigned i = 0; i < PEEK; i++) peek[i] = mem[wrap(rd_ptr, i)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= wrap(wr_ptr, 1);
      rd_ptr <= wrap(rd_ptr, int'(pop_n));
      count  <= count + CW'(push) - CW'(pop_n);
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wr_ptr] <= in_pkt;

  a_pop_ok: assert property (@(posedge clk) disable iff (!rst_n)
                             CW'(pop_n) <= count);

endmodule
