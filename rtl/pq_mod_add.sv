// Modular adder: c = (a + b) mod q for any odd q < 2^23.
//
// The two canonical operands are added with a 24-bit adder (c' = a + b), then q
// is subtracted from that sum (c'' = c' - q). When the subtraction borrows,
// c' was already below q and is kept; otherwise c'' is taken. Only the low 23
// bits of the selected value are needed. The only difference between the
// Dilithium and the Kyber modulus is where the borrow is taken: at the top of a
// 24-bit subtraction for Dilithium, at bit 13 (a 13-bit subtraction) for Kyber.
// Purely combinational. Operands must lie in [0, q-1].
// The add / subtract-q / select structure is that of the PQ.V.ALU.E adder; the
// exact borrow bit positions are this design's choice.
module pq_mod_add (
  input  logic        kyber_i,  // 1: borrow of a 13-bit subtraction (Kyber)
  input  logic [22:0] a_i,
  input  logic [22:0] b_i,
  input  logic [22:0] q_i,
  output logic [22:0] c_o
);
  logic [23:0] sum;       // c'
  logic [24:0] diff;      // c'' with its borrow in bit 24
  logic        borrow;

  always_comb begin
    sum    = {1'b0, a_i} + {1'b0, b_i};
    diff   = {1'b0, sum} - {2'b00, q_i};
    borrow = kyber_i ? diff[13] : diff[24];
    c_o    = borrow ? sum[22:0] : diff[22:0];
  end
endmodule
