// Modular subtractor: c = (a - b) mod q for any odd q < 2^23.
//
// A 24-bit subtractor forms c' = a - b. If it borrows (a < b), q is added back
// (c'' = c' + q); otherwise c' is the result. A multiplexer driven by the
// borrow picks between the two and only the low 23 bits are kept. For the
// Kyber modulus the borrow is taken at bit 12 (a 12-bit subtraction), for
// Dilithium at bit 24. Purely combinational; operands must lie in [0, q-1].
// The structure is that of the PQ.V.ALU.E subtractor; the exact borrow bit
// positions are this design's choice.
module pq_mod_sub (
  input  logic        kyber_i,  // 1: borrow of a 12-bit subtraction (Kyber)
  input  logic [22:0] a_i,
  input  logic [22:0] b_i,
  input  logic [22:0] q_i,
  output logic [22:0] c_o
);
  logic [24:0] diff;      // c' with its borrow in bit 24
  logic [23:0] corr;      // c''
  logic        borrow;

  always_comb begin
    diff   = {2'b00, a_i} - {2'b00, b_i};
    corr   = diff[23:0] + {1'b0, q_i};
    borrow = kyber_i ? diff[12] : diff[24];
    c_o    = borrow ? corr[22:0] : diff[22:0];
  end
endmodule
