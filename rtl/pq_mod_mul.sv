// Modular multiplier: c = a * b mod q for the Dilithium or the Kyber prime.
//
// One 23 x 23-bit integer multiplier (46-bit product) is shared by both
// schemes. Its full product feeds the Dilithium Barrett reduction; its low 24
// bits feed the Kyber Barrett reduction (a product of two 12-bit canonical
// values fits in 24 bits). kyber_i selects which reduction drives the output;
// the 12-bit Kyber result is zero-extended to 23 bits. Each reduction takes the
// modulus from the matching constant. Purely combinational; operands must be
// canonical for the selected modulus.
// The shared-multiplier arrangement and its widths follow PQ.V.ALU.E.
module pq_mod_mul
  import pq_pkg::*;
(
  input  logic        kyber_i,  // select: 1 = Kyber, 0 = Dilithium
  input  logic [22:0] a_i,
  input  logic [22:0] b_i,
  output logic [22:0] c_o
);
  logic [45:0] prod;
  logic [22:0] red_dil;
  logic [11:0] red_kyb;

  assign prod = {23'd0, a_i} * {23'd0, b_i};

  pq_barrett_dil u_red_dil (.x_i(prod),       .q_i(Q_DIL), .z_o(red_dil));
  pq_barrett_kyb u_red_kyb (.x_i(prod[23:0]), .q_i(Q_KYB), .z_o(red_kyb));

  assign c_o = kyber_i ? {11'd0, red_kyb} : red_dil;
endmodule
