// Custom ALU: modular add, sub, mul and one-cycle NTT butterflies.
//
// One modular adder, one modular subtractor and one modular multiplier are
// chained by input multiplexers so that the same three units serve all five
// operations, for either prime (kyber_i, from funct7[0]):
//   MOD_ADD  a' = a + b                 MOD_SUB  b' = a - b
//   MOD_MUL  b' = a * b
//   CT_BFLY  m = b * tw;  a' = a + m;  b' = a - m        (Cooley-Tukey)
//   GS_BFLY  s = a - b;   a' = a + b;  b' = s * tw       (Gentleman-Sande)
// The multiplier takes a or the twiddle on one side and b or the subtractor
// output on the other; adder and subtractor take b or the multiplier output;
// b' is the multiplier or the subtractor output and a' is always the adder.
// Operands are cut to 23 bits (Dilithium) or 12 bits (Kyber) and must be
// canonical; results are zero-extended to XLEN. Purely combinational: the whole
// operation fits the execute stage of one cycle.
// The network contains a structural loop (subtractor -> multiplier input for
// GS, multiplier -> subtractor input for CT). It is a false path: the two
// multiplexers are never both switched to the other unit, since that would
// need an operation that is CT and GS at once. Lint tools report it as circular logic;
// timing analysis should treat it as a false path or use case analysis on op_i.
// Breaking it would need a second multiplier or subtractor, which the shared
// design is meant to avoid. With BFLY_EN = 0 the chaining multiplexers, the
// twiddle input and the loop are gone and only add, sub and mul remain (the
// variant of the design that has no single-cycle butterfly).
// The unit sharing and the multiplexer network follow PQ.V.ALU.E; the select
// encoding and the routing of single-operation results to a' or b' are this
// design's choice.
module pq_custom_alu
  import pq_pkg::*;
#(
  parameter int unsigned XLEN    = 32,
  parameter bit          BFLY_EN = 1'b1   // 0: no butterflies, no chaining muxes
) (
  input  pq_op_e            op_i,
  input  logic              kyber_i,
  input  logic [XLEN-1:0]   a_i,     // rs1
  input  logic [XLEN-1:0]   b_i,     // rs2
  input  logic [XLEN-1:0]   tw_i,    // twiddle, read from rd
  output logic [XLEN-1:0]   a_o,     // a'
  output logic [XLEN-1:0]   b_o      // b'
);
  logic [22:0] q, mask;
  logic [22:0] a, b, tw;
  logic [22:0] add_b, sub_b, mul_a, mul_b;
  logic [22:0] add_out, sub_out, mul_out, bout;

  always_comb begin
    q    = kyber_i ? {11'd0, Q_KYB} : Q_DIL;
    mask = kyber_i ? 23'h000fff : 23'h7fffff;
    a    = a_i[22:0]  & mask;
    b    = b_i[22:0]  & mask;
    tw   = tw_i[22:0] & mask;
  end

  // input multiplexers
  always_comb begin
    mul_a = (BFLY_EN && (op_i == PQ_CT_BFLY || op_i == PQ_GS_BFLY)) ? tw : a;
    mul_b = (BFLY_EN && op_i == PQ_GS_BFLY) ? sub_out : b;
    add_b = (BFLY_EN && op_i == PQ_CT_BFLY) ? mul_out : b;
    sub_b = (BFLY_EN && op_i == PQ_CT_BFLY) ? mul_out : b;
  end

  pq_mod_add u_add (.kyber_i(kyber_i), .a_i(a), .b_i(add_b), .q_i(q), .c_o(add_out));
  pq_mod_sub u_sub (.kyber_i(kyber_i), .a_i(a), .b_i(sub_b), .q_i(q), .c_o(sub_out));
  pq_mod_mul u_mul (.kyber_i(kyber_i), .a_i(mul_a), .b_i(mul_b), .c_o(mul_out));

  // output multiplexer for b'
  assign bout = (op_i == PQ_MOD_MUL || (BFLY_EN && op_i == PQ_GS_BFLY)) ? mul_out : sub_out;

  assign a_o = {{(XLEN-23){1'b0}}, add_out};
  assign b_o = {{(XLEN-23){1'b0}}, bout};
endmodule
