// Instruction decoder for the custom ALU extension.
//
// Recognises the ten custom R-type instructions (opcode 1110111; funct3 001
// add, 010 sub, 011 mul, 100 Cooley-Tukey butterfly, 101 Gentleman-Sande
// butterfly; funct7 0000000 for Dilithium, 0000001 for Kyber) and the standard
// register-register OP instructions, which go to the regular ALU. For the
// arithmetic instructions the result goes to rd through write port A. For the
// butterflies the twiddle factor is read from rd on the third read port, and
// a' and b' are written back to rs1 (port A) and rs2 (port B). Any other
// encoding is flagged illegal and writes nothing; writes to x0 are dropped.
// With BFLY_EN = 0 (the variant without single-cycle butterflies) the two
// butterfly encodings are rejected as well.
// The field layout follows the standard R-type format. Purely combinational.
// The encodings and the register roles of the butterflies follow PQ.V.ALU.E;
// the rejection of other encodings is this design's choice.
module pq_decoder
  import pq_pkg::*;
#(
  parameter bit BFLY_EN = 1'b1  // 0: the butterfly encodings are rejected
) (
  input  logic [31:0] instr_i,
  output pq_dec_t     dec_o
);
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic [4:0] rd, rs1, rs2;
  logic       pq_f3_ok, pq_f7_ok, bfly;

  always_comb begin
    opcode = instr_i[6:0];
    rd     = instr_i[11:7];
    funct3 = instr_i[14:12];
    rs1    = instr_i[19:15];
    rs2    = instr_i[24:20];
    funct7 = instr_i[31:25];

    pq_f3_ok = (funct3 inside {3'b001, 3'b010, 3'b011}) ||
               (BFLY_EN && funct3 inside {3'b100, 3'b101});
    pq_f7_ok = funct7[6:1] == 6'd0;
    bfly     = funct3 inside {3'b100, 3'b101};

    dec_o         = '0;
    dec_o.op      = PQ_NONE;
    dec_o.wa_sel  = WA_ALU;
    dec_o.funct3  = funct3;
    dec_o.funct7  = funct7;
    dec_o.raddr_a = rs1;
    dec_o.raddr_b = rs2;
    dec_o.raddr_c = rd;

    if (opcode == OPC_PQ && pq_f3_ok && pq_f7_ok) begin
      dec_o.pq_en = 1'b1;
      dec_o.op    = pq_op_e'(funct3);
      dec_o.kyber = funct7[0];
      if (bfly) begin
        dec_o.we_a    = rs1 != 5'd0;
        dec_o.waddr_a = rs1;
        dec_o.wa_sel  = WA_PQ_A;
        dec_o.we_b    = rs2 != 5'd0;
        dec_o.waddr_b = rs2;
      end else begin
        dec_o.we_a    = rd != 5'd0;
        dec_o.waddr_a = rd;
        dec_o.wa_sel  = (funct3 == 3'b001) ? WA_PQ_A : WA_PQ_B;
      end
    end else if (opcode == OPC_OP) begin
      dec_o.alu_en  = 1'b1;
      dec_o.we_a    = rd != 5'd0;
      dec_o.waddr_a = rd;
    end else begin
      dec_o.illegal = 1'b1;
    end
  end
endmodule
