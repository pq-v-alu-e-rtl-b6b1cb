// Self-checking testbench for pq_decoder: all ten custom instructions with
// random register fields, standard OP instructions, and encodings that must be
// rejected (unused funct3, funct7 other than 0/1, other opcodes). Expected
// fields are derived from the R-type layout in the testbench.
module tb_pq_decoder;
  import pq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic [31:0] instr;
  pq_dec_t     dec;
  pq_decoder dut (.instr_i(instr), .dec_o(dec));

  function automatic logic [31:0] rtype(input logic [6:0] f7, input logic [4:0] rs2, input logic [4:0] rs1,
                                        input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s instr=%h got %0d exp %0d", what, instr, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] rd, rs1, rs2;
    logic [2:0] f3;
    logic [6:0] f7;
    logic       bfly;
    // the ten custom instructions (Table of the ISA extension)
    for (int n = 0; n < 400; n++) begin
      f3  = 3'(1 + ($urandom % 5));
      f7  = 7'($urandom % 2);
      rd  = 5'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom);
      if (n < 10) begin f3 = 3'(1 + n % 5); f7 = 7'(n / 5); end
      bfly = f3 >= 3'd4;
      instr = rtype(f7, rs2, rs1, f3, rd, 7'b1110111);
      @(posedge clk);
      expect_eq("pq_en", int'(dec.pq_en), 1);
      expect_eq("alu_en", int'(dec.alu_en), 0);
      expect_eq("illegal", int'(dec.illegal), 0);
      expect_eq("op", int'(dec.op), int'(f3));
      expect_eq("kyber", int'(dec.kyber), int'(f7[0]));
      expect_eq("raddr_a", int'(dec.raddr_a), int'(rs1));
      expect_eq("raddr_b", int'(dec.raddr_b), int'(rs2));
      expect_eq("raddr_c", int'(dec.raddr_c), int'(rd));
      expect_eq("we_b", int'(dec.we_b), int'(bfly && rs2 != 0));
      if (bfly) begin
        expect_eq("we_a", int'(dec.we_a), int'(rs1 != 0));
        expect_eq("waddr_a", int'(dec.waddr_a), int'(rs1));
        expect_eq("waddr_b", int'(dec.waddr_b), int'(rs2));
        expect_eq("wa_sel", int'(dec.wa_sel), int'(WA_PQ_A));
      end else begin
        expect_eq("we_a", int'(dec.we_a), int'(rd != 0));
        expect_eq("waddr_a", int'(dec.waddr_a), int'(rd));
        expect_eq("wa_sel", int'(dec.wa_sel), f3 == 3'd1 ? int'(WA_PQ_A) : int'(WA_PQ_B));
      end
    end
    // standard register-register instructions go to the regular ALU
    for (int n = 0; n < 100; n++) begin
      rd = 5'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom); f3 = 3'($urandom);
      f7 = ($urandom % 2) ? 7'b0100000 : 7'b0000000;
      instr = rtype(f7, rs2, rs1, f3, rd, 7'b0110011);
      @(posedge clk);
      expect_eq("op alu_en", int'(dec.alu_en), 1);
      expect_eq("op pq_en", int'(dec.pq_en), 0);
      expect_eq("op we_a", int'(dec.we_a), int'(rd != 0));
      expect_eq("op wa_sel", int'(dec.wa_sel), int'(WA_ALU));
      expect_eq("op we_b", int'(dec.we_b), 0);
      expect_eq("op funct3", int'(dec.funct3), int'(f3));
      expect_eq("op funct7", int'(dec.funct7), int'(f7));
    end
    // rejected encodings
    for (int n = 0; n < 100; n++) begin
      rd = 5'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom);
      case (n % 3)
        0: instr = rtype(7'($urandom % 2), rs2, rs1, (n % 2) ? 3'd0 : 3'(6 + $urandom % 2), rd, 7'b1110111);
        1: instr = rtype(7'(2 + $urandom % 126), rs2, rs1, 3'(1 + $urandom % 5), rd, 7'b1110111);
        default: instr = rtype(7'($urandom), rs2, rs1, 3'($urandom), rd, 7'b0010011);
      endcase
      @(posedge clk);
      expect_eq("bad illegal", int'(dec.illegal), 1);
      expect_eq("bad we_a", int'(dec.we_a), 0);
      expect_eq("bad we_b", int'(dec.we_b), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
