// Self-checking testbench for pq_custom_alu: every operation for both primes
// with random canonical operands; expected a' and b' are computed in the
// testbench with the butterfly equations and the % operator. Upper operand
// bits above the coefficient width are set at random to show they are ignored.
module tb_pq_custom_alu;
  import pq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  pq_op_e      op;
  logic        kyber;
  logic [31:0] a, b, tw, ao, bo;
  pq_custom_alu dut (.op_i(op), .kyber_i(kyber), .a_i(a), .b_i(b), .tw_i(tw), .a_o(ao), .b_o(bo));

  task automatic check(input pq_op_e o, input logic k, input longint unsigned x,
                       input longint unsigned y, input longint unsigned t);
    longint unsigned qq, ea, eb, m, s;
    logic            chk_a, chk_b;
    qq = k ? 3329 : 8380417;
    op = o; kyber = k;
    // garbage above the coefficient width must not matter
    a  = 32'(x) | (k ? ($urandom & 32'hffff_f000) : ($urandom & 32'hff80_0000));
    b  = 32'(y) | (k ? ($urandom & 32'hffff_f000) : ($urandom & 32'hff80_0000));
    tw = 32'(t) | (k ? ($urandom & 32'hffff_f000) : ($urandom & 32'hff80_0000));
    @(posedge clk);
    chk_a = 1'b0; chk_b = 1'b0; ea = 0; eb = 0;
    case (o)
      PQ_MOD_ADD: begin ea = (x + y) % qq; chk_a = 1'b1; end
      PQ_MOD_SUB: begin eb = (x + qq - y) % qq; chk_b = 1'b1; end
      PQ_MOD_MUL: begin eb = (x * y) % qq; chk_b = 1'b1; end
      PQ_CT_BFLY: begin
        m  = (y * t) % qq;
        ea = (x + m) % qq; eb = (x + qq - m) % qq; chk_a = 1'b1; chk_b = 1'b1;
      end
      PQ_GS_BFLY: begin
        s  = (x + qq - y) % qq;
        ea = (x + y) % qq; eb = (s * t) % qq; chk_a = 1'b1; chk_b = 1'b1;
      end
      default: ;
    endcase
    if (chk_a) begin
      checks++;
      if (64'(ao) != ea) begin
        failures++;
        $display("FAIL %s k=%0d a'=%0d exp %0d", o.name(), k, ao, ea);
      end
    end
    if (chk_b) begin
      checks++;
      if (64'(bo) != eb) begin
        failures++;
        $display("FAIL %s k=%0d b'=%0d exp %0d", o.name(), k, bo, eb);
      end
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pq_op_e ops[5] = '{PQ_MOD_ADD, PQ_MOD_SUB, PQ_MOD_MUL, PQ_CT_BFLY, PQ_GS_BFLY};
    for (int k = 0; k < 2; k++) begin
      longint unsigned qq;
      qq = (k == 1) ? 3329 : 8380417;
      foreach (ops[i]) begin
        check(ops[i], k[0], qq - 1, qq - 1, qq - 1);
        check(ops[i], k[0], 0, qq - 1, 1);
        check(ops[i], k[0], qq - 1, 0, qq - 1);
        for (int n = 0; n < 2000; n++)
          check(ops[i], k[0], longint'($urandom) % qq, longint'($urandom) % qq, longint'($urandom) % qq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
