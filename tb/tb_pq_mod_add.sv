// Self-checking testbench for pq_mod_add: random and corner operands for both
// primes, compared with (a + b) % q computed in the testbench.
// It also sweeps all 3329 x 3329 Kyber operand pairs.
module tb_pq_mod_add;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic        kyber;
  logic [22:0] a, b, q, c;
  pq_mod_add dut (.kyber_i(kyber), .a_i(a), .b_i(b), .q_i(q), .c_o(c));

  task automatic check(input logic k, input int unsigned x, input int unsigned y);
    longint unsigned qq, exp;
    qq = k ? 3329 : 8380417;
    kyber = k; q = 23'(qq); a = 23'(x); b = 23'(y);
    @(posedge clk);
    exp = (longint'(x) + longint'(y)) % qq;
    checks++;
    if (64'(c) != exp) begin
      failures++;
      $display("FAIL add k=%0d a=%0d b=%0d got %0d exp %0d", k, x, y, c, exp);
    end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      int unsigned qq;
      qq = (k == 1) ? 3329 : 8380417;
      check(k[0], 0, 0);
      check(k[0], qq - 1, qq - 1);
      check(k[0], qq - 1, 1);
      check(k[0], qq - 1, 0);
      check(k[0], 1, qq - 2);
      for (int i = 0; i < 3000; i++) check(k[0], $urandom % qq, $urandom % qq);
    end
    // exhaustive sweep over all Kyber operand pairs; expected values are kept
    // as running sums so that no division is needed per pair
    begin
      int unsigned bad = 0, r;
      kyber = 1'b1; q = 23'd3329;
      for (int unsigned x = 0; x < 3329; x++) begin
        r = x;
        for (int unsigned y = 0; y < 3329; y++) begin
          a = 23'(x); b = 23'(y);
          #1;
          if (32'(c) != r) bad++;
          r = (r == 3328) ? 0 : r + 1;
        end
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL exhaustive Kyber sweep: %0d wrong results", bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
