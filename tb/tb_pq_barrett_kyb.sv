// Self-checking testbench for pq_barrett_kyb: every input 0 <= x < 3329^2,
// compared with x % 3329 (kept as a running remainder, so no division is
// needed per input), plus the corner and random cases of the Dilithium test.
module tb_pq_barrett_kyb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;
  localparam longint unsigned Q = 3329;

  logic [23:0] x;
  logic [11:0] z;
  pq_barrett_kyb dut (.x_i(x), .q_i(12'(Q)), .z_o(z));

  task automatic check(input longint unsigned v);
    x = 24'(v);
    @(posedge clk);
    checks++;
    if (64'(z) != v % Q) begin
      failures++;
      $display("FAIL x=%0d got %0d exp %0d", v, z, v % Q);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(Q - 1); check(Q); check(Q + 1); check(2 * Q - 1);
    check(Q * Q - 1); check((Q - 1) * (Q - 1)); check((Q - 1) * (Q - 2));
    for (int i = 0; i < 2000; i++) begin
      longint unsigned m;
      m = longint'($urandom % Q);
      check(m * Q); check(m * Q + Q - 1);
    end
    for (int i = 0; i < 20000; i++)
      check(longint'($urandom % Q) * longint'($urandom % Q));
    // exhaustive sweep; one failure count per wrong value
    begin
      longint unsigned r = 0;
      int unsigned bad = 0;
      for (longint unsigned v = 0; v < Q * Q; v++) begin
        x = 24'(v);
        #1;
        if (64'(z) != r) bad++;
        r = (r == Q - 1) ? 0 : r + 1;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL exhaustive sweep: %0d wrong results", bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
