// Self-checking testbench for pq_barrett_dil: products of random canonical
// values and corner inputs (0, q, q^2-1, multiples of q and their neighbours),
// compared with x % 8380417.
module tb_pq_barrett_dil;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;
  localparam longint unsigned Q = 8380417;

  logic [45:0] x;
  logic [22:0] z;
  pq_barrett_dil dut (.x_i(x), .q_i(23'(Q)), .z_o(z));

  task automatic check(input longint unsigned v);
    x = 46'(v);
    @(posedge clk);
    checks++;
    if (64'(z) != v % Q) begin
      failures++;
      $display("FAIL x=%0d got %0d exp %0d", v, z, v % Q);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
