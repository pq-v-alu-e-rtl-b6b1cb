// Self-checking testbench for pq_register_file: random dual writes and triple
// reads against a model array kept in the testbench, including same-register
// writes on both ports (port B wins) and writes to x0 (ignored).
module tb_pq_register_file;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic        rst_n;
  logic [4:0]  ra, rb, rc, wa, wb;
  logic [31:0] da, db, dc, wda, wdb;
  logic        wea, web;
  logic [31:0] model [32];
  int unsigned same_port_writes = 0;

  pq_register_file dut (
    .clk_i(clk), .rst_ni(rst_n),
    .raddr_a_i(ra), .rdata_a_o(da), .raddr_b_i(rb), .rdata_b_o(db), .raddr_c_i(rc), .rdata_c_o(dc),
    .we_a_i(wea), .waddr_a_i(wa), .wdata_a_i(wda), .we_b_i(web), .waddr_b_i(wb), .wdata_b_i(wdb));

  task automatic chk(input string p, input logic [4:0] r, input logic [31:0] got);
    checks++;
    if (got !== model[r]) begin
      failures++;
      $display("FAIL read %s x%0d got %h exp %h", p, r, got, model[r]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    rst_n = 1'b0; wea = 1'b0; web = 1'b0; wa = '0; wb = '0; wda = '0; wdb = '0;
    ra = '0; rb = '0; rc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      ra = 5'($urandom); rb = 5'($urandom); rc = 5'($urandom);
      #1;
      chk("a", ra, da); chk("b", rb, db); chk("c", rc, dc);
      wea = 1'($urandom); web = 1'($urandom);
      wa = 5'($urandom); wb = ($urandom % 8 == 0) ? wa : 5'($urandom);
      wda = $urandom; wdb = $urandom;
      if (wea && web && wa == wb) same_port_writes++;
      @(posedge clk);
      if (wea && wa != 0) model[wa] = wda;
      if (web && wb != 0) model[wb] = wdb;
    end
    checks++;
    if (same_port_writes == 0) begin
      failures++;
      $display("FAIL no write collision was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
