// Register file with three read ports and two write ports.
//
// NUM_REGS registers of XLEN bits; register 0 always reads zero and is never
// written. Reads are combinational. Both write ports write on the rising clock
// edge; when both address the same register, port B wins. The third read port
// and the second write port let a butterfly instruction read a, b and the
// twiddle and write a' and b' in a single cycle. Reset clears all registers.
// Three read and two write ports follow PQ.V.ALU.E (as in PULPino); the
// collision priority and reset behaviour are this design's choice.
module pq_register_file #(
  parameter int unsigned XLEN     = 32,
  parameter int unsigned NUM_REGS = 32,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic [AW-1:0]   raddr_a_i,
  output logic [XLEN-1:0] rdata_a_o,
  input  logic [AW-1:0]   raddr_b_i,
  output logic [XLEN-1:0] rdata_b_o,
  input  logic [AW-1:0]   raddr_c_i,
  output logic [XLEN-1:0] rdata_c_o,
  input  logic            we_a_i,
  input  logic [AW-1:0]   waddr_a_i,
  input  logic [XLEN-1:0] wdata_a_i,
  input  logic            we_b_i,
  input  logic [AW-1:0]   waddr_b_i,
  input  logic [XLEN-1:0] wdata_b_i
);
  logic [XLEN-1:0] mem [NUM_REGS];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NUM_REGS; i++) mem[i] <= '0;
    end else begin
      for (int i = 1; i < NUM_REGS; i++) begin
        if (we_b_i && waddr_b_i == AW'(i))      mem[i] <= wdata_b_i;
        else if (we_a_i && waddr_a_i == AW'(i)) mem[i] <= wdata_a_i;
      end
    end
  end

  assign rdata_a_o = mem[raddr_a_i];
  assign rdata_b_o = mem[raddr_b_i];
  assign rdata_c_o = mem[raddr_c_i];
endmodule
