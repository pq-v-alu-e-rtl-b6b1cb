// Execute-path slice of a 4-stage RISC-V core extended with a post-quantum
// custom ALU (modular arithmetic and NTT butterflies for Dilithium and Kyber).
//
// Pipeline, one instruction per cycle, no stalls:
//   IF/ID  the issued instruction word is registered.
//   ID     the decoder produces register addresses and controls; the 3-read /
//          2-write register file supplies rs1, rs2 and rd (the twiddle). A
//          write that lands on the register file in this same cycle is
//          forwarded to the operand instead of the stale register value.
//   ID/EX  operands and controls are registered. The custom ALU and the
//          regular ALU see the same operand registers.
//   EX     the custom ALU (combinational) and the regular ALU run in parallel.
//          Write port A takes the regular ALU result, a' or b'; write port B
//          takes b' of a butterfly or, when no butterfly is writing, a load
//          result from the load/store unit. Both are written at the end of EX.
// An instruction presented on instr_i in cycle t writes the register file at
// the end of cycle t+2; the wa_*/wb_* outputs show those writes.
//
// The regular ALU, the load/store unit, fetch and the hazard control belong to
// the base core and are outside this module: the regular ALU gets its operands
// from alu_operand_*_o and returns a combinational alu_result_i; the load
// unit writes through lsu_*_i and must not do so in a cycle in which a
// butterfly in EX writes port B (checked by an assertion). Forwarding, the
// port-B priority and the handling of non-R-type instructions (flagged
// illegal, no write) are this design's own choices. BFLY_EN = 0 gives the
// variant without single-cycle butterflies: their encodings are rejected and
// the third read port is left idle.
module pqvalue_core
  import pq_pkg::*;
#(
  parameter int unsigned XLEN     = 32,
  parameter int unsigned NUM_REGS = 32,
  // 1: single-cycle butterfly instructions, using the third read port and
  //    the second write port; 0: modular add / sub / mul only, so custom
  //    instructions use two read ports and one write port
  parameter bit          BFLY_EN  = 1'b1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  // instruction issue
  input  logic            instr_valid_i,
  input  logic [31:0]     instr_i,
  // load write-back from the load/store unit (write port B)
  input  logic            lsu_we_i,
  input  logic [4:0]      lsu_waddr_i,
  input  logic [XLEN-1:0] lsu_wdata_i,
  // regular ALU of the base core
  output logic            alu_en_o,
  output logic [XLEN-1:0] alu_operand_a_o,
  output logic [XLEN-1:0] alu_operand_b_o,
  output logic [2:0]      alu_funct3_o,
  output logic [6:0]      alu_funct7_o,
  input  logic [XLEN-1:0] alu_result_i,
  // register-file writes of this cycle
  output logic            wa_we_o,
  output logic [4:0]      wa_addr_o,
  output logic [XLEN-1:0] wa_data_o,
  output logic            wb_we_o,
  output logic [4:0]      wb_addr_o,
  output logic [XLEN-1:0] wb_data_o,
  // status
  output logic            illegal_o,
  output logic            fwd_o
);
  // ---------------------------------------------------------------- IF/ID
  logic        if_id_valid;
  logic [31:0] if_id_instr;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      if_id_valid <= 1'b0;
      if_id_instr <= '0;
    end else begin
      if_id_valid <= instr_valid_i;
      if (instr_valid_i) if_id_instr <= instr_i;
    end
  end

  // ---------------------------------------------------------------- ID
  pq_dec_t         dec;
  logic [XLEN-1:0] rf_a, rf_b, rf_c;
  logic [XLEN-1:0] op_a, op_b, op_c;
  logic            fwd_a, fwd_b, fwd_c;

  // write ports, driven from EX below
  logic            we_a, we_b;
  logic [4:0]      waddr_a, waddr_b;
  logic [XLEN-1:0] wdata_a, wdata_b;

  pq_decoder #(.BFLY_EN(BFLY_EN)) u_dec (.instr_i(if_id_instr), .dec_o(dec));

  pq_register_file #(.XLEN(XLEN), .NUM_REGS(NUM_REGS)) u_rf (
    .clk_i, .rst_ni,
    .raddr_a_i(dec.raddr_a), .rdata_a_o(rf_a),
    .raddr_b_i(dec.raddr_b), .rdata_b_o(rf_b),
    .raddr_c_i(BFLY_EN ? dec.raddr_c : 5'd0), .rdata_c_o(rf_c),
    .we_a_i(we_a), .waddr_a_i(waddr_a), .wdata_a_i(wdata_a),
    .we_b_i(we_b), .waddr_b_i(waddr_b), .wdata_b_i(wdata_b)
  );

  // operand forwarding from the writes of this cycle (port B has priority,
  // as in the register file)
  function automatic logic [XLEN:0] fwd(input logic [4:0] ra, input logic [XLEN-1:0] rf);
    if (ra != 5'd0 && we_b && waddr_b == ra) return {1'b1, wdata_b};
    if (ra != 5'd0 && we_a && waddr_a == ra) return {1'b1, wdata_a};
    return {1'b0, rf};
  endfunction

  always_comb begin
    {fwd_a, op_a} = fwd(dec.raddr_a, rf_a);
    {fwd_b, op_b} = fwd(dec.raddr_b, rf_b);
    {fwd_c, op_c} = fwd(dec.raddr_c, rf_c);
  end

  // ---------------------------------------------------------------- ID/EX
  logic            ex_valid;
  pq_dec_t         ex_dec;
  logic [XLEN-1:0] ex_a, ex_b, ex_c;
  logic            ex_fwd;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ex_valid <= 1'b0;
      ex_dec   <= '0;
      ex_a     <= '0;
      ex_b     <= '0;
      ex_c     <= '0;
      ex_fwd   <= 1'b0;
    end else begin
      ex_valid <= if_id_valid;
      ex_fwd   <= if_id_valid && ((fwd_a && (dec.pq_en || dec.alu_en)) ||
                                  (fwd_b && (dec.pq_en || dec.alu_en)) ||
                                  (fwd_c && dec.pq_en && dec.op inside {PQ_CT_BFLY, PQ_GS_BFLY}));
      if (if_id_valid) begin
        ex_dec <= dec;
        ex_a   <= op_a;
        ex_b   <= op_b;
        ex_c   <= op_c;
      end
    end
  end

  // ---------------------------------------------------------------- EX
  logic [XLEN-1:0] pq_a, pq_b;

  pq_custom_alu #(.XLEN(XLEN), .BFLY_EN(BFLY_EN)) u_pq_alu (
    .op_i(ex_dec.op), .kyber_i(ex_dec.kyber),
    .a_i(ex_a), .b_i(ex_b), .tw_i(ex_c),
    .a_o(pq_a), .b_o(pq_b)
  );

  assign alu_en_o        = ex_valid && ex_dec.alu_en;
  assign alu_operand_a_o = ex_a;
  assign alu_operand_b_o = ex_b;
  assign alu_funct3_o    = ex_dec.funct3;
  assign alu_funct7_o    = ex_dec.funct7;

  // write-port multiplexers
  logic ex_wb_bfly;

  always_comb begin
    we_a    = ex_valid && ex_dec.we_a;
    waddr_a = ex_dec.waddr_a;
    unique case (ex_dec.wa_sel)
      WA_PQ_A: wdata_a = pq_a;
      WA_PQ_B: wdata_a = pq_b;
      default: wdata_a = alu_result_i;
    endcase

    ex_wb_bfly = ex_valid && ex_dec.we_b;
    we_b       = ex_wb_bfly || lsu_we_i;
    waddr_b    = ex_wb_bfly ? ex_dec.waddr_b : lsu_waddr_i;
    wdata_b    = ex_wb_bfly ? pq_b : lsu_wdata_i;
  end

  assign wa_we_o   = we_a;
  assign wa_addr_o = waddr_a;
  assign wa_data_o = wdata_a;
  assign wb_we_o   = we_b && waddr_b != 5'd0;
  assign wb_addr_o = waddr_b;
  assign wb_data_o = wdata_b;
  assign illegal_o = ex_valid && ex_dec.illegal;
  assign fwd_o     = ex_valid && ex_fwd;

  // the load unit may not write while a butterfly in EX owns write port B
  a_port_b_free: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(ex_wb_bfly && lsu_we_i));
endmodule
