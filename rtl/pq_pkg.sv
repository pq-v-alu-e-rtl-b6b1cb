// Shared constants and types of the post-quantum custom ALU extension.
//
// The two primes are those of CRYSTALS-Dilithium (q = 8380417 = 2^23 - 2^13 + 1)
// and CRYSTALS-Kyber (q = 3329 = 2^11 + 2^10 + 2^8 + 1). All coefficients are
// kept in the canonical range [0, q-1]. The ten custom instructions are R-type
// with the custom opcode 1110111; funct3 selects the operation and bit 0 of
// funct7 selects the scheme (0 = Dilithium, 1 = Kyber). The decoded-instruction
// structure and its write-port A source select are this design's own choice.
package pq_pkg;

  localparam logic [22:0]      Q_DIL   = 23'd8380417;
  localparam logic [11:0]      Q_KYB   = 12'd3329;
  localparam logic [12:0]      MU_KYB  = 13'd5039;     // floor(2^24 / 3329)

  localparam logic [6:0]       OPC_PQ  = 7'b1110111;   // custom ALU instructions
  localparam logic [6:0]       OPC_OP  = 7'b0110011;   // standard register-register ops

  // funct3 field of the custom instructions
  typedef enum logic [2:0] {
    PQ_NONE     = 3'b000,
    PQ_MOD_ADD  = 3'b001,
    PQ_MOD_SUB  = 3'b010,
    PQ_MOD_MUL  = 3'b011,
    PQ_CT_BFLY  = 3'b100,
    PQ_GS_BFLY  = 3'b101
  } pq_op_e;

  // source of the data on register-file write port A
  typedef enum logic [1:0] {
    WA_ALU  = 2'd0,   // regular ALU result
    WA_PQ_A = 2'd1,   // custom ALU output a' (modular adder)
    WA_PQ_B = 2'd2    // custom ALU output b' (multiplier or subtractor)
  } wa_sel_e;

  typedef struct packed {
    logic          alu_en;     // standard OP instruction for the regular ALU
    logic          pq_en;      // custom ALU instruction
    logic          illegal;    // unsupported encoding, writes nothing
    pq_op_e        op;
    logic          kyber;      // funct7[0]
    logic [2:0]    funct3;
    logic [6:0]    funct7;
    logic [4:0]    raddr_a;    // rs1
    logic [4:0]    raddr_b;    // rs2
    logic [4:0]    raddr_c;    // rd, read as the twiddle factor
    logic          we_a;
    logic [4:0]    waddr_a;    // rd, or rs1 for a butterfly
    wa_sel_e       wa_sel;
    logic          we_b;       // butterflies only
    logic [4:0]    waddr_b;    // rs2
  } pq_dec_t;

endpackage
