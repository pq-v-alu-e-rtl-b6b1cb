// End-to-end testbench for pqvalue_core at its default size.
//
// The testbench plays the rest of the processor: it issues instruction words,
// performs loads through the load write-back port, models the regular ALU
// (RV32I register-register operations) and reads results back from the
// register writes the core reports (its "stores"). Programs are built as lists
// of per-cycle slots and run:
//   * Dilithium forward NTT with the single-cycle Cooley-Tukey instruction,
//     four layers merged per pass (16 coefficients + 15 twiddles in x1..x31);
//   * Dilithium inverse NTT with the single-cycle Gentleman-Sande instruction
//     followed by a pointwise multiplication by 256^-1;
//   * Kyber forward NTT (4 + 3 merged layers), single-cycle butterflies;
//   * Kyber forward and inverse NTT and Dilithium NTT built from three-
//     instruction butterflies (mod_mul / mod_sub / mod_add, 3 merged layers);
//   * pointwise add, sub and mul of polynomials for both primes;
//   * directed and random instruction streams mixing regular-ALU and custom
//     instructions, loads, and unsupported encodings.
// Checks: every cycle the core's register writes (enable, register, data), its
// forwarding flag and its illegal flag are compared with an instruction-level
// model that knows the 2-cycle issue-to-write latency; transform outputs are
// compared with a reference NTT and with direct evaluation of the input
// polynomial at the roots; inverse transforms must return the input; the
// number of butterfly cycles of a single-cycle Dilithium NTT must be 1024, of
// a Kyber NTT 896 and of a Dilithium NTT from three-instruction butterflies
// 3072. Twiddles stay in their registers from one batch to the next when they
// are the same, so each is loaded once, and the whole single-cycle Dilithium
// (Kyber) NTT program must take 2367 (2143) cycles: one per load, store and
// butterfly, plus two drain cycles per batch. Every instruction kind, forwarding into each read port,
// load write-backs, regular-ALU results and rejected encodings must each occur.
module tb_pqvalue_core;
  import pq_pkg::*;

  localparam longint unsigned QD = 8380417;
  localparam longint unsigned QK = 3329;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic        rst_n;
  logic        instr_valid;
  logic [31:0] instr;
  logic        lsu_we;
  logic [4:0]  lsu_waddr;
  logic [31:0] lsu_wdata;
  logic        alu_en;
  logic [31:0] alu_a, alu_b, alu_res;
  logic [2:0]  alu_f3;
  logic [6:0]  alu_f7;
  logic        wa_we, wb_we, illegal, fwd;
  logic [4:0]  wa_addr, wb_addr;
  logic [31:0] wa_data, wb_data;

  pqvalue_core dut (
    .clk_i(clk), .rst_ni(rst_n),
    .instr_valid_i(instr_valid), .instr_i(instr),
    .lsu_we_i(lsu_we), .lsu_waddr_i(lsu_waddr), .lsu_wdata_i(lsu_wdata),
    .alu_en_o(alu_en), .alu_operand_a_o(alu_a), .alu_operand_b_o(alu_b),
    .alu_funct3_o(alu_f3), .alu_funct7_o(alu_f7), .alu_result_i(alu_res),
    .wa_we_o(wa_we), .wa_addr_o(wa_addr), .wa_data_o(wa_data),
    .wb_we_o(wb_we), .wb_addr_o(wb_addr), .wb_data_o(wb_data),
    .illegal_o(illegal), .fwd_o(fwd));

  // ------------------------------------------------------------ regular ALU
  function automatic logic [31:0] rv_alu(input logic [2:0] f3, input logic [6:0] f7,
                                         input logic [31:0] a, input logic [31:0] b);
    case (f3)
      3'd0:    return f7[5] ? a - b : a + b;
      3'd1:    return a << b[4:0];
      3'd2:    return {31'd0, $signed(a) < $signed(b)};
      3'd3:    return {31'd0, a < b};
      3'd4:    return a ^ b;
      3'd5:    return f7[5] ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
      3'd6:    return a | b;
      default: return a & b;
    endcase
  endfunction

  assign alu_res = rv_alu(alu_f3, alu_f7, alu_a, alu_b);

  // ------------------------------------------------------------ arithmetic
  function automatic longint unsigned modpow(input longint unsigned b, input longint unsigned e,
                                             input longint unsigned q);
    longint unsigned r = 1;
    b = b % q;
    while (e != 0) begin
      if (e[0]) r = (r * b) % q;
      b = (b * b) % q;
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic int brv(input int k, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (k[i]) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  longint unsigned zeta_d [256];   // 1753^brv8(k) mod 8380417
  longint unsigned zeta_k [128];   // 17^brv7(k) mod 3329

  // ------------------------------------------------------------ programs
  typedef enum logic [2:0] {S_NOP, S_INSTR, S_LOAD_MEM, S_LOAD_CONST, S_STORE} slot_kind_e;
  typedef struct {
    slot_kind_e  kind;
    logic [31:0] instr;
    logic [4:0]  r;
    int          addr;
    logic [31:0] val;
  } slot_t;

  slot_t           prog [$];
  logic [31:0]     tw_cache [32];        // twiddle the program last loaded per register
  logic            tw_valid [32];
  logic [31:0]     mem  [1024];          // data memory of the test programs

  function automatic logic [31:0] rtype(input logic [6:0] f7, input logic [4:0] rs2, input logic [4:0] rs1,
                                        input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction

  function automatic logic [31:0] pqi(input pq_op_e op, input bit kyb, input int rd, input int rs1, input int rs2);
    return rtype({6'd0, kyb}, 5'(rs2), 5'(rs1), op, 5'(rd), OPC_PQ);
  endfunction

  task automatic emit(input slot_kind_e k, input logic [31:0] i, input int r, input int a, input logic [31:0] v);
    slot_t s;
    s.kind = k; s.instr = i; s.r = 5'(r); s.addr = a; s.val = v;
    prog.push_back(s);
  endtask
  task automatic emit_instr(input logic [31:0] i);          emit(S_INSTR, i, 0, 0, 0);        endtask
  task automatic emit_load(input int r, input int a);        emit(S_LOAD_MEM, 0, r, a, 0);     endtask
  task automatic emit_const(input int r, input logic [31:0] v); emit(S_LOAD_CONST, 0, r, 0, v); endtask
  task automatic emit_store(input int r, input int a);       emit(S_STORE, 0, r, a, 0);        endtask
  task automatic emit_nop(input int n);  for (int i = 0; i < n; i++) emit(S_NOP, 0, 0, 0, 0);  endtask

  // One pass of merged NTT layers lo .. lo+L-1 over the polynomial at mbase.
  // Coefficients j = base + s*i (i < 2^L) of a batch live in x1..x(2^L); the
  // twiddles of the batch follow them; x(2^(L+1)) is the temporary of the
  // three-instruction butterflies.
  task automatic gen_pass(input bit kyb, input bit inv, input bit single, input int mbase,
                          input int lo, input int L);
    int s, span, n, tmp;
    longint unsigned q;
    q    = kyb ? QK : QD;
    s    = 128 >> (lo + L - 1);
    span = s << L;
    n    = 1 << L;
    tmp  = 2 * n;
    foreach (tw_valid[r]) tw_valid[r] = 1'b0;
    for (int hi = 0; hi < 256 / span; hi++) begin
      for (int off = 0; off < s; off++) begin
        int base, ntw;
        int twreg [int];
        int bf_a [$], bf_b [$], bf_t [$];
        base = hi * span + off;
        ntw  = 0;
        for (int i = 0; i < n; i++) emit_load(1 + i, mbase + base + s * i);
        for (int m = 0; m < L; m++) begin
          int l, len, step;
          l    = inv ? lo + L - 1 - m : lo + m;
          len  = 128 >> l;
          step = len / s;
          for (int i = 0; i < n; i++) begin
            if ((i & step) == 0) begin
              int j, g, k;
              longint unsigned z;
              j = base + s * i;
              g = j / (2 * len);
              k = inv ? (2 << l) - 1 - g : (1 << l) + g;
              if (!twreg.exists(k)) begin
                z = kyb ? zeta_k[k] : zeta_d[k];
                if (inv) z = q - z;
                twreg[k] = n + 1 + ntw;
                ntw++;
                // a twiddle already in place from the previous batch is kept
                if (!tw_valid[twreg[k]] || tw_cache[twreg[k]] != 32'(z)) begin
                  emit_const(twreg[k], 32'(z));
                  tw_cache[twreg[k]] = 32'(z);
                  tw_valid[twreg[k]] = 1'b1;
                end
              end
              bf_a.push_back(1 + i);
              bf_b.push_back(1 + i + step);
              bf_t.push_back(twreg[k]);
            end
          end
        end
        foreach (bf_a[x]) begin
          if (single)
            emit_instr(pqi(inv ? PQ_GS_BFLY : PQ_CT_BFLY, kyb, bf_t[x], bf_a[x], bf_b[x]));
          else if (!inv) begin
            emit_instr(pqi(PQ_MOD_MUL, kyb, tmp, bf_t[x], bf_b[x]));
            emit_instr(pqi(PQ_MOD_SUB, kyb, bf_b[x], bf_a[x], tmp));
            emit_instr(pqi(PQ_MOD_ADD, kyb, bf_a[x], bf_a[x], tmp));
          end else begin
            emit_instr(pqi(PQ_MOD_SUB, kyb, tmp, bf_a[x], bf_b[x]));
            emit_instr(pqi(PQ_MOD_ADD, kyb, bf_a[x], bf_a[x], bf_b[x]));
            emit_instr(pqi(PQ_MOD_MUL, kyb, bf_b[x], bf_t[x], tmp));
          end
        end
        emit_nop(2);
        for (int i = 0; i < n; i++) emit_store(1 + i, mbase + base + s * i);
      end
    end
  endtask

  task automatic gen_ntt(input bit kyb, input bit inv, input bit single, input int mbase, input int passes [$]);
    int nl, cur;
    nl  = kyb ? 7 : 8;
    cur = inv ? nl : 0;
    foreach (passes[p]) begin
      if (inv) begin
        cur -= passes[p];
        gen_pass(kyb, inv, single, mbase, cur, passes[p]);
      end else begin
        gen_pass(kyb, inv, single, mbase, cur, passes[p]);
        cur += passes[p];
      end
    end
  endtask

  // dst = a op b (or a op const when bbase < 0), 15 coefficients per batch
  task automatic gen_pointwise(input pq_op_e op, input bit kyb, input int abase, input int bbase,
                               input logic [31:0] cval, input int dbase);
    for (int st = 0; st < 256; st += 15) begin
      int n;
      n = (256 - st < 15) ? 256 - st : 15;
      if (bbase < 0) emit_const(31, cval);
      for (int i = 0; i < n; i++) emit_load(1 + i, abase + st + i);
      if (bbase >= 0) for (int i = 0; i < n; i++) emit_load(16 + i, bbase + st + i);
      for (int i = 0; i < n; i++) emit_instr(pqi(op, kyb, 1 + i, 1 + i, bbase < 0 ? 31 : 16 + i));
      emit_nop(2);
      for (int i = 0; i < n; i++) emit_store(1 + i, dbase + st + i);
    end
  endtask

  // ------------------------------------------------------------ cycle model
  logic [31:0] exp_r [32];     // registers as the instruction model expects them
  logic [31:0] dut_r [32];     // registers as the core reported writing them
  logic [31:0] hist_i [2];
  logic        hist_v [2];
  logic [31:0] prev_w [$];     // registers written in the previous cycle

  int unsigned n_kind [2][8];  // [kyber][funct3] executed custom instructions
  int unsigned n_alu = 0, n_load = 0, n_illegal = 0, n_bfly_cycles = 0;
  int unsigned n_fwd [3] = '{0, 0, 0};
  int unsigned n_bfly_port_b = 0;
  int unsigned n_pq_cycles = 0;    // cycles with a custom instruction in EX

  task automatic step(input slot_t s);
    logic [31:0] ex_i, a, b, t, mask;
    logic        ex_v;
    logic [6:0]  opc, f7;
    logic [2:0]  f3;
    logic [4:0]  rd, rs1, rs2;
    longint unsigned q, m, sd;
    logic        ewa, ewb, eill, efwd, bfly;
    logic [4:0]  ewa_a, ewb_a;
    logic [31:0] ewa_d, ewb_d;
    logic [4:0]  srcs [$];
    logic [31:0] cur_w [$];

    @(negedge clk);
    instr_valid = s.kind == S_INSTR;
    instr       = s.instr;
    lsu_we      = s.kind inside {S_LOAD_MEM, S_LOAD_CONST};
    lsu_waddr   = s.r;
    lsu_wdata   = (s.kind == S_LOAD_MEM) ? mem[s.addr] : s.val;
    if (s.kind == S_STORE) mem[s.addr] = dut_r[s.r];
    ex_v = hist_v[1]; ex_i = hist_i[1];
    hist_v[1] = hist_v[0]; hist_i[1] = hist_i[0];
    hist_v[0] = instr_valid; hist_i[0] = instr;
    #1;

    ewa = 1'b0; ewb = 1'b0; eill = 1'b0; efwd = 1'b0; bfly = 1'b0;
    ewa_a = '0; ewb_a = '0; ewa_d = '0; ewb_d = '0;
    opc = ex_i[6:0]; rd = ex_i[11:7]; f3 = ex_i[14:12]; rs1 = ex_i[19:15]; rs2 = ex_i[24:20]; f7 = ex_i[31:25];
    if (ex_v) begin
      if (opc == 7'b1110111 && f3 >= 3'd1 && f3 <= 3'd5 && f7[6:1] == 6'd0) begin
        q    = f7[0] ? QK : QD;
        mask = f7[0] ? 32'hfff : 32'h7fffff;
        a = exp_r[rs1] & mask; b = exp_r[rs2] & mask; t = exp_r[rd] & mask;
        n_kind[f7[0]][f3]++;
        n_pq_cycles++;
        srcs = '{rs1, rs2};
        case (f3)
          3'd1: begin ewa = 1'b1; ewa_a = rd; ewa_d = 32'((64'(a) + 64'(b)) % q); end
          3'd2: begin ewa = 1'b1; ewa_a = rd; ewa_d = 32'((64'(a) + q - 64'(b)) % q); end
          3'd3: begin ewa = 1'b1; ewa_a = rd; ewa_d = 32'((64'(a) * 64'(b)) % q); end
          3'd4: begin
            m = (64'(b) * 64'(t)) % q;
            ewa = 1'b1; ewa_a = rs1; ewa_d = 32'((64'(a) + m) % q);
            ewb = 1'b1; ewb_a = rs2; ewb_d = 32'((64'(a) + q - m) % q);
            bfly = 1'b1;
          end
          default: begin
            sd = (64'(a) + q - 64'(b)) % q;
            ewa = 1'b1; ewa_a = rs1; ewa_d = 32'((64'(a) + 64'(b)) % q);
            ewb = 1'b1; ewb_a = rs2; ewb_d = 32'((sd * 64'(t)) % q);
            bfly = 1'b1;
          end
        endcase
        if (bfly) srcs.push_back(rd);
      end else if (opc == 7'b0110011) begin
        ewa = 1'b1; ewa_a = rd; ewa_d = rv_alu(f3, f7, exp_r[rs1], exp_r[rs2]);
        srcs = '{rs1, rs2};
        n_alu++;
      end else begin
        eill = 1'b1;
        n_illegal++;
      end
      foreach (srcs[x])
        if (srcs[x] != 0 && srcs[x] inside {prev_w}) begin
          efwd = 1'b1;
          n_fwd[x]++;
        end
    end
    if (ewa && ewa_a == 0) ewa = 1'b0;
    if (ewb && ewb_a == 0) ewb = 1'b0;
    if (bfly) n_bfly_cycles++;
    if (lsu_we) begin
      if (ewb) begin
        failures++;
        $display("FAIL test program loads while a butterfly writes port B");
      end
      ewb = lsu_waddr != 0; ewb_a = lsu_waddr; ewb_d = lsu_wdata;
      n_load++;
    end

    // compare the core with the model
    checks++;
    if (wa_we != ewa || (ewa && (wa_addr != ewa_a || wa_data != ewa_d))) begin
      failures++;
      $display("FAIL %0t port A: we=%0d x%0d=%h, expected we=%0d x%0d=%h (instr %h)",
               $time, wa_we, wa_addr, wa_data, ewa, ewa_a, ewa_d, ex_i);
    end
    checks++;
    if (wb_we != ewb || (ewb && (wb_addr != ewb_a || wb_data != ewb_d))) begin
      failures++;
      $display("FAIL %0t port B: we=%0d x%0d=%h, expected we=%0d x%0d=%h (instr %h)",
               $time, wb_we, wb_addr, wb_data, ewb, ewb_a, ewb_d, ex_i);
    end
    checks++;
    if (illegal != eill || fwd != efwd) begin
      failures++;
      $display("FAIL %0t flags: illegal=%0d fwd=%0d expected %0d %0d (instr %h)",
               $time, illegal, fwd, eill, efwd, ex_i);
    end
    if (bfly && wb_we) n_bfly_port_b++;

    // commit: port B wins over port A on the same register
    if (ewa) begin exp_r[ewa_a] = ewa_d; cur_w.push_back(32'(ewa_a)); end
    if (ewb) begin exp_r[ewb_a] = ewb_d; cur_w.push_back(32'(ewb_a)); end
    if (wa_we && wa_addr != 0) dut_r[wa_addr] = wa_data;
    if (wb_we && wb_addr != 0) dut_r[wb_addr] = wb_data;
    prev_w = cur_w;
  endtask

  task automatic run_prog();
    slot_t idle;
    idle.kind = S_NOP; idle.instr = '0; idle.r = '0; idle.addr = 0; idle.val = '0;
    foreach (prog[i]) step(prog[i]);
    repeat (3) step(idle);
    prog.delete();
  endtask

  // ------------------------------------------------------------ references
  longint unsigned ref_a [256];

  task automatic ref_ntt(input bit kyb, input bit inv);
    longint unsigned q, z, t;
    int k, len, j;
    q = kyb ? QK : QD;
    if (!inv) begin
      k = kyb ? 1 : 0;
      for (len = 128; len >= (kyb ? 2 : 1); len >>= 1)
        for (int start = 0; start < 256; start = j + len) begin
          if (kyb) begin z = zeta_k[k]; k++; end
          else     begin k++; z = zeta_d[k]; end
          for (j = start; j < start + len; j++) begin
            t = (z * ref_a[j + len]) % q;
            ref_a[j + len] = (ref_a[j] + q - t) % q;
            ref_a[j]       = (ref_a[j] + t) % q;
          end
        end
    end else begin
      k = kyb ? 127 : 256;
      for (len = kyb ? 2 : 1; len <= 128; len <<= 1)
        for (int start = 0; start < 256; start = j + len) begin
          if (kyb) begin z = q - zeta_k[k]; k--; end
          else     begin k--; z = q - zeta_d[k]; end
          for (j = start; j < start + len; j++) begin
            t = ref_a[j];
            ref_a[j]       = (t + ref_a[j + len]) % q;
            ref_a[j + len] = (((t + q - ref_a[j + len]) % q) * z) % q;
          end
        end
    end
  endtask

  task automatic cmp_poly(input string what, input int base, input longint unsigned exp [256]);
    int bad = 0;
    for (int i = 0; i < 256; i++) if (64'(mem[base + i]) != exp[i]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d coefficients differ", what, bad);
    end
  endtask

  // NTT output against direct evaluation of the input f at the roots:
  // Dilithium: out[i] = f(z^(2 brv8(i) + 1)), z = 1753.
  // Kyber: (out[2i], out[2i+1]) = f mod (X^2 - z^(2 brv7(i) + 1)), z = 17.
  task automatic cmp_eval(input string what, input bit kyb, input int base, input longint unsigned f [256]);
    int bad = 0;
    if (!kyb) begin
      for (int i = 0; i < 256; i++) begin
        longint unsigned r, acc = 0;
        r = modpow(1753, longint'(2 * brv(i, 8) + 1), QD);
        for (int c = 255; c >= 0; c--) acc = (acc * r + f[c]) % QD;
        if (64'(mem[base + i]) != acc) bad++;
      end
    end else begin
      for (int i = 0; i < 128; i++) begin
        longint unsigned r, e = 0, o = 0;
        r = modpow(17, longint'(2 * brv(i, 7) + 1), QK);
        for (int c = 127; c >= 0; c--) begin
          e = (e * r + f[2 * c]) % QK;
          o = (o * r + f[2 * c + 1]) % QK;
        end
        if (64'(mem[base + 2 * i]) != e || 64'(mem[base + 2 * i + 1]) != o) bad++;
      end
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d outputs differ from evaluation at the roots", what, bad);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ test
  initial begin
    longint unsigned f [256], g [256], e [256];
    int unsigned c0;
    int ps [$];
    bit prev_bfly;

    for (int k = 0; k < 256; k++) zeta_d[k] = modpow(1753, longint'(brv(k, 8)), QD);
    for (int k = 0; k < 128; k++) zeta_k[k] = modpow(17, longint'(brv(k, 7)), QK);
    foreach (exp_r[i]) begin exp_r[i] = '0; dut_r[i] = '0; end
    foreach (mem[i]) mem[i] = '0;
    foreach (n_kind[i, j]) n_kind[i][j] = 0;
    hist_v = '{1'b0, 1'b0}; hist_i = '{32'd0, 32'd0};
    instr_valid = 1'b0; instr = '0; lsu_we = 1'b0; lsu_waddr = '0; lsu_wdata = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- Dilithium forward NTT, single-cycle butterflies, 4 + 4 layers
    for (int i = 0; i < 256; i++) begin f[i] = longint'($urandom) % QD; mem[i] = 32'(f[i]); end
    ps = '{4, 4};
    gen_ntt(1'b0, 1'b0, 1'b1, 0, ps);
    c0 = n_bfly_cycles;
    // 512 coefficient loads + 512 stores + 255 twiddle loads + 1024 butterflies
    // + 2 drain cycles for each of the 32 batches
    checks++;
    if (prog.size() != 2367) begin
      failures++;
      $display("FAIL Dilithium NTT program has %0d cycles, expected 2367", prog.size());
    end
    $display("Dilithium NTT program: %0d cycles", prog.size());
    run_prog();
    checks++;
    if (n_bfly_cycles - c0 != 1024) begin
      failures++;
      $display("FAIL Dilithium NTT took %0d butterfly cycles, expected 1024", n_bfly_cycles - c0);
    end
    ref_a = f; ref_ntt(1'b0, 1'b0);
    cmp_poly("Dilithium NTT vs reference", 0, ref_a);
    cmp_eval("Dilithium NTT", 1'b0, 0, f);
    $display("Dilithium NTT: %0d butterfly cycles", n_bfly_cycles - c0);

    // ---- Dilithium inverse NTT (single-cycle GS) and scaling by 256^-1
    ps = '{4, 4};
    gen_ntt(1'b0, 1'b1, 1'b1, 0, ps);
    gen_pointwise(PQ_MOD_MUL, 1'b0, 0, -1, 32'(modpow(256, QD - 2, QD)), 0);
    run_prog();
    cmp_poly("Dilithium NTT then inverse NTT", 0, f);

    // ---- Dilithium NTT from three-instruction butterflies, 3 + 3 + 2 layers
    for (int i = 0; i < 256; i++) mem[256 + i] = 32'(f[i]);
    ps = '{3, 3, 2};
    gen_ntt(1'b0, 1'b0, 1'b0, 256, ps);
    c0 = n_pq_cycles;
    run_prog();
    checks++;
    if (n_pq_cycles - c0 != 3072) begin
      failures++;
      $display("FAIL three-instruction Dilithium NTT took %0d butterfly cycles, expected 3072", n_pq_cycles - c0);
    end
    ref_a = f; ref_ntt(1'b0, 1'b0);
    cmp_poly("Dilithium NTT (three-instruction butterflies)", 256, ref_a);

    // ---- Kyber forward NTT, single-cycle butterflies, 4 + 3 layers
    for (int i = 0; i < 256; i++) begin g[i] = longint'($urandom) % QK; mem[512 + i] = 32'(g[i]); end
    ps = '{4, 3};
    c0 = n_bfly_cycles;
    gen_ntt(1'b1, 1'b0, 1'b1, 512, ps);
    // 512 loads + 512 stores + 127 twiddle loads + 896 butterflies + 2 x 48 drain
    checks++;
    if (prog.size() != 2143) begin
      failures++;
      $display("FAIL Kyber NTT program has %0d cycles, expected 2143", prog.size());
    end
    $display("Kyber NTT program: %0d cycles", prog.size());
    run_prog();
    checks++;
    if (n_bfly_cycles - c0 != 896) begin
      failures++;
      $display("FAIL Kyber NTT took %0d butterfly cycles, expected 896", n_bfly_cycles - c0);
    end
    ref_a = g; ref_ntt(1'b1, 1'b0);
    cmp_poly("Kyber NTT vs reference", 512, ref_a);
    cmp_eval("Kyber NTT", 1'b1, 512, g);

    // ---- Kyber inverse NTT from three-instruction butterflies, then 128^-1
    ps = '{3, 3, 1};
    gen_ntt(1'b1, 1'b1, 1'b0, 512, ps);
    gen_pointwise(PQ_MOD_MUL, 1'b1, 512, -1, 32'(modpow(128, QK - 2, QK)), 512);
    run_prog();
    cmp_poly("Kyber NTT then inverse NTT", 512, g);

    // ---- Kyber forward NTT from three-instruction butterflies
    ps = '{3, 3, 1};
    gen_ntt(1'b1, 1'b0, 1'b0, 512, ps);
    run_prog();
    ref_a = g; ref_ntt(1'b1, 1'b0);
    cmp_poly("Kyber NTT (three-instruction butterflies)", 512, ref_a);

    // ---- Kyber single-cycle inverse NTT
    ps = '{4, 3};
    gen_ntt(1'b1, 1'b1, 1'b1, 512, ps);
    gen_pointwise(PQ_MOD_MUL, 1'b1, 512, -1, 32'(modpow(128, QK - 2, QK)), 512);
    run_prog();
    cmp_poly("Kyber single-cycle inverse NTT", 512, g);

    // ---- pointwise add / sub / mul, both primes
    for (int kk = 0; kk < 2; kk++) begin
      longint unsigned q;
      q = kk ? QK : QD;
      for (int i = 0; i < 256; i++) begin
        f[i] = longint'($urandom) % q; g[i] = longint'($urandom) % q;
        mem[i] = 32'(f[i]); mem[256 + i] = 32'(g[i]);
      end
      gen_pointwise(PQ_MOD_ADD, kk[0], 0, 256, 0, 512);
      gen_pointwise(PQ_MOD_SUB, kk[0], 0, 256, 0, 768);
      run_prog();
      for (int i = 0; i < 256; i++) e[i] = (f[i] + g[i]) % q;
      cmp_poly("poly add", 512, e);
      for (int i = 0; i < 256; i++) e[i] = (f[i] + q - g[i]) % q;
      cmp_poly("poly sub", 768, e);
      gen_pointwise(PQ_MOD_MUL, kk[0], 0, 256, 0, 512);
      run_prog();
      for (int i = 0; i < 256; i++) e[i] = (f[i] * g[i]) % q;
      cmp_poly("poly mul", 512, e);
    end

    // ---- directed: regular ALU, forwarding from loads and from both ports
    emit_const(1, 32'd5);
    emit_instr(rtype(7'd0, 5'd2, 5'd1, 3'd0, 5'd3, OPC_OP));           // add x3, x1, x2
    emit_const(2, 32'd7);                                              // forwarded into rs2
    emit_instr(rtype(7'b0100000, 5'd1, 5'd3, 3'd0, 5'd4, OPC_OP));     // sub x4, x3, x1
    emit_instr(rtype(7'd0, 5'd2, 5'd4, 3'd4, 5'd5, OPC_OP));           // xor x5, x4, x2
    emit_instr(pqi(PQ_MOD_MUL, 1'b0, 6, 5, 2));                        // mod_mul x6, x5, x2
    emit_instr(pqi(PQ_CT_BFLY, 1'b0, 6, 1, 2));                        // twiddle x6 forwarded
    emit_instr(pqi(PQ_GS_BFLY, 1'b0, 6, 2, 1));                        // a, b forwarded
    emit_instr(rtype(7'd0, 5'd2, 5'd1, 3'd0, 5'd0, 7'b0010011));       // unsupported here
    emit_instr(rtype(7'd0, 5'd2, 5'd1, 3'd6, 5'd7, OPC_PQ));           // unused funct3
    emit_instr(rtype(7'd2, 5'd2, 5'd1, 3'd1, 5'd7, OPC_PQ));           // unused funct7
    emit_instr(pqi(PQ_MOD_ADD, 1'b0, 0, 1, 2));                        // write to x0 dropped
    run_prog();

    // ---- random streams of custom instructions, one prime at a time
    for (int kk = 0; kk < 2; kk++) begin
      longint unsigned q;
      q = kk ? QK : QD;
      for (int r = 1; r < 32; r++) emit_const(r, 32'(longint'($urandom) % q));
      prev_bfly = 1'b0;
      for (int n = 0; n < 3000; n++) begin
        int op, rd, rs1, rs2;
        op  = 1 + ($urandom % 5);
        rd  = 1 + ($urandom % 8); rs1 = 1 + ($urandom % 8); rs2 = 1 + ($urandom % 8);
        if (op >= 4) while (rs2 == rs1) rs2 = 1 + ($urandom % 8);
        if ($urandom % 10 == 0) begin
          emit_nop(1);
          prev_bfly = 1'b0;
        end else if ($urandom % 12 == 0 && op < 4 && !prev_bfly) begin
          // the load lands while the previous instruction is in EX
          emit_instr(pqi(pq_op_e'(op), kk[0], rd, rs1, rs2));
          emit_const(rs1, 32'(longint'($urandom) % q));
          prev_bfly = 1'b0;
        end else begin
          emit_instr(pqi(pq_op_e'(op), kk[0], rd, rs1, rs2));
          prev_bfly = op >= 4;
        end
      end
      run_prog();
    end

    // ---- every mechanism must have happened
    for (int kk = 0; kk < 2; kk++)
      for (int f3 = 1; f3 <= 5; f3++) begin
        checks++;
        if (n_kind[kk][f3] == 0) begin
          failures++;
          $display("FAIL custom instruction funct3=%0d kyber=%0d never executed", f3, kk);
        end
      end
    checks++;
    if (n_alu == 0 || n_load == 0 || n_illegal == 0 || n_fwd[0] == 0 || n_fwd[1] == 0 || n_fwd[2] == 0 ||
        n_bfly_port_b == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("executed: dil add/sub/mul/ct/gs %0d %0d %0d %0d %0d, kyb %0d %0d %0d %0d %0d",
             n_kind[0][1], n_kind[0][2], n_kind[0][3], n_kind[0][4], n_kind[0][5],
             n_kind[1][1], n_kind[1][2], n_kind[1][3], n_kind[1][4], n_kind[1][5]);
    $display("regular ALU %0d, loads %0d, rejected %0d, forwarded rs1/rs2/rd %0d/%0d/%0d, butterfly cycles %0d",
             n_alu, n_load, n_illegal, n_fwd[0], n_fwd[1], n_fwd[2], n_bfly_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
