# PQ.V.ALU.E: a custom ALU for Dilithium and Kyber in a RISC-V pipeline

Lattice-based signatures (CRYSTALS-Dilithium) and key encapsulation (CRYSTALS-Kyber)
spend much of their non-hashing time in polynomial arithmetic modulo a small prime,
above all in the number-theoretic transform (NTT). On a plain RV32IM core one NTT
butterfly takes about 15 cycles, because it needs `mul`, a multi-cycle `mulh` and a
Montgomery reduction. This design adds a small, purely combinational **custom ALU** to
the execute stage of a 4-stage RISC-V pipeline (RI5CY class). With ten new R-type
instructions it does, in one cycle each:

* modular addition, subtraction and multiplication, and
* a complete Cooley-Tukey (forward NTT) or Gentleman-Sande (inverse NTT) butterfly,

for both primes: q = 8 380 417 (Dilithium, 23 bits) and q = 3 329 (Kyber, 12 bits).
One adder, one subtractor and one 23 × 23-bit multiplier serve every operation and both
schemes. Chaining them through a few multiplexers gives the butterflies. A register
file with three read and two write ports lets a butterfly read a, b and the twiddle
factor, and write a′ and b′, in the same cycle.

The RTL follows the arithmetic and the ALU structure of the published PQ.V.ALU.E
design (Barrett reductions, adder and subtractor layout, multiplexer network, instruction
encoding). Its pipeline is only a slice of a processor: fetch, the regular ALU, the
load/store unit and the controller belong to the base core and are reached through
ports (see *What is not here*).

## Instructions

All ten instructions use opcode `1110111`, with the standard R-type fields
(funct7 [31:25], rs2 [24:20], rs1 [19:15], funct3 [14:12], rd [11:7], opcode [6:0]).
Bit 0 of funct7 selects the prime (0 = Dilithium, 1 = Kyber).

| funct3 | mnemonic (`_dil` / `_kyb`) | reads | writes |
|---|---|---|---|
| 001 | `pq.mod_add` | rs1, rs2 | rd = rs1 + rs2 mod q |
| 010 | `pq.mod_sub` | rs1, rs2 | rd = rs1 − rs2 mod q |
| 011 | `pq.mod_mul` | rs1, rs2 | rd = rs1 · rs2 mod q |
| 100 | `pq.ct_btrfly` | a = rs1, b = rs2, ζ = rd | rs1 = a + ζb, rs2 = a − ζb |
| 101 | `pq.gs_btrfly` | a = rs1, b = rs2, ζ = rd | rs1 = a + b, rs2 = ζ(a − b) |

The butterflies read the twiddle from `rd` and write their two results to the source
registers, so a butterfly works in place on two coefficient registers.
Values are in the **canonical range [0, q−1]**, and every instruction keeps them there.
A non-canonical input gives an unspecified result. Operands are cut to 23 bits
(Dilithium) or 12 bits (Kyber) before use, and results are zero-extended to 32 bits.
The funct3 values 000, 110 and 111, and funct7 values other than 0 and 1, are rejected.

## Modular adder and subtractor (`pq_mod_add`, `pq_mod_sub`)

Addition: c′ = a + b (24 bits), then c″ = c′ − q. If that subtraction borrows, c′ was
already below q and is the result; otherwise c″ is. Subtraction is the mirror: c′ = a − b;
on a borrow the result is c′ + q, otherwise c′. The same circuit works for any q < 2²³,
and the two primes differ only in where the borrow is read:

| unit | Dilithium borrow | Kyber borrow |
|---|---|---|
| adder (c′ − q) | bit 24 of the 25-bit difference | bit 13 (a 13-bit subtraction) |
| subtractor (a − b) | bit 24 | bit 12 (a 12-bit subtraction) |

The bit positions are this design's choice. For canonical inputs any position from the
Kyber one upward gives the same answer, so a wrong choice shows only below it. The
testbenches' fault copies use bit 11.

## Modular multiplier and the two Barrett reductions

`pq_mod_mul` holds one 23 × 23 → 46-bit multiplier. The full product feeds the Dilithium
reduction, the low 24 bits feed the Kyber reduction, and `kyber_i` picks the output.
Both reductions follow Barrett, with constants chosen so that every constant
multiplication except one is a few shifts and adds:

**Dilithium** (`pq_barrett_dil`, μ = ⌊2⁴⁶/q⌋ = 8 396 807 = 2²³ + 2¹³ + 2³ − 1,
q = 2²³ − 2¹³ + 1):

    t = ((x<<23) + (x<<13) + (x<<3) − x) >> 46      -- estimate of x / q
    z = x − ((t<<23) − (t<<13) + t)                 -- 0 <= z < 2q
    result = z >= q ? z − q : z

**Kyber** (`pq_barrett_kyb`, μ = ⌊2²⁴/q⌋ = 5 039, q = 2¹¹ + 2¹⁰ + 2⁸ + 1):

    t = (5039 · x) >> 24                            -- constant multiply left to synthesis
    z = x − ((t<<11) + (t<<10) + (t<<8) + t)        -- 0 <= z < 2q
    result = z >= q ? z − q : z

Both are correct for x < q². For that range the estimate t is at most one below ⌊x/q⌋,
so one conditional subtraction is enough. The testbenches check this exhaustively for
Kyber, and for Dilithium at the corners and at random points.
Intermediate widths are the smallest that hold these values (70 bits for x·μ in the
Dilithium path).

## The butterfly datapath (`pq_custom_alu`)

This is the core idea. The Cooley-Tukey butterfly multiplies first and then adds and
subtracts. The Gentleman-Sande butterfly adds and subtracts first and then multiplies.
Instead of two butterfly circuits, the three modular units are wired to each other through
multiplexers on their inputs:

```
             ┌──────────── mul_b: b │ sub_out (GS)
 mul_a: a │ twiddle (CT,GS) ─► [ mod_mul ] ─► mul_out ─┬──► b′ mux (MUL, GS)
                                                        │
 a ──────────────────► [ mod_add ] ◄── add_b: b │ mul_out (CT)  ─► a′
 a ──────────────────► [ mod_sub ] ◄── sub_b: b │ mul_out (CT)  ─► sub_out ─► b′ mux (SUB, CT)
```

| op | multiplier | adder | subtractor | a′ | b′ |
|---|---|---|---|---|---|
| MOD_ADD | — | a + b | — | sum | — |
| MOD_SUB | — | — | a − b | — | difference |
| MOD_MUL | a · b | — | — | — | product |
| CT | ζ · b | a + ζb | a − ζb | sum | difference |
| GS | ζ · (a − b) | a + b | a − b | sum | product |

The longest path is the GS butterfly: subtractor, then multiplier with its Barrett
reduction, then the b′ multiplexer. The CT butterfly runs multiplier → adder/subtractor.
Both must fit into one execute-stage cycle. There are no pipeline registers inside the
ALU.

For the single-operation instructions the result appears on a′ (add) or b′ (sub, mul),
and the core routes it to `rd`.

Because the subtractor can feed the multiplier (GS) and the multiplier can feed the
subtractor (CT), the netlist has a combinational loop. It is a false path: no
operation selects both directions, so the loop is never sensitised. Lint tools flag it
as circular logic. Static timing needs a false-path constraint or case analysis on the
operation select. Removing the loop would cost a second multiplier or subtractor.

## Pipeline integration (`pqvalue_core`)

```
 instr ─► IF/ID ─► decoder ──────────────► ID/EX ─► regular ALU (external) ─┐
                   register file 3R/2W ─► (fwd) ─►   custom ALU ──a′,b′──────┤
                        ▲  ▲                                                 │
          write port A ─┘  └─ write port B ◄── load data (external)          │
                ▲                   ▲                                        │
                └──── ALU │ a′ │ b′ ┴──── b′ of a butterfly ◄────────────────┘
```

* **Timing.** An instruction presented on `instr_i` with `instr_valid_i` in cycle t is
  decoded and reads its operands in t+1, executes in t+2, and is written to the register
  file at the end of t+2. One instruction can issue every cycle and nothing stalls.
  The `wa_*`/`wb_*` outputs show each cycle's writes.
* **Shared operands.** The custom ALU and the regular ALU read the same ID/EX operand
  registers. The twiddle travels in the third operand register (`ex_c`). A RI5CY-class
  core already has that register for its three-operand instructions, so on such a core
  the extension adds only a few control bits to the pipeline registers.
* **Write ports.** Port A writes `rd`, or `rs1` for a butterfly, from the regular ALU, a′
  or b′. Port B writes b′ of a butterfly to `rs2`. Port B also takes load data from the
  load/store unit, which must not write in a cycle when a butterfly in EX owns the port
  (an assertion checks this). If both ports name the same register, port B wins.
* **Forwarding.** A value written in the same cycle as a register read in ID replaces the
  stale value. This works on all three read ports, so back-to-back dependent
  instructions work, including a butterfly whose twiddle was produced by the instruction
  just before it. `fwd_o` flags an instruction in EX whose operands were forwarded.
* **Other instructions.** Standard OP (`0110011`) instructions drive
  `alu_en_o`/`alu_operand_*_o`/`alu_funct*_o`. The base core's ALU returns
  `alu_result_i` in the same cycle, and that result is written to `rd`. Any other
  encoding sets `illegal_o` in EX and writes nothing.
* **Reset** (`rst_ni`, asynchronous, active low) clears the pipeline and all registers.

Writeback at the end of EX, the forwarding paths, the port-B arbitration and the
load-port interface are this design's choices. They model what a RI5CY-class core
provides around the custom ALU.

### Ports of `pqvalue_core`

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i`, `rst_ni` | in | 1 | clock, asynchronous active-low reset |
| `instr_valid_i`, `instr_i` | in | 1, 32 | issue an instruction this cycle |
| `lsu_we_i`, `lsu_waddr_i`, `lsu_wdata_i` | in | 1, 5, 32 | load write-back through port B |
| `alu_en_o`, `alu_operand_a_o`, `alu_operand_b_o`, `alu_funct3_o`, `alu_funct7_o` | out | 1, 32, 32, 3, 7 | request to the regular ALU |
| `alu_result_i` | in | 32 | regular ALU result, combinational |
| `wa_we_o`, `wa_addr_o`, `wa_data_o` | out | 1, 5, 32 | write on port A this cycle |
| `wb_we_o`, `wb_addr_o`, `wb_data_o` | out | 1, 5, 32 | write on port B this cycle |
| `illegal_o` | out | 1 | instruction in EX was rejected |
| `fwd_o` | out | 1 | instruction in EX used a forwarded operand |

Parameters:

* `XLEN` = 32 and `NUM_REGS` = 32: the RV32 register file. The custom ALU works on the
  low 23 bits whatever `XLEN` is.
* `BFLY_EN` = 1: the main configuration, with single-cycle butterflies. `BFLY_EN` = 0
  builds the cheaper variant. It keeps only `mod_add`, `mod_sub` and `mod_mul`, so each
  custom instruction reads two registers and writes one. The butterfly encodings are
  then rejected, and the ALU's chaining multiplexers, its twiddle input and the false
  loop disappear. Butterflies are then three instructions each (next section). The
  same parameter exists on `pq_custom_alu` and `pq_decoder`.

## Using the instructions for an NTT

A 256-point NTT is 8 layers (Dilithium) or 7 layers (Kyber) of 128 butterflies. To save
loads and stores, software merges layers: with 4 merged layers, 16 coefficients and the
15 twiddles they need fill x1…x31. Then 32 `pq.ct_btrfly` instructions run back to back
before the batch is stored. At one butterfly per cycle a Dilithium NTT spends exactly
1 024 cycles in butterflies, and a Kyber NTT 896.

A twiddle is loaded only when the register does not already hold it. In the first pass
all 16 batches share the same 15 twiddles, so each of the 255 (Kyber: 127) twiddles is
loaded once. With one cycle per load and store, the whole transform then takes:

* Dilithium: 512 loads + 512 stores + 255 twiddle loads + 1 024 butterflies + 2 drain
  cycles per batch (the last butterflies are still in the pipeline) = **2 367 cycles**;
* Kyber: 512 + 512 + 127 + 896 + 96 = **2 143 cycles**.

Loop control and stack traffic come on top of that on a real core. The original
RI5CY-based software measured 2 705 cycles for the Dilithium NTT and 2 577 cycles for
the Kyber NTT.

Without the second write port, the same butterfly is three instructions (a temporary
register t):

    CT:  pq.mod_mul t, ζ, b ; pq.mod_sub b, a, t ; pq.mod_add a, a, t
    GS:  pq.mod_sub t, a, b ; pq.mod_add a, a, b ; pq.mod_mul b, ζ, t

This takes 3 × 1 024 = 3 072 butterfly cycles for a Dilithium NTT. The temporary costs a
register, so the test programs merge only three layers in this style.

The inverse NTT uses Gentleman-Sande butterflies with negated twiddles. A final
`pq.mod_mul` by n⁻¹ (256⁻¹ = 8 347 681 mod 8 380 417, 128⁻¹ = 3 303 mod 3 329) restores
the scale.

## Files

| file | contents |
|---|---|
| `rtl/pq_pkg.sv` | primes, opcodes, operation enum, decoded-instruction struct |
| `rtl/pq_mod_add.sv`, `rtl/pq_mod_sub.sv` | modular adder and subtractor |
| `rtl/pq_barrett_dil.sv`, `rtl/pq_barrett_kyb.sv` | Barrett reductions |
| `rtl/pq_mod_mul.sv` | shared multiplier + both reductions |
| `rtl/pq_custom_alu.sv` | the five operations and the multiplexer network |
| `rtl/pq_decoder.sv` | decoder for the custom and OP instructions |
| `rtl/pq_register_file.sv` | 32 × 32 register file, 3 read / 2 write ports |
| `rtl/pqvalue_core.sv` | the pipeline slice (top) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_pqvalue_core_nobfly.sv` | end-to-end test of the `BFLY_EN` = 0 variant |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* Arithmetic units: corner and random canonical operands for both primes, compared with
  `%` arithmetic in the testbench. For Kyber the adder, subtractor and multiplier are
  checked on all 3329 × 3329 operand pairs, and the Kyber Barrett reduction on every
  input below 3329². The Dilithium Barrett test covers multiples of q and their
  neighbours, q² − 1, and random products.
* `tb_pq_custom_alu`: all five operations for both primes, against the butterfly
  equations, with random garbage in the unused upper operand bits.
* `tb_pq_decoder`: all ten encodings with random register fields, OP instructions and
  rejected encodings. `tb_pq_register_file`: random traffic against a model, including
  write collisions.
* `tb_pqvalue_core` (default parameters) plays the rest of the processor. It issues
  instructions, performs loads, models the regular ALU, and compares every register
  write (cycle, port, register, value) and the forward and illegal flags with an
  instruction-level model. It runs these programs:
  * Dilithium NTT and inverse NTT, with single-cycle butterflies and with
    three-instruction ones;
  * Kyber NTT and inverse NTT in both styles;
  * pointwise add, sub and mul for both primes;
  * directed regular-ALU and rejected-instruction cases;
  * random dependent streams of custom instructions.

  NTT outputs are compared with a reference NTT and with direct evaluation of the input
  polynomial at the roots ζ^(2·brv(i)+1) (ζ = 1753 and 17). Inverse transforms must give
  back the input. It also checks that a Dilithium NTT takes 1 024 butterfly cycles and a
  Kyber NTT 896, and a three-instruction Dilithium NTT 3 072. It checks the whole-program
  totals of 2 367 and 2 143 cycles given above, and that every instruction kind,
  forwarding into each read port, loads and rejections each occur. It runs in well under
  a second.
* `tb_pqvalue_core_nobfly` runs the same kind of checks on the `BFLY_EN` = 0 variant. It
  covers Dilithium and Kyber NTTs and inverse NTTs built from three-instruction
  butterflies, and checks that butterfly encodings are rejected.

To simulate with Verilator, for example the top:

    verilator --binary --timing --assert -Irtl -y rtl rtl/pq_pkg.sv \
        tb/tb_pqvalue_core.sv --top-module tb_pqvalue_core
    ./obj_dir/Vtb_pqvalue_core

Any other testbench runs the same way, with `tb/tb_<module>.sv` and
`--top-module tb_<module>`.

## What is not here, and where it departs from the original

* **The rest of the processor.** Fetch, the regular ALU, the RV32M multiplier, the
  load/store unit, the controller and hazard unit of the RI5CY core, the PULPino memories
  and peripherals, and the Keccak co-processor used in some system benchmarks are not
  included. `pqvalue_core` has ports where the ALU and the load unit attach. Full-scheme
  cycle counts (KeyGen/Sign/Verify) and complete NTT cycle counts with software overhead
  therefore cannot be reproduced here. Butterfly cycle counts and the load/store/butterfly
  totals of a transform can be, and are checked.
* **Pipeline details** around the ALU are this design's own choices; the original
  design changes an existing core instead. They are: writeback at the end of EX,
  forwarding on all three read ports, port-B priority, the load port, and rejecting
  every opcode except OP and the custom one.
* **Area and timing.** The original reports ASIC (28 nm, 100–400 MHz) and FPGA
  (Zynq-7000: two DSPs for the 23 × 23 multiplier) results. None of these was
  re-measured. The multiplier and the ×5039 constant multiplier are written as `*` and
  left to synthesis.
* **Register-file ports in the variant.** With `BFLY_EN` = 0 the register file keeps its
  third read port (left idle) and its second write port (used by loads). The original
  variant was measured on a core whose custom instructions use two read ports and one
  write port.
