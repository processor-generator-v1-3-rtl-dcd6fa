# Spartacus: a small MIPS IV-style core with vector extensions

Spartacus is a 32/64-bit MIPS IV-style processor. It is built so that new
instructions, including vector instructions in the style of AltiVec and MMX,
can be added by describing what each instruction does in each of its five
stages. The core has two register files: 32-bit general registers and 64-bit
"MMX" registers. It has three ALUs (32-bit, 64-bit and a vector ALU that works
on packed lanes) and a dual-ported data memory, so that one vector element
can read two words and write two words.

This RTL implements the base instruction set and four extension instructions:

* `vecadd32_mem`: memory-to-memory vector add.
* `vecadd8_mmx`: adds 64-bit register pairs as two 32-bit lanes and stores
  both lanes to memory in one cycle.
* `vecadd16_hybrid`: like `vecadd8_mmx`, with four 16-bit lanes.
* `pavgb`: packed byte average.

The reference benchmark adds eight pairs of 64-bit registers in 32-bit chunks
and stores the 16 results. It takes 40 cycles with `vecadd8_mmx` and
200 cycles with base instructions, a factor of five.

## Execution model

This is the part most worth understanding before changing anything.

**Five states, no overlap.** The controller is a state machine that steps
through FETCH → DECODE → EXECUTE → MEMORY → WRITEBACK, one clock each, then
starts the next instruction. Instructions are not overlapped, so there are no
hazards, forwarding paths or stalls. Every instruction takes exactly five
cycles, including taken branches and no-ops.

| state | what happens |
|---|---|
| FETCH | If no vector loop is running, the instruction word is split into fields (`special`, `rs`, `rt`, `rd`, `sa`, `opcode`, `imm`) and held in registers. |
| DECODE | Both register files are read at (`rs`, `rt`), or at (`rt`, `rd`) for the two-register vector extensions. Both data-memory ports are read at (`rs`, `rt`). All four values are latched. A vector instruction loads its loop counter here the first time. |
| EXECUTE | All three ALUs see the latched operands. Their results and the branch decision are latched. |
| MEMORY | `LW` reads and `SW` writes port 1. Vector extensions write port 1, or both ports at `dest` and `dest+1`. |
| WRITEBACK | One register-file write, HI/LO update, PC update. For a vector instruction, the operand fields are decremented. |

**Vector instructions are loops over the same five states.** The loop counter
is loaded in the first DECODE:

* `vecadd32_mem`: the 16-bit immediate.
* `vecadd8_mmx`: a fixed 8.
* `vecadd16_hybrid`: the 5-bit `sa` field.

In each WRITEBACK the controller decrements the *instruction fields
themselves*. `dest` goes down by 1 (`vecadd32_mem`) or 2 (the MMX forms), and
each source register number goes down by 1. While elements remain, the
controller returns to FETCH without advancing the PC. FETCH does not reload
the fields, so the next pass works on the next element. One element therefore
costs the same five cycles as one scalar instruction. A count of 0 runs one
element.

So `vecadd8_mmx 16 R8 R16` computes, over eight passes:

```
mem[16] = R8[63:32] + R16[63:32]    mem[17] = R8[31:0] + R16[31:0]
mem[14] = R7[63:32] + R15[63:32]    mem[15] = R7[31:0] + R15[31:0]
...
mem[2]  = R1[63:32] + R9[63:32]     mem[3]  = R1[31:0] + R9[31:0]
```

**Addressing.** The PC counts 32-bit words. A taken branch goes to
`PC + 1 + offset`, and there is no delay slot. Memory operands are *literal*
word addresses held in the 5-bit `rs` field (a "memLoc" operand):

* `SW 9 R9 0` stores 32-bit register R9 to word 9 + 0.
* Vector extensions address words `rs`, `rs+1`, and so on directly.

As a result, loads, stores and vector operands reach words 0..31 (plus the
offset, for LW/SW).

## Instruction formats

```
OP layout: special(31:26)=000000 | rs(25:21) | rt(20:16) | rd(15:11) | sa(10:6) | opcode(5:0)
SP layout: special(31:26)        | rs(25:21) | rt(20:16) | immediate / offset (15:0)
```

OP-layout instructions select their operation with `opcode`. All others
(immediates, loads/stores, branches) select it with `special`. In assembly
order, OP instructions are `op rd rs rt`, SP instructions `op rt rs imm`, and
memory accesses `op memLoc reg offset`. `tb/pg13_asm_pkg.sv` has one encoder
function per form.

### Base instructions

The codes are those of MIPS IV.

| group | instructions | register file | notes |
|---|---|---|---|
| 32-bit ALU | ADD, ADDU, AND (OP); ADDI, ADDIU, ANDI (SP) | 32-bit | immediates sign-extended, ANDI zero-extended; no overflow trap |
| 32-bit divide | DIV, DIVU → HI32 (remainder), LO32 (quotient); MFHI, MFLO | 32-bit | |
| 64-bit ALU | DADD, DADDU, DSUB, DSUBU (OP); DADDI, DADDIU (SP) | 64-bit | |
| 64-bit shifts | DSLL, DSRL, DSRA (amount in `sa`, 0..31); DSLLV, DSRLV, DSRAV (amount `rs[5:0]`) | 64-bit | shift `rt` into `rd` |
| 64-bit mul/div | DMULT, DMULTU (128-bit product), DDIV, DDIVU → HI64/LO64; MFDHI, MFDLO | 64-bit | |
| branches | BEQ, BNE (rs vs rt), BGTZ, BLEZ (rs vs 0) | 32-bit | |
| memory | LW, SW | 32-bit | memLoc addressing, see above |
| moves | MVDU, MVDL: `rf32[rt] <= rf64[rs][63:32]` / `[31:0]` | both | codes 110000 / 110001 |

Division by zero gives an all-ones quotient and a remainder equal to the
dividend. Codes that mean nothing act as five-cycle no-ops, and the all-zero
word is one of them.

### Extension instructions

| instruction | layout / code | per element |
|---|---|---|
| `vecadd32_mem dest s1 len` | SP, special 111111 | `mem[dest] = mem[dest] + mem[s1]` on ALU32; dest−1, s1−1 |
| `vecadd8_mmx dest s1 s2` | OP, opcode 111111 | VADD32 of `rf64[s1]`, `rf64[s2]`; high lane to `mem[dest]`, low lane to `mem[dest+1]`; dest−2, s1−1, s2−1; 8 elements |
| `vecadd16_hybrid dest s1 s2 len` | OP, opcode 111110, len in `sa` | as above with VADD16 (four 16-bit lanes) |
| `pavgb rd rs rt` | OP, opcode 111101 | one pass: `rf64[rd] = PAVGB(rf64[rs], rf64[rt])`, byte lanes `(a+b+1)>>1` |

## Components (`rtl/`)

| file | role |
|---|---|
| `pg13_pkg.sv` | field layout, all instruction and ALU codes, the state type |
| `spartacus.sv` | top level: wires everything below |
| `controller.sv` | state machine, PC, instruction fields, operand/result registers, HI/LO (32 and 64), loop counter |
| `imemory.sv` | instruction memory, 64 × 32 bits, combinational read, program-load write port |
| `dmemory.sv` | data memory, 64 × 32 bits, two independent read/write ports plus a debug read port; port 2 wins a same-word write collision |
| `regfile.sv` | 32 registers (of `pg_reg`), two combinational read ports, one write port, debug read port; used at 32 and 64 bits |
| `pg_reg.sv` | register with load enable and synchronous clear |
| `alu32.sv`, `alu64.sv`, `aluvec.sv` | combinational ALUs; the operation input is the instruction's function code |

The controller drives every component directly; there are no buses.

## Top-level interface and timing

* `clk`: all state changes on the rising edge (the falling edge when
  `CLK_RISING` is 0).
* `rst_n`: synchronous, active low. Clears the PC (to 0), the controller
  state and all registers of both files. Memory contents are not cleared.
* `prog_we`, `prog_addr[5:0]`, `prog_data[31:0]`: write one instruction word
  per cycle. Load the program while `rst_n` is low; execution starts at
  word 0 on the first rising edge after reset is released.
* `dbg_dmem_addr` → `dbg_dmem_data`, `dbg_rf32_addr` → `dbg_rf32_data`,
  `dbg_rf64_addr` → `dbg_rf64_data`: combinational debug reads that do not
  disturb execution.
* `pc`, `state`, `loop_en`, `loop_cnt`: current controller state.
* `retire` (one pulse per finished instruction, in its last WRITEBACK),
  `iteration` (one pulse per vector element), `branch_taken`.

There is no halt instruction. A program simply runs on into the following
no-op words, and a testbench watches `retire` or `pc`.

Parameters:

* `IMEM_DEPTH` (64), `DMEM_DEPTH` (64), `RF_DEPTH` (32). The instruction
  fields stay 5 bits wide whatever `RF_DEPTH` is.
* `BASE_ENABLE` (all ones): one bit per base instruction, indexed by
  `base_instr_e` in `pg13_pkg.sv`. A cleared bit removes that instruction;
  it then decodes as a five-cycle no-op.
* `HAS_ALUVEC` (1): set to 0 to build without the vector ALU. `vecadd8_mmx`,
  `vecadd16_hybrid` and `pavgb` then become no-ops. `vecadd32_mem` uses only
  ALU32 and stays.
* `CLK_RISING` (1): set to 0 to run the whole core on the falling edge of
  `clk`. The top inverts the clock once and feeds that copy to every
  component. Drive the program-load inputs away from the falling edge then.

## What follows the original description and what does not

Taken from the original description:

* the component set and port counts;
* the five stages;
* the two layouts;
* the base function codes;
* the HI/LO registers of both widths;
* the loop counter and operand-decrement mechanism;
* the stage-by-stage behaviour of `vecadd32_mem` and `vecadd8_mmx`;
* the VADD32 lane operation;
* the 64-word data memory and 32-entry register files.

Choices made here, where the description is silent:

* **No stage overlap.** The description calls the design a "5-stage
  pipeline" but also a two-process state machine. Its reported timings
  (3200 ns for 8 vector elements against 15900 ns for the equivalent 40
  scalar instructions) put one element at the cost of one instruction, which
  this sequential reading reproduces exactly.
* memLoc operands as literal word addresses; the branch target rule; word
  addressing.
* The codes of MVDU, MVDL, the extensions and the vector-ALU operations.
* The definitions of `vecadd16_hybrid` (length in `sa`) and `pavgb`, of which
  only one-line descriptions exist.
* **No traps or exceptions.** ADD/ADDU and their relatives behave the same.
* **36 base instructions.** The description counts 35 base instructions.
  Its code table lists 34, and its reference benchmark also uses MVDU and
  MVDL, which the table does not list. This design has all 36.
* R0 is an ordinary register, cleared by reset, not hard-wired to zero.
* The instruction-memory depth of 64, the program-load port and the debug
  ports.

Not built:

* the Vecld, Vecmax, Maskmove and Vecadd64_mmx extensions, which are only
  named;
* a comparison with the FPGA results reported for the original core (about
  92 MHz and 78 % of the LUTs of a Virtex-E XCV2000E). This RTL has not
  been through that flow, and its size differs because it has no extension
  interpreter's generated logic;
* the clock generator: clk is an input;
* the per-stage debug signals a user could add to the generated core, and
  the list of trap codes (no traps exist here);
* the generator software (extension-language interpreter, assembler, tool
  scripts, user interface). The encoder functions in `tb/pg13_asm_pkg.sv`
  stand in for the assembler.

Of the build options a generator for this core would offer, base
instruction selection, vector-ALU selection and the clock edge are
parameters. The following are not:

* optional reset: reset is always present;
* data-memory word width: `dmemory` has a `WIDTH` parameter, but the
  controller assumes 32.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pg_reg`, `tb_regfile`, `tb_imemory`, `tb_dmemory`: random traffic
  against model arrays, including same-cycle read/write, dual-port writes and
  collisions, address wrap and reset.
* `tb_alu32`, `tb_alu64`, `tb_aluvec`: hand-worked vectors, then random
  operands against references written independently (shift-and-add multiply,
  bit-serial division, bit-by-bit shifts, per-lane sums).
* `tb_controller`: the controller alone, with array models of the memories
  and register files. It checks that the state order never deviates and
  checks results and cycle counts for three programs.
* `tb_spartacus_config`: a build without AND, DIV and the vector ALU. It
  checks that the left-out instructions change nothing and still take five
  cycles, and that the rest works. A second, full build runs on the falling
  clock edge. It must give the benchmark's results and cycle count, and its
  state must change only after falling edges.
* `tb_spartacus`: the whole core at default parameters, running four
  programs:
  * the `vecadd8_mmx` benchmark;
  * its scalar equivalent (DADD, MVDU/MVDL, SW);
  * a 32-bit program with a counted loop, all four branch kinds, DIV/DIVU,
    LW/SW;
  * a 64-bit program covering every 64-bit instruction, `vecadd32_mem`,
    `vecadd16_hybrid` and `pavgb`.

  It checks every result register and memory word, the cycle counts (5 per
  instruction or element, 40 against 200 for the benchmark) and that vector
  elements, completed loops, dual-port writes, taken and not-taken branches,
  HI/LO writes and loads all occur.

The controller asserts that the two data-memory ports never write the same
word in one cycle, and that the loop mechanism is active only for vector
instructions.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/pg13_pkg.sv tb/pg13_asm_pkg.sv tb/tb_spartacus.sv --top-module tb_spartacus
./obj_dir/Vtb_spartacus
```

Replace `tb_spartacus` with any other testbench name; the unit testbenches
need only `rtl/pg13_pkg.sv` and their own file. The whole core compiles and
runs all four programs in a few seconds.

## Adding an instruction

1. Reserve a code in `pg13_pkg.sv`. Use the `special` field for SP layout or
   `opcode` for OP layout.
2. Add a decode flag in `controller.sv` next to the others (`i_...`).
3. Add its behaviour in each state's section. The sections are: the ALU drive
   block (EXECUTE), the data-memory block (DECODE reads, MEMORY writes), the
   register-write block (WRITEBACK), and for a vector instruction the loop
   count in DECODE and the field decrements in WRITEBACK.
4. If it needs a new lane operation, add it to `aluvec.sv`.
5. Add an encoder to `tb/pg13_asm_pkg.sv` and a program and expected values
   to `tb/tb_spartacus.sv`.
