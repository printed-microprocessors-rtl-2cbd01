# TP-ISA: a tiny microprocessor for printed electronics

Inkjet-printed transistors are slow (a few hertz to kilohertz), large (about a
square millimetre per gate), and their flip-flops cost several times as much
area and energy as a combinational gate. A processor built for this technology
should therefore hold as little state as it can. The TP-ISA ("Tiny Printed"
instruction set) machine in this repository follows from that rule:

* **No register file.** It is a two-operand memory-memory machine. Each
  instruction reads two data-memory words, combines them and writes the
  result back over the first word. The only architectural state is an 8-bit
  program counter, one or more 8-bit base address registers (BARs) and four
  flags.
* **One pipeline stage.** Every instruction completes in one clock cycle.
  Pipeline registers would cost more than the speed they buy.
* **Harvard organisation.** Instructions come from a printed read-only
  cross-point memory, a grid where a printed conductive dot stores a 1. This
  memory is far denser than printed RAM. Data lives in a small SRAM.
* **Program-specific builds.** A printed part is made on demand, so the
  processor can be trimmed to one program. The PC, BARs, flags and operand
  fields are cut to the sizes that program uses. Every module here is
  parameterised for this.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable apart from two
clearly marked behavioural models of analog parts.

## Block structure

```
                 tp_system
 ┌──────────────────────────────────────────────────────────────┐
 │  tp_xpoint_rom (1 bit/dot)     tp_core                       │
 │  or tp_mlc_rom + tp_adc  ──►  ┌───────────────────────────┐  │
 │      ▲ pc        instr        │ decode (opcode, W C A B)  │  │
 │      └──────────────────────  │ tp_bar_file  (addr1,addr2)│  │
 │                               │ tp_alu                    │  │
 │  tp_data_ram  ◄── addr1/addr2 │ tp_flag_reg               │  │
 │  2 read, 1 write ──► rdata1/2 │ tp_pc_unit                │  │
 │      ▲                        └───────────────────────────┘  │
 │      └── ext_* port (loads inputs / reads results, run = 0)  │
 └──────────────────────────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `tp_pkg` | opcode, control-bit, flag and ALU-operation types |
| `tp_system` | top: core + instruction ROM + data RAM + external data port |
| `tp_core` | single-cycle decoder/datapath; instantiates the four units below |
| `tp_bar_file` | BARs (BAR[0] = 0) and operand address resolution |
| `tp_alu` | add/subtract with carry, logic, rotates; S Z C V flags |
| `tp_flag_reg` | flags register; unused flags can be removed |
| `tp_pc_unit` | PC and branch condition |
| `tp_xpoint_rom` | one-bit-per-dot cross-point instruction ROM |
| `tp_mlc_rom` | multi-level cross-point ROM, 2 or 4 bits per dot (behavioural model) |
| `tp_adc` | flash ADC that reads a multi-level dot (behavioural model) |
| `tp_data_ram` | data SRAM |

## The instruction set

Every instruction is 24 bits wide in the standard build:

```
 23    20 19 18 17 16 15             8 7              0
┌────────┬──┬──┬──┬──┬────────────────┬────────────────┐
│ opcode │ W│ C│ A│ B│   operand 1    │   operand 2    │
└────────┴──┴──┴──┴──┴────────────────┴────────────────┘
```

The control bits mean:

* **W**: write the result back to the operand-1 address.
* **C**: use the carry flag, either as the adder's carry-in or as the bit
  rotated in.
* **A**: invert operand 2 for subtraction. On RR it selects the arithmetic
  form. On a branch it negates the condition.
* **B**: marks a branch instruction.

| Opcode (value) | Mnemonics: W C A B | Effect |
|---|---|---|
| ADD (0) | ADD 1000, ADC 1100, SUB 1010, SBB 1110, CMP 0010, CPB 0110 (compare with borrow: not in the published list, but the decoder handles the bit combination like any other) | m1 ← m1 + (A ? ~m2 : m2) + cin |
| AND (1) | AND 1000, TEST 0000 | m1 ← m1 & m2 |
| OR (2) | OR 1000 | m1 ← m1 \| m2 |
| XOR (3) | XOR 1000 | m1 ← m1 ^ m2 |
| NOT (4) | NOT 1000 | m1 ← ~m2 |
| RL (5) | RL 1000, RLC 1100 | m1 ← m2 rotated left (through C if C = 1) |
| RR (6) | RR 1000, RRC 1100, RRA 1010 | m1 ← m2 rotated right (through C, or sign-preserving) |
| STORE (7) | STORE 1000 | m1 ← operand 2 as an immediate, zero-extended |
| SETBAR (8) | SETBAR 1000 | BAR[operand 2] ← mem[operand 1], addressed directly |
| BR (9) | BR 0001, BRN 0011 | if ((flags & mask) != 0) XOR A: pc ← operand 1 |

In this table, m1 and m2 are the data words at the two resolved operand
addresses. The adder's carry-in `cin` is the C flag when C = 1, and otherwise
equals A. So SUB computes m1 + ~m2 + 1. SBB adds the carry, where a set carry
means "no borrow".

All ALU instructions (opcodes 0–6) update the flags, including CMP and TEST,
which write nothing back. Logic operations clear C and V. Rotates move the bit
shifted out into C. Opcodes 10–15 are unused and do nothing.

A branch tests a 4-bit mask held in the low bits of operand 2, in the order
{S, Z, C, V}. BRN with an empty mask is an unconditional jump. A jump to its
own address ends a program.

There are no shifts, no multiply and no population count; each costs too many
printed cells. Arithmetic on data wider than the core is built from ADC, SBB
and the rotate-through-carry forms. For example, an 8-bit core adds 16-bit
numbers with ADD followed by ADC.

### Addressing through base registers

An operand is `{select, offset}`. With the standard two BARs, bit 7 selects
the base and bits 6..0 are the offset. The address is `BAR[select] + offset`
(mod 256), and BAR[0] is always zero. So `select = 0` means direct addressing,
and `select = 1` means an address relative to the one real BAR.

SETBAR is the only way to change a BAR. It copies a data word, the pointer,
into the BAR, which lets a loop walk an array:

```
loop:  SETBAR PTR, 1      ; BAR1 <- mem[PTR]
       CMP    T, b1+0     ; compare threshold with the current element
       ...
       ADD    PTR, ONE    ; advance the pointer word
```

`NUM_BARS` counts BAR[0]. A value of 4 gives two select bits, and 1 gives no
select bits and no BAR registers at all.

### Writing programs

There is no assembler in this repository. An instruction word is

```
word = opcode<<(8+N1+N2) | W<<(7+N1+N2) | C<<(6+N1+N2) | A<<(5+N1+N2) | B<<(4+N1+N2)
     | operand1<<N2 | operand2
```

where N1 = `OP1_W` and N2 = `OP2_W` (both 8 in the standard build). The ROM
image is a `$readmemh` file with one hexadecimal word per line, starting at
address 0.

Constants such as 0 and 1 must be created with STORE before they are used,
because there is no immediate form of the ALU instructions. The program
images under `tb/` and the default `rtl/tp_prog_mult8.hex` are small examples.

## Timing

The core has no internal pipeline. During one clock cycle:

1. `pc` addresses the ROM.
2. The instruction word decodes.
3. Both operand addresses resolve through the BARs.
4. The RAM returns both words combinationally.
5. The ALU result and new flags settle.

At the next rising edge, the RAM write, the flags, the PC and any BAR update
all happen together. Every instruction, taken branches included, therefore
costs exactly one cycle.

In a printed implementation the clock period must cover the ROM and RAM
access times as well as the logic. The RTL has no notion of those delays.

`rst_n` is asynchronous and active low. It clears the PC, BARs and flags, and
execution starts at address 0. The data RAM is not reset.

## The printed instruction ROM

`tp_xpoint_rom` models the cross-point ROM logically. The ROM has one
sub-block per instruction bit, and each sub-block is a ROWS × COLS grid of
cross-points. All sub-blocks share one row decoder (upper address bits) and
one column decoder (lower address bits). The selected cross-point in each
sub-block is read through a sensing resistor. A printed dot shorts the
cross-point and reads 1; an open cross-point reads 0.

The RTL follows the same structure. The row decoder selects one row onto the
column lines, and the column decoder passes one column to the output. The dot
pattern is the program. It comes from `INIT_FILE`, and the dot of sub-block b
at (r, c) is bit b of word `r*COLS + c`. The default grid is 16 × 16 (256
words). `tp_system` puts the lower half of the PC bits on the columns.

`tp_mlc_rom` is the multi-level variant, selected by
`tp_system #(.ROM_BITS_PER_DOT(2))`. Each dot stores 2 (or 4) bits as a
printed resistance, so a 24-bit word needs only 12 (or 6) sub-blocks. The
model gives a dot of level L the resistance that puts the sensed
voltage-divider output at the centre of ADC bin L:

`R_L = R_sense · (2N − (2L+1)) / (2L+1)`, with N = 2^bits.

`tp_adc` then converts the voltage with uniform bins over 0..VDD. Voltages are
carried as integers in millivolts. Both modules are behavioural models of
analog parts. Their resistor values, supply and bins are illustrative choices,
not measured data.

## Program-specific builds

Because the ROM contents are fixed when the part is printed, the hardware can
be cut down to match the program:

| Parameter | Standard | Program-specific meaning |
|---|---|---|
| `PC_W` | 8 | ⌈log2 N⌉ for N instructions; the ROM shrinks to 2^PC_W words |
| `NUM_BARS` | 2 | 1 removes every BAR (direct addressing only) |
| `FLAG_MASK` | 4'b1111 | flags the program never tests are removed and read 0 |
| `OP1_W`, `OP2_W` | 8, 8 | operand fields narrowed; instruction width = 8 + OP1_W + OP2_W |
| `DMEM_DEPTH` | 256 | words the program uses |
| `DATA_W` | 8 | any width; the same programs run on wider data with coalescing |

Branch targets come from operand 1, so `OP1_W` must be at least `PC_W`. The
branch mask comes from the low bits of operand 2, and only the flags that
exist need a mask bit.

`tb_tp_system` runs the multiply program on such a build: 5-bit PC, no BARs,
Zero and Carry only, and 18-bit instructions.

## Using the top level

`tp_system` ports:

* `clk`, `rst_n`: clock and asynchronous active-low reset.
* `run`: 1 executes; 0 freezes the core and hands the data RAM to the external
  port.
* `ext_we`, `ext_addr`, `ext_wdata`, `ext_rdata`: load inputs (written on the
  rising edge) and read results (combinational) while `run = 0`. In an
  application this is where a printed sensor would deposit its samples.
* `pc`, `instr`, `flags`, `branch_taken`, `dmem_we`: observation outputs.

The usual sequence is:

1. Pulse `rst_n`.
2. Write the inputs through `ext_*`.
3. Raise `run` until the program reaches its jump-to-self.
4. Lower `run` and read the results.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle-limit watchdog.

| Testbench | What it shows |
|---|---|
| `tb_tp_alu` | every mnemonic against an integer reference, plus corner cases (overflow, borrow, RRA) |
| `tb_tp_bar_file` | 4-BAR resolution, BAR[0] fixed at zero, direct pointer addressing |
| `tb_tp_flag_reg` | load enable, removed flags |
| `tb_tp_pc_unit` | BR/BRN conditions, hold, wrap-around |
| `tb_tp_data_ram` | two reads and one write per cycle, read-during-write |
| `tb_tp_xpoint_rom` | all 256 words of a formula-generated pattern, and an unprinted ROM |
| `tb_tp_mlc_rom`, `tb_tp_adc` | 2- and 4-bit dots read back exactly; ADC bin edges |
| `tb_tp_core` | 20,000 random instructions in lock step with an instruction-set model written in the testbench: PC, write-back, flags and branch decision checked every cycle |
| `tb_tp_system` | intAvg8 on the standard build (SETBAR, BAR-relative loads, carry chains), multiply on a program-specific build and on the MLC-ROM build; exact cycle counts; counts that every mechanism occurred |
| `tb_tp_benchmarks` | tHold8, crc8, div8, inSort8 and a 256-word decision tree (dTree8) with random data; results and exact cycle counts |
| `tb_tp_wide` | multiply on a 16-bit 2-BAR core and a 32-bit 4-BAR core, and, on the 8-bit core by data coalescing, a 16-bit multiply (byte-wise ADD/ADC and RRC/RLC chains), tHold16 (CMP then CPB), intAvg16 (24-bit ADD/ADC/ADC sum) and div16 (RLC shifts, CMP/CPB, SUB/SBB); results and exact cycle counts |
| `tb_tp_system_full` | the default top, with no parameter changes, running its multiply ROM on 304 operand pairs; product and cycle count `66 + 2·popcount(B)` |

To simulate with plain Verilator, run from the repository root, because the
ROM images are opened by paths relative to it:

```
verilator --binary --timing --top-module tb_tp_system -y rtl -y tb +libext+.sv \
          -Irtl rtl/tp_pkg.sv tb/tb_tp_system.sv
./obj_dir/Vtb_tp_system
```

## How far to trust it, and where it departs from the source design

The published material gives the instruction list, the field layout, the
register sizes and the ROM organisation. It does not give the following, so
these are this design's own decisions:

* **Numeric opcodes.** The values 0–9 in the table above are this design's
  own.
* **Flag behaviour.** The exact flag rules for logic and rotate instructions
  are this design's own. So is the carry/borrow convention (carry set means no
  borrow).
* **RRA.** Reading RRA as an arithmetic shift right is an interpretation.
* **One-operand instructions.** NOT, RL and RR taking their source from
  operand 2 is an interpretation.
* **Branches.** The branch condition ("any masked flag set", negated for BRN)
  is an interpretation. So is the target being operand 1 as an absolute
  address.
* **SETBAR.** The chosen reading loads a BAR from the data word at a direct
  pointer address; operand 2 is the BAR number. The other possible reading
  ("BAR ← immediate") would leave loops no way to index an array.
* **System interface.** The external data port, the run control and the reset
  behaviour are this design's own.
* **Benchmark programs.** The programs (multiply, intAvg, tHold, CRC-8,
  divide, insertion sort, decision tree, and the 16-bit multiply, threshold,
  average and divide for the 8-bit core) were written for this RTL. They are not the originally evaluated
  code, so their instruction counts differ from the published program-specific
  sizes.
* **Not modelled.** Memory access times, power and the electrical behaviour of
  the printed cells are not modelled. The ROM is one group of sub-blocks (one per
  instruction bit) sharing one pair of decoders; the physical division into
  memory blocks of 8 sub-blocks changes nothing logically and is not drawn. The 2- and 3-stage pipelined variants of
  the original exploration were not built, because the single-stage core was
  the one found best.
* **Decision tree.** The evaluated tree fills all 256 program words and keeps
  its thresholds inside the instructions, but its shape and values are not
  published. The tree used here has the same size and form, defined by
  formula: heap-numbered node n (root 1) is a test for n < 51, compares
  feature n mod 8 with (73n + 29) mod 256, and continues at 2n + 1 when the
  feature is at least the threshold, else at 2n; leaf n outputs class
  (13n + 5) mod 16. A test costs 3 words (store threshold, compare, branch), a
  leaf 2 (store class, jump to the end). Run time is 5 + 3 cycles per test on
  the path (5 or 6 tests).

Synthesis of `tp_system` at the defaults gives 20 flip-flops: an 8-bit PC, one
8-bit BAR and 4 flags. That is the point of the design. The ROM becomes
constant logic, and the 256 × 8 data RAM stays a memory.
