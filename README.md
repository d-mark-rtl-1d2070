# D-mark: a tiny 8-bit DSP processor

D-mark is a very small processor for simple signal-processing jobs such as FIR filters and FFTs.
It was conceived as a full-custom chip of about 5,600 transistors (2.2 mm x 2.2 mm in 1.5 µm CMOS, 10 MHz).
A general-purpose 8-bit CPU loses most of its time to address arithmetic and to multiplication done in software.
D-mark puts four pieces of hardware against that:

* a **signed Booth multiplier**;
* a **bit-reverser (BR)** that steps through radix-2 FFT sample orders with a single addition;
* **register-indirect loads and stores with post-increment and post-decrement**;
* a **jump to an address held in a register pair**, so a loop costs one instruction.

Everything else is kept minimal.
Every instruction is 16 bits long and takes exactly seven clock cycles.
The datapath is 8 bits wide, addresses are 16 bits, and the ALU is built from one repeated 1-bit slice.

This repository holds synthesizable SystemVerilog for the processor core, a self-checking testbench for every block, and an end-to-end testbench.
That testbench runs programs on the core and compares it, instruction by instruction, with a reference instruction-set model.

## Block structure

```
                 +-----------------------------------------------+
 data_in[7:0] -->| dm_control: FSM T1..T7, Irh/Irl, decode       |--> state, halted, instr_done
                 +-----------------------------------------------+
                        | ctrl (one control word per cycle)
     +------------------+---------------------+----------------------------+
     v                  v                     v                            v
 dm_regfile        dm_addr_unit          dm_datapath                   memory bus
 8 rows x 16 bit   MAR -> addr[15:0]     TR1, TR2                       addr, data_in,
 row 0 = PC        INCR = MAR +/- 1      MUX: TR2 | MUL | SHR | BR      data_out, data_oe,
                                         ALU (8 x dm_alu_slice), flags  mem_rd, mem_wr
```

| Module | Function |
|---|---|
| `dm_core` | Top level: wires the blocks below and the two byte/row multiplexers around the register array. |
| `dm_control` | Seven-state FSM per instruction, instruction register, decoder. |
| `dm_regfile` | Eight 16-bit rows, whole-row read, byte or row write. Row 0 is the PC. |
| `dm_addr_unit` | Memory address register and incrementer/decrementer. |
| `dm_datapath` | TR1/TR2, operand multiplexer, multiplier, shifter, BR unit, ALU, flags. |
| `dm_alu` | 8-bit ALU with twelve operations, built from `dm_alu_slice`. |
| `dm_alu_slice` | One ALU bit: full adder plus four 2:1 multiplexers. |
| `dm_bitrev` | The BR adder for FFT addressing. |
| `dm_shifter` | One-place logical/arithmetic left/right shifter. |
| `dm_booth_mul` | Signed 8x8 Booth multiplier, 16-bit product. |
| `dm_pkg` | Shared widths, enums (opcodes, ALU operations, states) and the control-word struct. |

## The seven-cycle instruction

Each instruction runs through states T1 to T7.
Fetch uses the first three states:

| State | Fetch action |
|---|---|
| T1 | MAR ← PC |
| T2 | Irh ← memory[MAR]; PC ← MAR+1; MAR ← MAR+1 |
| T3 | Irl ← memory[MAR]; PC ← MAR+1 |

The register array has one read port and one write port.
So the execute states read at most one row and write at most one row per cycle:

| Instruction class | T4 | T5 | T6 | T7 |
|---|---|---|---|---|
| ALU, MOV, shift, MUL, BR | TR2 ← rs | TR1 ← rd | rd ← result, flags | – |
| LD rd,(P) | MAR ← P | rd ← memory | P ← P±1 (if selected) | – |
| ST rs,(P) | MAR ← P | memory ← rs | P ← P±1 (if selected) | – |
| LDI rd,imm | rd ← imm | – | – | – |
| JMP/Jcc R | PC ← row R if the condition holds | – | – | – |
| HALT | stop (the FSM stays halted until reset) | | | |

Short instructions still take all seven cycles; the fixed time was part of the design goal.
`instr_done` is high during T7.
At 10 MHz one instruction takes 700 ns.

## Programmer's model

**Registers.** There are eight 16-bit rows, R0 to R7.
R0 is the program counter and is not meant for general use.
The datapath works on bytes, so instructions name one of 16 *byte registers* with a 4-bit index `{row, half}`: index 2·r is the low byte of row r and 2·r+1 is its high byte.

Two kinds of instruction use a whole row instead of a byte:

* Rows R4 to R7 are the four pointer registers for LD and ST.
* Any row can hold a 16-bit jump target.

**Flags.**

* Z and N follow every datapath result, including CMP.
* C is the adder carry. For subtraction it is 1 when no borrow occurred.
* Shifts load C with the bit shifted out.
* Logic operations leave C unchanged.

**Reset.** Reset clears all registers and flags.
Execution starts at address 0.

## Instruction set

There are 27 instructions.
Bits [15:11] hold the opcode, with one exception: LDI uses the top four bits `1111`.

| Opcode | Mnemonic | Effect |
|---|---|---|
| 0–3 | ADD, ADC, SUB, SBB rd, rs | rd ← rd op rs; Z, N, C |
| 4–6 | AND, OR, XOR rd, rs | rd ← rd op rs; Z, N |
| 7 | NOT rd | rd ← ~rd |
| 8, 9 | INC rd, DEC rd | rd ← rd ± 1; Z, N, C |
| 10 | CMP rd, rs | flags of rd − rs, no write |
| 11 | MOV rd, rs | rd ← rs ⊕c rd |
| 12–14 | SHL, SHR, ASR rd, rs | rd ← shift(rs) ⊕c rd; C ← bit shifted out |
| 15, 16 | MULL, MULH rd, rs | rd ← low/high byte of signed rd × rs, ⊕c rd |
| 17 | BR rd, rs | rd ← BR(base = rd, pattern = rs) ⊕c rd |
| 18 | LD rd, (P)[+/-] | rd ← memory[P], then optional P ± 1 |
| 19 | ST rs, (P)[+/-] | memory[P] ← rs, then optional P ± 1 |
| 20–24 | JMP, JZ, JNZ, JC, JNC R | PC ← row R if the condition holds |
| 25 | HALT | stop |
| 30/31 | LDI rd, imm8 | rd ← imm8 |

Field layouts:

```
register form   [15:11] op  [10:7] rd   [6:3] rs        [2:0] c (combine)
memory form     [15:11] op  [10:7] r    [6:5] P (R4+P)  [4:3] mode: 0 none, 1 post-inc, 2 post-dec
jump form       [15:11] op  [10:8] R    [7:0] unused
LDI             [15:12] 1111 [11:8] rd  [7:0] imm8
```

**Combine field (⊕c).** The instructions that take their result from the operand multiplexer are MOV, the shifts, MULL/MULH and BR.
For these, the 3-bit field `c` chooses how the unit's result U meets the old value of rd in the ALU:

| c | Result |
|---|---|
| 0 (or 5–7) | U |
| 1 | rd AND U |
| 2 | rd OR U |
| 3 | rd XOR U |
| 4 | rd + U, with C from the ALU |

The hardware can do this because the ALU's second input always comes through the multiplexer while its first input is TR1.
The fused forms include multiply-and-AND, which the original design cites as an example, and shift-and-add, which is useful for constant coefficients.

## The ALU bit slice

The ALU is eight copies of one slice: a full adder plus four 2:1 multiplexers, controlled by three lines S2, S1, S0.

```
B'    = B ? S0 : S1                 -> 0, B, ~B or 1 into the adder
SUM   = A ^ B' ^ CIN
CARRY = majority(A, B', CIN)
COUT  = S2 ? CIN : CARRY            -> S2 = 1 bypasses the carry chain
ALU   = S2 ? (S0 ? CARRY : SUM) : SUM
```

With S2 = 0 the slices form a ripple-carry adder.
The B' code then gives A+B, A+~B (subtract), A+0 (pass/increment) and A+1…1 (decrement).
The carry into slice 0 decides between ADD/ADC, SUB/SBB and INC/PASS.

With S2 = 1 every slice passes its carry input straight on.
So all eight slices see the same carry-in, and the full adder itself becomes the logic unit:

* CARRY = A·B' + CIN·(A + B') gives **AND** when CIN = 0 and **OR** when CIN = 1 (with B' = B).
* SUM = A ⊕ B' ⊕ CIN gives **XOR**/**XNOR** (with B' = ~B) and **PASS**/**NOT** (with B' = 0).

The twelve operations, as `{S2,S1,S0}` and carry-in:

| Operation | Slice code | Carry-in |
|---|---|---|
| ADD | 001 | 0 |
| ADC | 001 | C |
| SUB | 010 | 1 |
| SBB | 010 | C |
| INC | 000 | 1 |
| DEC | 011 | 0 |
| PASS | 000 | 0 |
| AND | 101 | 0 |
| OR | 101 | 1 |
| XOR | 110 | 1 |
| XNOR | 110 | 0 |
| NOT | 100 | 1 |

The original schematic shows the operand multiplexer, the adder and a carry multiplexer.
It does not show clearly which control drives the two output multiplexers.
The assignment above is this implementation's reading: it is the one that makes the three control lines yield a useful, self-consistent set of twelve operations.

## The bit-reverser (BR)

A radix-2 FFT of N points reads its samples in a different order at every stage.
For N = 8:

| Stage | Order |
|---|---|
| 1 | 0 1 2 3 4 5 6 7 |
| 2 | 0 2 1 3 4 6 5 7 |
| 3 | 0 4 2 6 1 5 3 7 |

The BR unit produces stage s by repeatedly adding the pattern P = 2^(s−1) to a base address, with an unusual carry path:

* at the pattern bit k and below it, the carry runs **toward bit 0** (reversed);
* the carry leaving bit 0 **re-enters at bit k+1** and ripples upward normally.

```
stage 3, P = 0000 0100:   ...A4 A3 | A2 A1 A0
                          <-- carry | carry -->  (wraps from A0 to A3)
```

The low k+1 bits therefore count in bit-reversed order, and their overflow advances the upper bits to the next group.
Put another way, for P = 2^k the low k+1 bits of the result are reverse(reverse(low) + 1).
The overflow of that increment is added to the upper bits.
The testbench uses this identity as its reference.
If the pattern has several bits set, the highest one is the turn point.
A zero pattern returns the base unchanged.

The unit is 8 bits wide and works on byte registers, so one BR instruction covers FFTs up to 256 points.
A typical FFT stage loop keeps the index in a byte register and the pattern in another.
It copies the index into the low byte of a pointer row, loads with `LD`, and steps the index with `BR idx, pat`.

## Datapath details

* **TR1 and TR2** are loaded one per cycle from the byte selected out of the row being read.
* **The operand multiplexer** feeds the ALU's B input from:
  * TR2;
  * the low or high byte of the product TR1 × TR2;
  * the shift of TR2;
  * BR(TR1, TR2).
* **Passing a unit result unchanged.** The ALU's A input is TR1. It can be gated to zero so that ADD passes the multiplexer value through.
* **The multiplier** is a radix-2 Booth array, combinational, so the full product is ready in the write-back cycle. A 16-bit product takes two instructions, MULL and MULH, because the ALU and the register write path are 8 bits wide.

## Memory bus

| Signal | Meaning |
|---|---|
| `addr[15:0]` | The MAR. Stable from the cycle after it is loaded. |
| `data_in[7:0]` | Read data. Must be valid combinationally in any cycle with `mem_rd` high (asynchronous-read memory). |
| `data_out[7:0]`, `data_oe` | Write data and its enable. Valid while `mem_wr` is high. The memory stores the byte at the rising edge ending that cycle. |
| `mem_rd`, `mem_wr` | Read and write strobes. Never both high; an assertion in `dm_control` checks this. |

Read cycles are T2 and T3 of every instruction and T5 of LD.
The only write cycle is T5 of ST.
On a chip, `data_in`, `data_out` and `data_oe` form one bidirectional 8-bit pad group.

Status pins `state[2:0]`, `flags[2:0]` = {N, C, Z}, `halted` and `instr_done` let a tester follow execution.
Counting the data bus once, the core has 36 signal pins.

## Where this implementation departs from, or adds to, the original design

* **Instruction encoding.** The original published the instruction count (27), the length (16 bits), the timing (7 cycles, 3 for fetch) and the special instructions, but not the encoding. Everything in the instruction-set section above — opcode map, field layout, condition codes, combine field, HALT, flags — is this implementation's.
* **Register array.** The original array loads during the high phase of the clock, as a latch array. Here it uses rising-edge flip-flops with asynchronous reset, with one read and one write port.
* **Pointer rows.** The original says four rows can be used as pointers, but not which; here they are R4 to R7.
* **"Move with auto-increment/decrement"** is realised as LD and ST with post-modify. There is no memory-to-memory move.
* **ALU slice.** The output-multiplexer selects are a reading of an unclear schematic (see above). The list of twelve operations is this implementation's.
* **Multiplier.** It is combinational; the original gives no structure beyond "signed Booth".
* **Not modelled:**
  * the pad ring;
  * the external memory (the testbench has a behavioural 64 KiB memory);
  * all electrical and layout properties: area, transistor count, 5 V supply, 10 MHz timing.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes.
Every testbench has a cycle or time watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dm_pkg.sv tb/tb_dm_core.sv \
          --top-module tb_dm_core -Mdir obj_core
./obj_core/Vtb_dm_core
```

Replace `core` with any block name to run that block's testbench: `alu_slice`, `alu`, `bitrev`, `shifter`, `booth_mul`, `regfile`, `addr_unit`, `datapath` or `control`.
Packages must come first on the command line.
The benchmark programs also use the small assembler package `tb/dm_asm_pkg.sv`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dm_pkg.sv tb/dm_asm_pkg.sv \
          tb/tb_dm_fir.sv --top-module tb_dm_fir -Mdir obj_fir
```
Lint with `verilator --lint-only -Wall -Irtl rtl/dm_pkg.sv rtl/dm_core.sv`.

## Verification

| Testbench | What it checks |
|---|---|
| `tb_dm_alu_slice` | All 64 input combinations against the slice's function table. |
| `tb_dm_alu` | All twelve operations on corner and random operands against integer arithmetic. |
| `tb_dm_bitrev` | The three 8-point sequences above. Every stage of 8-, 16- and 32-point FFTs. Random bases against the reverse-add-reverse identity. |
| `tb_dm_shifter` | All 4 × 256 cases. |
| `tb_dm_booth_mul` | All 65,536 signed products. |
| `tb_dm_regfile`, `tb_dm_addr_unit` | Random writes and reads against a shadow model; load, increment and decrement with wrap-around. |
| `tb_dm_datapath` | Each multiplexer source, ALU operations and flag updates. |
| `tb_dm_control` | The control word state by state for every instruction class, including jumps taken and not taken and HALT. |
| `tb_dm_core` | The whole processor, described below. |

`tb_dm_core` assembles a program and runs about 260 instructions on the core at its default sizes.
The program contains:

* a multiply loop over a sample buffer;
* the FFT stage-3 BR sequence stored with post-decrement;
* every ALU instruction;
* fused operations;
* all conditional jumps, each taken and not taken;
* 60 pseudo-random datapath instructions.

After every instruction, all eight rows and the flags must match a reference model written from the instruction-set description.
Each instruction must take exactly 7 cycles.
At HALT all of memory must match the model, and the BR output must equal 0,4,2,6,1,5,3,7.
The testbench also counts each mechanism: post-increment, post-decrement, BR, MULL/MULH, each shift, carry, jumps taken and not taken, compare, fused operation and HALT.
A mechanism that never occurs counts as a failure.

Three benchmark programs run on the core at its default sizes, each checked against a result computed independently in the testbench:

| Testbench | Program | Instructions | Cycles |
|---|---|---|---|
| `tb_dm_fir` | 4-tap FIR filter over 24 signed samples, 16-bit accumulation with MULL/MULH and ADD/ADC | 934 | 6535 |
| `tb_dm_fft` | 16-point in-place radix-2 transform with unit twiddles (Walsh–Hadamard), every stage addressed with BR | 508 | 3553 |
| `tb_dm_sort` | bubble sort of 16 bytes with CMP/JC | 1545 | 10812 |

`tb_dm_fft` also records the order of the data reads in each of the four stages.
It compares that order with the radix-2 stage order.
Each benchmark checks that the cycle count is exactly 7 per instruction, with HALT stopping after its fourth cycle.
At 10 MHz the FIR run takes 31 µs per output sample. Of that, 5.6 µs per tap is the eight-instruction multiply-accumulate.

The reference model and the RTL come from the same instruction-set description.
So `tb_dm_core` shows that the core implements that description consistently; it cannot show that the description matches the original chip's unpublished encoding.
