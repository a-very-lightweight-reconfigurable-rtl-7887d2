# MicroECC: a small programmable elliptic-curve processor for NIST prime curves

MicroECC computes elliptic-curve point multiplication over the NIST prime fields
P-256 and P-224 with very little hardware. It has a 16-bit word-serial modular
arithmetic unit, two small dual-port data memories and a tiny instruction-fetch
controller. The point arithmetic (addition, doubling, the Montgomery ladder, the
final inversion) is software held in program memory. Even the curve-specific part of
the modular multiplier, the NIST "fast reduction", is a table of data in memory. The
curve can therefore be changed at run time by writing different constants. No
hardware changes.

One P-256 point multiplication with a full 256-bit scalar takes about 4.42 million
clock cycles; a P-224 multiplication takes about 2.71 million. Both were measured in
simulation, as described under "Performance".

## Block structure

```
 host ──32──► TX FIFO ──► ┌────────────── software engine ──────────────┐
                          │  main controller  ◄──32──  program memory    │
                          │  (9-bit PC, 3-level call stack)  512 x 32    │
                          └──────┬───────────────────────────▲──────────┘
            opcode, 3 x (select, 6-bit register), aux, data  │ ready, flag, read data
                          ┌──────▼──────────── modular ALU ──┴──────────┐
                          │  ALU controller ──4 channels──► DM controller │
                          │       │ commands                 │      │     │
                          │  16-bit datapath ◄─ opA, opB|p ─ DM A   DM B  │
                          │       └──────── result ─────────►(1024 x 16 each)
                          └──────────────────────────────────┬──────────┘
 host ◄──32── RX FIFO ◄──────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `microecc_top` | The two FIFOs, the software engine and the modular ALU. |
| `sync_fifo` | TX and RX FIFOs: 32 bits wide, 16 deep, show-ahead read. |
| `software_engine` | Main controller plus program memory. |
| `main_controller` | Fetches, decodes and sequences instructions; executes the flow instructions itself. |
| `program_memory` | 512 x 32 bits, synchronous read. |
| `modular_alu` | ALU controller, datapath, DM controller and the two data memories. |
| `alu_ctrl` | The state machines that carry out each arithmetic instruction word by word. |
| `alu_datapath` | Multiplier, carry-save accumulator and carry-select adder. |
| `dm_ctrl` | Maps the four operand channels onto the four memory ports. |
| `data_memory` | 1024 x 16 bits, true dual port. Used twice, as DM A and DM B. |
| `vendor_mult`, `csa`, `csla`, `cla` | Datapath leaf cells. |
| `microecc_pkg` | Opcodes, instruction layout, fixed memory locations. |

## Programming model

### Registers and memory layout

- Each data memory word address is `{register[5:0], word[3:0]}`. Each memory
  therefore holds 64 registers of 16 words of 16 bits.
- A 256-bit field element occupies one register, least significant word first.
- Every operand of an instruction names a memory (DM A or DM B) and a register.
  Each operand can be in either memory.

Some locations are fixed, because the ALU controller reads them by itself:

| Contents | Where |
|---|---|
| Prime p | DM A, register 0 |
| Reduction compensation constant | DM B, register 0 |
| Operand length in words (16 for P-256, 14 for P-224) | DM A, register 55, word 0 |
| Reduction term table (up to 128 entries) | DM A, registers 56–63 |
| Double-size product (scratch for MMUL) | DM B, registers 62–63 |

All other registers are free for software.

### Instructions

Each instruction is one 32-bit word. Three-operand form:

```
[31:27] opcode  [26] selR [25:20] regR  [19] selA [18:13] regA  [12] selB [11:6] regB
```

Other forms:

- Flow instructions carry a 9-bit program address in `[8:0]`.
- WRITE and READ use `[26]` select, `[25:20]` register, `[19:16]` word and, for
  WRITE, `[15:0]` data.
- CHKB uses the A fields and an 8-bit bit index in `[7:0]`.

| Opcode | Mnemonic | Effect |
|---|---|---|
| 0 | NOP | – |
| 1 | WRPGM a | The next host word is written to program memory[a]. |
| 2 | RDPGM a | Program memory[a] is sent to the host. |
| 3 | EXERTN a | Run the routine at a. |
| 4 / 5 | JMPFT / JMPFF a | Jump if the flag is set / clear. |
| 6 | JMP a | Jump. |
| 7 | CALL a | Call; up to three nested levels. |
| 8 | RET | Return. At level 0 the routine ends and control goes back to the host. |
| 16 | CHKB A, i | flag = bit i of A |
| 17 | WRITE | Write one 16-bit word. |
| 18 | READ | One word is sent to the host, zero-extended. |
| 19 | MOVE R, A | R = A |
| 20 / 21 | MADD / MSUB R, A, B | R = A ± B mod p |
| 22 | MMUL R, A, B | R = A · B mod p |
| 23 / 24 / 25 | CMPGR / CMPEQ / CMPLO A, B | flag = A > B / A == B / A < B |

### Host mode and program mode

- After reset the main controller is in host mode: each word arriving in the TX
  FIFO is executed at once.
- EXERTN switches to program mode. Words are then fetched from program memory,
  each fetch taking two cycles, until a RET is executed with an empty call stack.
- A fourth nested CALL is refused: it falls through, and a simulation assertion
  fires.
- `busy` stays high until the host word, including a whole routine, has finished.
- The host typically:
  1. loads a routine library once with WRPGM;
  2. loads constants and operands with WRITE;
  3. issues EXERTN, CHKB and similar instructions;
  4. reads results back with READ.

`tb/tb_ecpm.sv` shows a complete example.

## The modular datapath (`alu_datapath`)

The datapath handles one 16-bit word per cycle. It has three parts.

**Multiplier and carry-save accumulator.**
- The 16 x 16 multiplier (`vendor_mult`) produces its product as two 32-bit half
  products. A hard multiplier can be inferred in its place.
- Two 3:2 compressors (`csa`) of 2W+S = 36 bits add both vectors into a carry-save
  accumulator (sum and carry registers).
- The 4 guard bits S keep a whole product column exact. A column holds at most 16
  double-width products.
- An *emit* step converts the accumulator's low 16 bits into a binary result word
  and shifts both accumulator vectors right by 16. The carry out of that word is
  kept for the next emit.

**Carry-select adder.**
- The carry-select adder (`csla`) splits 16 bits into four 4-bit slices.
- Each slice is added twice by carry-lookahead adders (`cla`), once with carry-in 0
  and once with 1, and both results are registered.
- A chain of multiplexers then picks the right results.
- Carry in of a word is the carry out of the previous word of the same chain.

**Subtraction without a subtractor.**
- OP A is complemented on the way into the adder, and the sum is complemented on
  the way out, because `~(~a + b) = a − b`.
- The carry out is then the borrow.
- Both complements are XOR gates driven by the ADD/SUB line.

Timing: a command and its operands are presented in cycle t. The result appears,
with `res_valid`, in cycle t+2. Commands complete in issue order.

## How an instruction is sequenced (`alu_ctrl`)

The ALU controller issues at most one *step* per cycle. A step consists of:

- up to three data-memory reads, on the OP A, OP B and p channels;
- a datapath command, applied one cycle later when the read data arrive;
- a tag that travels with the step for three cycles and then writes the result word
  back on the fourth channel.

**Memory port rule.** Each memory has only two ports. When a write-back lands in a
memory, the controller holds back a step that would read that same memory twice in
that cycle; any other step still issues. So at most two accesses ever meet in one
memory. `dm_ctrl` gives each memory's ports to the active
channels in a fixed order and asserts that no third access ever appears. The
`n_stall` output counts the lost cycles.

**Pipeline draining.** Between phases where one phase reads what the previous one
wrote, the controller waits for the pipeline to drain.

**Per-instruction behaviour.**
- **MOVE, MADD, MSUB, compares:** one pass over the n words. Compares write
  nothing and set the flag from the final borrow and from whether any word was
  non-zero.
- **MADD and MSUB** keep the final carry or borrow as a signed "top word" `hi`.
  The correction loop described below then brings the result into [0, p).
- Measured costs: MOVE about 23 cycles, MADD about 80.

## Modular multiplication and table-driven fast reduction

This is the most involved part of the design. MMUL runs in three phases.

### 1. Product scanning

For every output column k = 0 … 2n−2:

1. All products `a[i]·b[k−i]` of the column go into the carry-save accumulator,
   one per cycle.
2. One emit writes result word k of the double-size product into the scratch
   registers.

The accumulator keeps the column's overflow for the next column. No partial
product is ever written back.

### 2. Fast reduction from a table

NIST primes allow the 2n-word product c to be reduced with a few additions and
subtractions of word-permuted copies of c. For P-256, in 32-bit words c0 … c15:

```
c mod p = z1 + 2·z2 + 2·z3 + z4 + z5 − z6 − z7 − z8 − z9 (mod p)
  z1 = (c7,c6,c5,c4,c3,c2,c1,c0)     z2 = (c15,c14,c13,c12,c11,0,0,0)
  z3 = (0,c15,c14,c13,c12,0,0,0)     z4 = (c15,c14,0,0,0,c10,c9,c8)
  z5 = (c8,c13,c15,c14,c13,c11,c10,c9)   z6 = (c10,c8,0,0,0,c13,c12,c11)
  z7 = (c11,c9,0,0,c15,c14,c13,c12)  z8 = (c12,0,c10,c9,c8,c15,c14,c13)
  z9 = (c13,0,c11,c10,c9,0,c15,c14)
```

For P-224, in 32-bit words c0 … c13:

```
c mod p = s1 + s2 + s3 − s4 − s5 (mod p)
  s1 = (c6,…,c0)   s2 = (c10,c9,c8,c7,0,0,0)   s3 = (0,c13,c12,c11,0,0,0)
  s4 = (c13,…,c7)  s5 = (0,0,0,0,c13,c12,c11)
```

**Table entries.** None of this is wired into the hardware. For output word j, the
formula's terms are listed as 16-bit table entries:

- bit 15: last term of this output word;
- bit 14: subtract;
- bits 5:0: index of the 16-bit product word to add.

A term with coefficient 2 is listed twice. The P-256 table has 126 entries; the
P-224 table has 48.

**Processing each output word.** For each output word j the controller:

1. adds word j of the compensation constant (explained below);
2. adds each referenced product word, one per cycle: the table entry for the next
   term is read on the OP B channel while the current term is read on OP A;
3. emits result word j.

After the last word, one extra emit captures the accumulator's leftover top part as
`hi`.

**Handling subtraction in a carry-save accumulator.** A carry-save accumulator
cannot go negative. So a subtracted word x is added as 2^16 − x instead: the
complement `~x`, plus a 1 injected into the free bit 0 of the carry vector.

- Each such term adds a fixed, known excess of 2^16 at its column.
- Over the whole table the total excess is `E = Σ_j nsub_j · 2^(16(j+1))`, where
  `nsub_j` is the number of subtracted terms in column j.
- The compensation constant is `(−E) mod p`.
- It is computed once by whoever builds the table, stored as an ordinary register,
  and added one word per column.

The sum thus stays exact and non-negative throughout. The result equals the formula
modulo p, plus a small multiple of 2^(16n) held in `hi`.

Building the table and constant for a new curve takes a few lines of code.
`build_table` and `build_table_224` in `tb/tb_p256_pkg.sv` do it from the formulas
above.

### 3. Correction

`hi` is a small signed count of 2^(16n) units.

- While `hi > 0`, the controller subtracts p over all n words and decrements `hi`
  by the borrow.
- While `hi < 0`, it adds p and increments `hi` by the carry.
- Once `hi = 0`, a trial subtraction of p without write-back checks whether the
  value is still ≥ p. If it is, p is subtracted once more and the loop repeats.

The result is always fully reduced, 0 ≤ r < p. The outputs `n_corr_sub` and
`n_corr_add` count these steps.

A P-256 MMUL takes about 580–670 cycles:
- about 290 for product scanning (256 products and 31 emits);
- about 160 for the table walk (126 terms, 16 constant words, 17 emits);
- the rest for pipeline drains and one or two correction passes.

## Switching curves

Changing curves takes the following WRITE instructions:

1. Write the other prime into DM A register 0.
2. Write its compensation constant into DM B register 0.
3. Write its table into DM A registers 56–63.
4. Write its length in words into DM A register 55, word 0.

The ALU controller watches writes to that length word and from then on works on n
words. Software must keep register words n … 15 at zero, or ignore them. With
n = 14 the processor works on P-224. Any prime of up to 256 bits works, provided
its fast reduction fits 128 table entries and the correction loop. A prime that
needs many correction rounds is slow but still correct.

## Point multiplication on the processor

`tb/tb_ecpm.sv` runs a complete scalar multiplication k·G on P-256, then switches to
P-224 and repeats it. It loads five routines, about 90 program words in all:

| Routine | What it does | Cost |
|---|---|---|
| ADD | Jacobian point addition | 16 MMUL, 7 MSUB |
| DBL | Jacobian doubling for a = −3 | 8 MMUL, 14 MADD/MSUB |
| STEP | One Montgomery-ladder step: branches on the flag with JMPFT, then CALLs ADD and DBL and moves the points | – |
| SQM | One square-and-multiply step of the inversion Z^(p−2) | 1–2 MMUL |
| RND | Randomises both ladder points: (X, Y, Z) → (λ²X, λ³Y, λZ) | 8 MMUL |

Before the ladder starts, the host writes a random λ and runs RND once. This
re-randomises the projective coordinates against differential power analysis and
leaves the affine point unchanged. For each scalar bit the host sends `CHKB k, i`
and `EXERTN STEP`. This keeps the
ladder's sequence of operations the same for both values of a bit; only the
register roles swap. The affine result is compared with an independent affine
double-and-add in the testbench.

## Performance

Cycle counts measured in simulation:

| Operation | Cycles |
|---|---|
| MOVE | ≈ 23 |
| MADD / MSUB | ≈ 80 (more when a correction is needed) |
| MMUL, P-256 | ≈ 580–670 |
| k·G, P-256, 256-bit k | 4.18 M (ladder) + 0.24 M (inversion) = 4.42 M |
| k·G, P-224, 224-bit k | 2.53 M + 0.18 M = 2.71 M |

The published reference design reports 15 ms for P-256 at 165 MHz, about 2.5 M
cycles. This implementation needs about 1.8 times as many cycles, i.e. about 27 ms
at the same clock.

- The main remaining losses are the pipeline drains between the phases of an
  instruction, the correction passes after each MMUL, and the MOVEs of the ladder
  step, which copy points between the routines' fixed registers.
- The published point-multiplication program is not known, so part of the gap may
  be in the software rather than the hardware.
- P-224 is much faster: its operands are shorter (14 words), its table is shorter
  (48 entries against 126), and it needs fewer corrections.

Synthesis of the top produces about 1030 generic cells and 593 flip-flops, plus
the three memories: 2 x 16 kbit of data memory and 16 kbit of program memory.

## Where this design departs from, or fills in, the published architecture

The published description gives:
- the block diagram with its bus widths;
- the instruction names;
- the datapath figures: multiplier with two outputs, two CSA(2W+S) stages, CSLA
  built from 4 CLAs, XOR-based subtraction;
- the statement that reduction constants and "instructions" for the fast
  reduction live in data memory.

Everything below is this design's own:

- **Encoding:** opcode values, the instruction word layout and the extra 8-bit aux
  field (word / bit index) between the controllers.
- **Host protocol:** host mode, the way WRPGM takes its data word, READ
  zero-extension, and the FIFO depth.
- **Reduction scheme:** the table format, the 2^W − x subtraction trick with its
  compensation constant, and the correction loop.
- **Datapath details:** the split of the multiplier into two half products, the
  right shift of the accumulator, the separate adder operand registers, and all
  latencies.
- **Memory use:** the port allocation rule, the write-back stall rule, the
  one-ahead table fetch, and the fixed memory locations.
- **Curve switch:** the operand-length word.
- **Controller split:** in the published block diagram the main controller sends
  the three register addresses and memory selects directly to the DM controller,
  and the ALU controller chooses, per channel, whether the ALU or the main
  controller owns it. Here the addresses pass through the ALU controller, which
  forms every word address itself. Only the write data keeps the ALU-or-main
  controller choice (`wr_from_mc`), and READ data returns through the ALU
  controller. The information carried is the same.
- **Coordinate randomisation:** the published countermeasure multiplies
  homogeneous projective coordinates by λ, i.e. (λX, λY, λZ), and allows λ to be
  renewed after every addition or doubling. The example program uses Jacobian
  coordinates, so it applies the matching map (λ²X, λ³Y, λZ), and only once per
  point multiplication.

Not built:
- the host application;
- the published point-multiplication program itself; the testbench carries its
  own version, including the ladder and the coordinate randomisation;
- the compiler and instruction-set simulator that go with the processor.

**32-bit datapath.** Setting `W = 32` gives the wider variant. An operand is then
8 words; the multiplier, accumulator and carry-select adder (four 8-bit slices)
scale with W. The CHKB bit index is split into word and bit by W. The modular ALU
has been simulated at this width on P-256 (`tb_alu_w32`), with a 63-entry table
built from the same formula in 32-bit words. The measured costs are MOVE 15,
MADD about 50 and MMUL 230–300 cycles, about 0.45 of the 16-bit cost. The whole
processor at W = 32 has not been run: a WRITE instruction carries only 16 data
bits, so a host could not load full 32-bit words. A wider variant would need a
second data word per WRITE, which the published description does not define.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `microecc_top` | `W` | 16 | Datapath and memory word width. |
| | `NBITS` | 256 | Largest operand. |
| | `FIFO_DEPTH` | 16 | Depth of each FIFO. |
| | `PM_WORDS` | 512 | Program memory size. |
| | `DM_WORDS` | 1024 | Size of each data memory. |
| `alu_datapath` | `S` | 4 | Guard bits of the accumulator. |

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The system-level tests are:

| Testbench | What it checks |
|---|---|
| `tb_microecc_top` | Every instruction at full size against wide-integer arithmetic, including edge values (p−1, results in [p, 2^256), in-place operands), and a program with three nested calls and all jump kinds. It fails if any counted mechanism never occurs: carry and borrow corrections, trial subtraction, write-back stall, both flag values, full stack depth. |
| `tb_curve_switch` | P-256 → P-224 → P-256 on one processor without reset: MADD, MSUB and MMUL on each curve. |
| `tb_ecpm` | Complete point multiplications on both curves, with coordinate randomisation. |
| `tb_alu_w32` | The modular ALU with the 32-bit datapath: every arithmetic instruction on P-256. |

`tb/tb_p256_pkg.sv` holds the shared reference arithmetic and the table builders.

To simulate with Verilator (5.x), for example the point multiplication:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/microecc_pkg.sv tb/tb_p256_pkg.sv tb/tb_ecpm.sv --top-module tb_ecpm -o simv
./obj_dir/simv
```

The other modules are found through `-Irtl` / `-y rtl`. Leaf-block testbenches do
not need the test package. The point-multiplication test runs in a few seconds.
