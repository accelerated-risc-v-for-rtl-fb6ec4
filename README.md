# SIKE field-arithmetic coprocessor

This repository holds the RTL of a small coprocessor for the isogeny-based key encapsulation
scheme SIKE. It is modelled on the published design "Accelerated RISC-V for Post-Quantum SIKE".

SIKE spends nearly all of its time on additions, subtractions and multiplications in the prime
field F_p, with primes of 434 to 751 bits. Everything above that level changes often and is
cheap, so it stays in software on a small 32-bit CPU: the protocol, hashing, the isogeny
formulas and the F_p² layer. The coprocessor does only the expensive part. It keeps up to 256
field elements in its own RAM. It accepts three-address instructions (`dst <- a op b`, op = add,
sub or mul) through a 32-bit APB peripheral port. It executes them with:

- a two-cycle modular adder built only from carry-chain cells, and
- a systolic Montgomery multiplier that runs two multiplications at once, on alternate clock
  cycles.

An instruction controller overlaps all of this. It keeps the adder and both multiplier slots busy
and holds back only the instructions that would see stale data.

One design serves all four SIKE primes p = 2^eA·3^eB − 1. The bus can switch between them at run
time:

| level | prime | eA  | eB  | words n (17 bit) | mul latency 3n+3 | interleave 2n |
|-------|-------|-----|-----|------------------|------------------|---------------|
| 0     | p434  | 216 | 137 | 26               | 81               | 52            |
| 1     | p503  | 250 | 159 | 30               | 93               | 60            |
| 2     | p610  | 305 | 192 | 36               | 111              | 72            |
| 3     | p751  | 372 | 239 | 45               | 138              | 90            |

Field elements are kept in redundant form in [0, 2p), so the hardware never reduces fully. The
final reduction to [0, p) is left to software at the end of a protocol run. Every datapath is 752
bits wide, enough for 2·p751.

## System view

```
      CPU (software, not in this repository)
       | APB
  +----v-------------------------------- sike_coproc -------------------------------+
  |  apb_bridge --> data_buffer (768 b) <---------> coproc_ram 256 x 752             |
  |      |      --> instr_fifo (32 x 26) --> instr_ctrl --> port A (CPU / products)  |
  |      |                                      |       --> port B (sums)            |
  |      +--> level --> coproc_alu: mod_adder (fast_adder x2 <- gs_chain)            |
  |                                 dual_mont_mult (mont_core)                       |
  +----------------------------------------------------------------------------------+
```

| file                 | block                                                          |
|----------------------|----------------------------------------------------------------|
| `rtl/sike_pkg.sv`    | widths, opcodes, instruction layout, prime constants (computed) |
| `rtl/gs_chain.sv`    | Manchester carry chain ("GS" cell row)                          |
| `rtl/fast_adder.sv`  | two-stage block adder made of GS chains                         |
| `rtl/mod_adder.sv`   | addition/subtraction mod 2p                                     |
| `rtl/mont_core.sv`   | systolic Montgomery multiplier array                            |
| `rtl/dual_mont_mult.sv` | odd/even wrapper that runs two multiplications on one array  |
| `rtl/coproc_alu.sv`  | modulus registers, operand registers, adder and multiplier      |
| `rtl/coproc_ram.sv`  | 256 × 752 true dual-port RAM, two-cycle read                    |
| `rtl/data_buffer.sv` | 768-bit shift register between the bus and the RAM              |
| `rtl/instr_fifo.sv`  | 32 × 26 circular instruction buffer                             |
| `rtl/instr_ctrl.sv`  | instruction controller: pipelines, multiplier slots, locks      |
| `rtl/apb_bridge.sv`  | APB slave, command decoder                                      |
| `rtl/sike_coproc.sv` | top level                                                       |

## Montgomery multiplier array (`mont_core`)

### What it computes

For operands a, b < 2p of n words of w = 17 bits, the array computes

    T = (a·b + Q·p) / 2^(17n),   with Q chosen so that the division is exact,

that is, a·b·R⁻¹ mod p with R = 2^(17n), and the result is again in [0, 2p). Two properties of
SIKE primes make the array cheap:

1. **The quotient is free.** p ≡ −1 (mod 2^17), so −p⁻¹ ≡ 1. The Montgomery quotient of each
   step is therefore just the low word of `T[0] + a_i·b[0]`; no multiplication is needed.
2. **Most of the modulus is zero.** Adding q·p equals adding q·m − q with m = p + 1 = 2^eA·3^eB.
   The "−q" happens by itself: the low word is dropped anyway, and the row-0 carry is exactly
   (x − q)/2^17. The multiplier used is m, and m has eA ≥ 216 trailing zero bits. Its low
   s_A = ⌊216/17⌋ = 12 words are zero for every prime, so rows 0..11 have no reduction
   multiplier.

With S = 45 rows (765 bits ≥ 752 + guard), the array needs S multipliers for a_i·b[j] and
S − s_A reduction multipliers for q_i·m[j]: 2S − s_A = 78 17×17 multipliers, one DSP slice each.
An array sized for a single prime (S = n, s_A = ⌊eA/17⌋) would need 40, 46, 55 or 69
multipliers for p434, p503, p610 or p751. The parameters allow such builds; the default shares
one array among all four primes.

### Row structure

Row j (0 ≤ j < S) holds word j of everything:

```
   a_in ──> A[0] ──> A[1] ──> ... ──> A[j] ──> ...          serial a_i, one row per cycle
                                        │ × b[j]
   q ──> qd[0] ──> qd[1] ──> ... ──> qd[j-3] × m[j] ──> R[j]   (rows j >= s_A only)
                                        │
                                   U[j] = a_i·b[j] + R[j]          (35 bits, registered)
   X[j] (= T[j]) ──┐                    │
   C[j-1] ─────────┴──> sum_j = X[j] + U[j] + C[j-1]
                         low 17 bits -> X[j-1]   (row 0: low word = quotient q)
                         high 18 bits -> C[j]
```

- **mul block:** row j multiplies the a word in its shift-register stage by b[j].
- **red block:** row j multiplies the delayed quotient by m[j] and adds it into U[j].
- **acc block:** row j adds the previous partial result word, U[j] and the carry from row j−1.
  It passes the low word down one row (the division by 2^17) and keeps the high part as the
  next carry. The last row loads its own carry as its new top word.

On the first step of an operation the X registers count as zero. This comes from a start flag
that travels down the rows with the data, so a new operation can enter while the previous one
is still draining from the upper rows.

### Timing

Let the caller present a_0 with `start` in cycle c0 and a_i in cycle c_i = c0 + 2i. Then for
step i:

| cycle         | row j activity                                                        |
|---------------|-----------------------------------------------------------------------|
| c_i + 1 + j   | a_i reaches stage A[j]; b[j] is sampled; R[j] = q_i·m[j] is registered |
| c_i + 2 + j   | U[j] = a_i·b[j] + q_i·m[j] is present; the row sum is formed           |
| c_i + 2       | (row 0) the sum gives q_i, which enters the quotient chain             |
| c_i + 3 + k   | q_i is in chain stage k, so row j uses stage j − 3                     |

This is where the two-cycle rhythm comes from. The sum of row j in step i needs X[j], which is
the low word of row j+1's sum in step i−1. Row j+1 of step i−1 runs in cycle
c_{i−1} + 3 + j = c_i + 1 + j when steps are two cycles apart. That is exactly one cycle before
it is needed, with one register in between. If a words came every cycle, the two would fall
into the same cycle and the loop would not close. The array therefore accepts a new a word only
every second cycle. Each row is busy on one cycle out of two.

The quotient also needs time. q_i exists in cycle c_i + 2, and row j must have q_i·m[j]
registered by cycle c_i + 1 + j. So row j needs q_i from chain stage j − 3, which only works for
j ≥ 3. Since the first reduction row is s_A = 12, the quotient is always early enough. The core
checks 3 ≤ s_A < S when it is elaborated. Rows with j < s_A never use the chain.

After n steps, word j of the result sits in X[j] during the single cycle c0 + 2n + 2 + j. The
result comes out as a diagonal: one word per cycle, starting at the bottom row.

### Why the carries fit

U[j] < 2·(2^17)² = 2^35. If the incoming carry is below 2^18, the row sum is below
2^17 + 2^35 + 2^18 < 2^36, so the new carry (sum >> 17) is again below 2^18. By induction every
carry fits in w + 1 = 18 bits, which is the width of the C registers.

For the top row: with a, b < 2p and 4p < R, every partial result stays below b + m < 4m ≤ 2^(17n).
The carry into row n therefore vanishes, and truncating the last row's carry to 17 bits loses
nothing. The condition 4p < 2^(17n) holds for all four primes: 442 ≥ 436, 510 ≥ 505, 612 ≥ 612
and 765 ≥ 753 bits.

## Dual odd/even multiplier (`dual_mont_mult`)

The array is idle on every other cycle of every row. The wrapper fills those cycles with a
second, independent multiplication:

- **Slot 1** owns the odd cycles and **slot 2** the even ones. A free-running phase bit is
  exported as `odd`. `start1` may only be pulsed when `odd = 1`, and `start2` only when `odd = 0`.
- **a operands:** `start_k` loads a_k into that slot's 45-word shift register. Each cycle, the
  register of the slot whose turn it is drives the array's serial input and shifts by one word.
  The array thus sees a_1,0, a_2,0, a_1,1, a_2,1, … on consecutive cycles.
- **b operands:** b is held in parallel, but row j serves slot 1 and slot 2 in alternating
  cycles. Its row-j phase is shifted by j because the a words move down one row per cycle.
  Each slot has its own row registers b_k[j]. They load from b_k j cycles after `start_k`, along
  a delayed start chain. So a slot can take a new operation while rows above still work on the
  old one. In front of the array, a per-row 2:1 multiplexer picks `phase XOR j[0]`, which
  selects the slot that row j serves next cycle. It is registered together with the a stage.
- **results:** a read pulse `read_k`, delayed two cycles and then one more per row, captures
  row j's output word into the slot's result register t_k exactly in the cycle the word is
  valid. t_k is cleared when the capture starts, so words above n read as zero.

Slot k timing, with `start_k` in cycle t0 and an n-word prime:

| event                         | cycle          | p751 (n = 45) |
|-------------------------------|----------------|---------------|
| start_k (array start t0 + 1)  | t0             | t0            |
| read_k                        | t0 + 2n + 1    | t0 + 91       |
| product complete in t_k       | t0 + 3n + 3    | t0 + 138      |
| next start in the same slot   | t0 + 2n + 2 or later | t0 + 92   |

The interleave delay sets the throughput. A slot is free again right after its read pulse (the
next cycle of its parity, 2n + 2 cycles after its start). So the pair delivers roughly one
product every n + 1 cycles, against a latency of 3n + 3. The two slots start in cycles of
different parity, so their product-write cycles (t0 + 3n + 3) also differ in parity and can
never collide. The controller asserts this.

## Modular adder (`gs_chain`, `fast_adder`, `mod_adder`)

### GS carry chain

The basic cell mirrors the FPGA carry primitive: carry c[i+1] = p[i] ? c[i] : g[i], and sum
s[i] = p[i] ⊕ c[i]. A plain ripple chain is fast on an FPGA, but 768 bits are too long for one
chain. `gs_chain` is one such chain; the three named uses are:

- GSc: carry-in given;
- GS0: carry-in 0;
- GS1: carry-in 1, used to add one.

### Block adder

`fast_adder` cuts the 768-bit operands (given as P = a ⊕ b, G = a) into 24 blocks of 32 bits:

1. Row 1: block 0 goes through a GSc chain with the carry-in, giving the low result and carry
   g_0. Every other block j goes through a GS0 chain, giving sum S_j and block carry g_j.
2. Row 2: a GS1 chain on p = g = S_j gives T_j = S_j + 1. Its carry-out is the block propagate
   p_j (S_j all ones). p_j and g_j are never both 1.
3. Pipeline register.
4. Row 3: one more GSc chain over the block signals (p_j, g_j), with carry-in g_0. It produces
   the carry into every block. This is a carry-lookahead built from carry-chain cells instead
   of a prefix tree.
5. Row 4: per block, a 2:1 multiplexer picks T_j when the block's carry is 1, else S_j.
6. Pipeline register. Latency 2, one addition per cycle.

### Mod-2p addition and subtraction

`mod_adder` runs two fast adders side by side on 768-bit words:

- X = a ± b (subtraction as a + ~b + 1);
- Y = a ± b ∓ 2p.

Y has three operands: a, ±b and the constant ∓2p. They are reduced to two partial sums without
any carry propagation:

1. Cut all three operands into 2-bit pairs.
2. In each pair, add the three 2-bit values. The result has 4 bits (at most 9), so it fills its
   own pair and at most the next one.
3. The 4-bit results of the even-numbered pairs never overlap each other, and they form the
   first partial sum. The results of the odd-numbered pairs form the second.

The second fast adder then adds the two partial sums. Their sum is exactly a ± b ∓ 2p. Bit 753
of each result acts as the sign:

- addition: Y is taken if a + b ≥ 2p, else X;
- subtraction: X is taken if a ≥ b, else Y (that is, a − b + 2p).

The selection follows the adders' second register, so the result is valid 2 cycles after the
operands. The modulus 2p is a register in the ALU, loaded by the level command.

## Instruction controller (`instr_ctrl`)

### Instruction word

26 bits, pushed through the bus (bits 25:0 of the write data):

| bits  | 25:18      | 17:10      | 9:2         | 1:0                               |
|-------|------------|------------|-------------|-----------------------------------|
| field | source a   | source b   | destination | op: 0 add, 1 sub, 2 mul, 3 end    |

### Pipelines

Instruction I issues in cycle I. Issue means both source addresses go to the RAM and the
instruction leaves the buffer.

| cycle             | add / sub                        | multiplication                               |
|-------------------|----------------------------------|----------------------------------------------|
| I (RAM1)          | read a on port A, b on port B    | same; slot = toggle bit, which then flips     |
| I+1 (RAM2)        | RAM read in progress             | same                                          |
| I+2               | ADD1: operands enter the adder   | LOAD: operands into the slot's registers      |
| I+3               | ADD2                             | wait for the slot's parity, then START at S   |
| I+4               | sum written through port B       | stage 1: count 2n cycles                      |
| S+2n+1            |                                  | READ pulse to the slot                        |
| S+2n+1 … S+3n+2   |                                  | stage 2 (n+1 more cycles)                     |
| S+3n+3            |                                  | product written through port A, mux = slot    |

Each slot has its own front machine (idle, wait for parity, stage 1) and back machine (stage 2,
write). A slot can therefore load and start a new multiplication while its previous product is
still in stage 2. This is what the array allows, because the row-by-row b registers keep the
two operations apart. Additions need no state beyond their pipeline registers. An END
instruction stops issue. The controller reports inactive (status bit 0 = 0) once nothing is
left in flight.

### Locks

Issue stops, and nothing before RAM1 moves, while any of the following holds:

- **Multiplier lock:** the next multiplication's slot still has a multiplication between RAM1
  and the end of stage 1. Both slots are then taken.
- **Memory lock:** a source of the instruction is the destination of an instruction issued
  earlier and not yet written. Here the destination is compared too, so two writes to one
  address always land in program order. A short add can no longer overtake a long
  multiplication to the same destination.
- **Write lock:** a RAM port writes in this cycle. The RAM cannot read and write on a port in
  the same cycle, so RAM1 waits one cycle.

The controller keeps a list of destinations in flight for the memory lock: the pipeline
stages, plus LOAD-to-write for each slot. It exposes one event pulse per lock (`ev_mul_lock`,
`ev_mem_lock`, `ev_wr_lock`) for counting.

## Bus interface and buffers (`apb_bridge`, `data_buffer`, `instr_fifo`, `coproc_ram`)

APB byte offsets:

| offset | name        | access | effect                                                                |
|--------|-------------|--------|-----------------------------------------------------------------------|
| 0x00   | Write RAM   | write  | RAM[wdata[7:0]] <= data buffer (low 752 bits)                         |
| 0x04   | Read RAM    | write  | data buffer <= RAM[wdata[7:0]]; 2 wait states for the RAM read        |
| 0x08   | Data Buffer | write  | shift wdata into the top of the buffer (the low word falls out)       |
|        |             | read   | return the low 32 bits, rotate the buffer right by 32                 |
| 0x0C   | Sec Level   | write  | wdata[1:0] = level (table above): sets 2p, p + 1 and n                |
| 0x10   | Start       | write  | controller starts taking instructions                                 |
| 0x14   | Status      | read   | bit 0: controller active                                              |
| 0x18   | Instruction | write  | push wdata[25:0]; pready stays low while the buffer is full           |

- **Writing an element:** 24 writes to 0x08, least significant word first, then a write to 0x00
  with the address.
- **Reading an element:** a write to 0x04 with the address, then 24 reads of 0x08, least
  significant word first.
- **Running a program:** Sec Level, Start, the instructions ending with END, then poll Status
  until it is 0.

While the controller is active it owns both RAM ports, so RAM commands get `pslverr` and do
nothing. The level is p751 after reset.

- `data_buffer`: 768-bit register (24 bus words). Loading from the RAM wins over a shift.
- `instr_fifo`: 32-entry circular buffer with empty and full flags. Empty goes to the
  controller, full to the bus.
- `coproc_ram`: 256 × 752 true dual-port RAM. The read data appears two cycles after the
  address (address register plus output register). If both ports write one address in the same
  cycle, port B wins; the controller never does this.
- Port A belongs to the bus while the controller is idle, and to the controller (reads and
  products) while it is active. Port B is always the controller's (reads and sums).

## What follows the source design and what is chosen here

Follows the source design:

- the prime set, mod-2p arithmetic, w = 17, S = 45, s_A = 12 and 78 multipliers;
- the mul/red/acc row split, the free quotient, m = p + 1 and the skipped reduction rows;
- the dual odd/even multiplier with shift-register a inputs, enabled b registers, and delayed
  start and read chains;
- the latencies 3n+3 and interleave delays 2n (81/52, 93/60, 111/72, 138/90);
- the four-row GS adder with the GS-chain lookahead and select multiplexer, its two pipeline
  stages, and the parallel X/Y candidates, with Y's three operands reduced to two partial sums
  by bit pairs;
- the 256 × 752 two-cycle RAM with one write port for products and one for sums;
- the 768-bit data buffer and the 32 × 26 instruction buffer;
- the seven APB commands;
- the RAM1/RAM2 decode, the add and two multiply pipelines with stage 1/stage 2 counters, and
  the three locks.

Choices made here, where the source is silent or differs:

- **Adder block size** is 32 bits everywhere. The source only says a single size is used.
- **Three-operand step:** the source explains the bit-pair partial sums with a single example.
  The reading above (4-bit pair results, placed alternately into the two partial sums) is this
  design's.
- **s_A:** the algorithm listing writes s_A from 2^eA, the text from eA. The text's
  ⌊eA/w⌋ = 12 is used.
- **Register placement inside a row** (where U, R, X and C are registered), and the quotient
  tap at chain stage j − 3, are this design's. The result is the diagonal timing above.
- **Memory lock** also covers the destination (write-after-write). The source lists only the
  source check.
- **Bus details:** argument positions in the write data, the full-buffer wait state, the
  Read RAM wait states, `pslverr` for RAM commands while active, the level numbering and the
  p751 reset level.
- **Instruction field order** (sources above destination above opcode). The source gives only
  the field sizes.
- **Port B wins** on a RAM write collision.

Not included:

- the RISC-V processor system: the CPU core, its program RAM, the APB decoder, the UART/GPIO;
- the SIKE software: protocol, SHAKE256, isogeny formulas, F_p² arithmetic and the final
  reduction mod p;
- the FPGA-specific mapping (carry primitives, DSP and BRAM inference attributes). The RTL is
  generic, and the carry chains are written as plain logic;
- speed and area figures, which have not been checked.

## Simulation

The RTL is SystemVerilog-2017 and needs no vendor libraries. Every testbench is self-checking.
It ends with a line `TB_RESULT checks=<n> failures=<m>` and has a watchdog timeout.

With Verilator 5 (the package first; `-y rtl` finds the other modules by name):

```
verilator --binary --timing --assert -Wno-fatal -j 8 \
    -y rtl rtl/sike_pkg.sv tb/tb_sike_coproc.sv --top-module tb_sike_coproc -Mdir obj_top
./obj_top/Vtb_sike_coproc
```

Replace `tb_sike_coproc` with any other testbench name. The testbenches:

| testbench               | what it checks                                                                      |
|-------------------------|-------------------------------------------------------------------------------------|
| `tb_gs_chain`           | every sum bit and carry of random and corner chains                                 |
| `tb_fast_adder`         | 768-bit sums and carries, back-to-back, against `+`                                 |
| `tb_mod_adder`          | add/sub mod 2p for all four primes, including both correction cases                 |
| `tb_mont_core`          | full 45-row array, all primes, two interleaved operations, exact results             |
| `tb_mont_core_sizes`    | the small s = 8, s_A = 3 array and the four single-prime arrays; row alignment of a_i·b_j and q_i·m_j checked every cycle against the digits of the full quotient Q; multiplier counts 2S − s_A |
| `tb_dual_mont_mult`     | both slots, back-to-back restarts, 3n+3 latency and 2n reuse                        |
| `tb_coproc_alu`         | level constants, operand loading, product selection, adder path                     |
| `tb_coproc_ram`         | both ports, two-cycle read, collisions                                              |
| `tb_instr_fifo`         | order, full/empty, wrap-around                                                      |
| `tb_data_buffer`        | shift in, rotate out, load                                                          |
| `tb_instr_ctrl`         | cycle-by-cycle issue, locks, write timing against a scoreboard                      |
| `tb_apb_bridge`         | every command, wait states, error response                                          |
| `tb_sike_coproc`        | whole coprocessor at full size over APB: an F_p² multiplication and random programs for all four primes, with a count of every mechanism (locks, dual use, corrections, wait states) |
| `tb_sike_isogeny`       | SIKE point arithmetic on the whole coprocessor for all four primes: two x-only doublings and one x-only tripling in F_p², expanded into F_p instructions (Karatsuba multiply, two-multiplication square), checked word by word and, after conversion out of Montgomery form on the coprocessor, against direct F_p² arithmetic |

Cycles the controller is active for that routine set (218 instructions, 71 of them
multiplications): 3461 (p434), 3904 (p503), 4570 (p610) and 5575 (p751). The doubling and
tripling formulas are the standard SIKE x-only formulas on Montgomery curves.

The reference model in the testbenches computes Montgomery products exactly as
(a·b + Q·p)/2^(17n) with Q = a·b·(−p⁻¹) mod 2^(17n). p⁻¹ mod 2^(17n) is found by Newton
iteration, so the model needs no stored constants.
