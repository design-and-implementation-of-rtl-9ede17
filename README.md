# Scalable low-power radix-4 Montgomery multiplier

This is a Montgomery multiplier coprocessor for public-key cryptography (RSA, Diffie-Hellman).
It computes

    S = (A*B + Q*M) / R  with  R = 2^(p*c'),   so   S = A*B*R^-1 (mod M)

for an odd modulus M of up to 2048 bits. The hardware does not depend on the modulus length:
a fixed 528-bit data path handles 1 to 4 chunks (p) of 128 to 512 bits (c) each, and
operands and results move through a shared 2-KB memory with a 32-bit bus. A host CPU puts the
operands in memory, starts the multiplier and reads the result back from the same memory.

The design has three main parts:

* **Radix-4 with two recodings.** Each step takes one 2-bit digit of B, so each step adds one
  multiple of A and one multiple of M. B is Booth recoded, which gives digits in {-2..+2}. The
  quotient digit is chosen with a Montgomery recoding table, which gives digits in {-1..+2}.
  As a result, every multiple needed is a wire shift and/or a bit inversion. 3A and 3M are
  never formed.
* **Carry-save accumulation.** A row of 4-2 compressors adds four vectors each cycle: the
  accumulator's two carry-save vectors, PP and MM. No carry runs across the 533 bit positions.
* **A four-level loop nest (the "processing matrix").** This is what lets one fixed data path
  handle every precision, as explained below.

Intermediate and final values are signed two's complement numbers. A result lies in (-M, M).
It can therefore be fed back as the next operand without the usual final subtraction. Only the
last result of a modular exponentiation needs one correction: add M if it is negative.

## Number format

Let w = 32 (the memory bus), c = 32*cw the chunk length (cw = 4..16 in the intended range), and
p = 1..4 the number of chunks. Then:

* n = p*c is the maximum modulus length.
* Every number is stored as a **p*c'-bit two's complement** value, where c' = c + w/2 = c + 16.
  The extra 16 bits per chunk leave room for sign bits.
* The number is cut into p *extended chunks* of c' bits each. Chunk j occupies halfwords
  `base + j*(2*cw+1)` to `base + j*(2*cw+1) + 2*cw`. Chunks are packed back to back, so every
  second chunk starts in the middle of a 32-bit word.

The operands must meet these conditions:

* M is odd, with 2 < M < 2^n.
* A satisfies -M < A < M.
* B may be anything with |B| < 2^n.

For these inputs the result S lies in (-M, M), so it meets the conditions for A and B of a
following multiplication. It is written, as p*c' bits, to `s_base`.

## The processing matrix

The product is computed over **p rows**. Row r uses chunk r of B: that is c'/2 Booth digits,
and each digit is one cycle. Each row runs through **p+1 columns**:

| column | chunk of A, M, SI used | what it produces |
|---|---|---|
| 0 | chunk 0 | the row's c'/2 quotient digits, stored to memory (area `q_base`) |
| 1 .. p-1 | chunk j | chunk j-1 of the row's result, stored to `s_base` |
| p (last) | none | a carry-propagate pass over what is left in the accumulator, stored as the top chunk |

Column 0 uses chunk 0, where every digit that leaves the accumulator is zero: that is how the
quotient is chosen, and an assertion checks it. The later columns replay the stored quotient
digits and B digits against the higher chunks of A and M.

The accumulator is cleared only at the start of a row. What is left in it at the end of column
j is the carry into column j+1.

From row 1 on, the previous row's result SI (stored in place at `s_base`) is added in. Each
non-last column does this in one extra first cycle: PP is 0 and MM is the SI chunk. The value
sets therefore become PP in {-2A, -A, 0, A, 2A} and MM in {SI, -M, 0, M, 2M}.

Cycles within a non-last column:

1. **SI cycle.** The feedback is shifted. This pushes out the previous column's last digit and
   adds SI at the weight of the new column.
2. **First digit.** The feedback is *not* shifted, so that PP and MM of digit 0 add in at the
   same weight as SI.
3. **Remaining c'/2 - 1 digits.** The feedback is shifted by one digit (two bits) each cycle.
   The digit leaving at the bottom (ACC_L[1:0]) is one result digit.

Result digits are collected 8 at a time into a 16-bit SIPO register and written to memory. B
and Q digits are read 16 bits at a time into PISO registers.

S can be computed in place over SI because column j reads SI chunk j but writes S chunk j-1.

## The accumulator (`csa_accumulator`)

The accumulator has the following registers:

* **ACC_C:** c'+4 bits, signed.
* **ACC_S:** c'+3 bits, signed.
* **ACC_L:** 3 bits, unsigned.

They hold this value:

    V = 4*(ACC_C + ACC_S + ACC_L[2]) + ACC_L[1:0]

ACC_L[1:0] is the digit formed in the last cycle, already resolved into plain binary, and
ACC_L[2] is its carry. Each cycle computes one of:

    shifted:    V' = (V >> 2) + PP + MM     feedback = ACC_C + ACC_S + ACC_L[2]
    unshifted:  V' =  V       + PP + MM     feedback = {ACC_C,ACC_L[1:0]}, {ACC_S,00}, ACC_L[2]

Each of the c'+5 bit positions has one 4-2 compressor. Its inputs are the two feedback bits
(chosen by a pair of multiplexers), PP and MM. PP and MM arrive as bit patterns. A negative
value is the bit inverse, and the missing +1 arrives separately as NEG_PP or NEG_MM.

At the low end, two full adders combine the compressor outputs of positions 0 and 1 with
NEG_MM and NEG_PP. They give the new ACC_L: a two-bit digit and a carry.

ACC_L[2] is placed as follows:

* It is always the carry-in of position 0.
* In unshifted mode it also drives the second input of positions 0 and 1. Together these three
  copies have weight 4.

Sign bits of ACC_C, ACC_S, PP and MM are copied into the top positions, and the top carry-out is
dropped. The register lengths were set by simulation to be free of overflow. The random tests
confirm this for the multiplier's operand ranges.

The SP generator predicts the low digit of feedback + PP without waiting for the compressors:
ACC_C[1:0]+ACC_S[1:0]+ACC_L[2]+PP[1:0]+NEG_PP when shifted, and ACC_L[1:0]+PP[1:0]+NEG_PP when
not. In column 0, the Montgomery recoder picks the quotient digit from SP and bit 1 of M:

| SP | M = ..01 | M = ..11 |
|---|---|---|
| 0 | 0 | 0 |
| 1 | -1 | +1 |
| 2 | +2 | +2 |
| 3 | +1 | -1 |

## Operand registers, prefetch and timing

Each chunk of A and M has **two** 528-bit registers (double buffering). While one pair serves
the current column, a prefetcher loads the next column's chunks into the other pair. It reads
32-bit words at halfword addresses through a staging buffer. The next SI chunk goes into the
single SI register once the current column's SI cycle is over.

Memory accesses have this priority:

1. The digit-stream reads. The next 16 bits of B and of Q are read in fixed digit slots.
2. Pending writes.
3. The prefetcher.

Only column 0 of each row waits for its operands, because its SI chunk is written during the
previous row.

Cycle counts, from simulation, for one multiplication with the operands already in memory:

| p | c | cycles |
|---|---|---|
| 1 | 512 | 368 |
| 2 | 128 | 396 |
| 2 | 512 | 1230 to 1296 |
| 4 | 512 | 4798 |

Of these, the digit steps take p*p*c'/2 cycles. The rest comes from three sources:

* a few set-up cycles, the SI cycle and a write drain in each column;
* the CPA pass at the end of each row, which takes about c/w cycles;
* the wait for operands at the start of each row.

A 1024-bit modular exponentiation (p = 2, c = 512, 1024-bit exponent) takes 1548
multiplications, about 1.9 million cycles.

## Low-power features

* **Glitch blockers** (`glitch_blocker`). Latches that are transparent while clk is low sit on
  the SEL/EN/NEG outputs of both recoders. Recoder glitches during the high phase therefore never
  reach the wide PP/MM generators, and PP and MM reach the compressors together. The latch bits
  reported by synthesis are these latches.
* **Select hold.** SEL_PP and SEL_MM are fed back through 2-bit flops and keep their old value
  whenever EN_PP or EN_MM is 0.
* **SEL_PP code.** +A = ~(+2A) and -A = ~(-2A). Booth digits never go from ±A or ±2A to ±2A of
  the same sign, so this code keeps toggles on SEL_PP low. The codes are +2A=00, -2A=01, -A=10
  and +A=11.

None of this changes the function. Power was not measured here.

## Interface (`montmul_top`)

The top has these ports:

* **Clock and reset:** `clk` and `rst_n`. The reset is active low and asynchronous, and applies
  to all registers except the memory contents.
* **Host port:** `host_en`, `host_we`, `host_addr` (a word address), `host_wdata` and
  `host_rdata`. The read data appears one cycle after the request. This port reaches the memory
  only while `busy` is low.
* **Command:**
  * Inputs `start`, `cfg_p`, `cfg_cw` = c/w, and `a_base`, `b_base`, `m_base`, `s_base`,
    `q_base`. All base addresses are halfword addresses, and `q_base` needs 2*cw+1 halfwords.
  * Outputs `busy` (high from the cycle after `start`) and `done` (a one-cycle pulse at the
    end).
* **Result flags:** `sign_s` is the sign of the result. `ms1b_s` is the bit below the row
  result's sign, meaningful when c >= (p-1)*16.

The result area must not overlap A, B or M. A and B may be the same area, which gives a
squaring. Successive multiplications can point `a_base` and `b_base` at earlier results, so the
host never has to copy data.

## Files

* `rtl/`:

  | file | contents |
  |---|---|
  | `mm_pkg` | shared sizes and codes |
  | `montmul_top` | core plus memory |
  | `montmul_core` | controller and data path |
  | `csa_accumulator` | the accumulator |
  | `compressor42`, `full_adder` | adder cells |
  | `booth_recoder`, `montg_recoder` | the two recoders |
  | `glitch_blocker` | recoder output latches |
  | `pp_generator`, `mm_generator` | the PP and MM generators |
  | `sp_generator` | the SP generator |
  | `rr2cr_cpa` | final conversion adder |
  | `piso_reg`, `sipo_reg` | digit-stream registers |
  | `data_memory` | two 16-bit banks, so 32-bit accesses can start at any halfword |

* `tb/`:
  * `<module>_tb.sv` is a self-checking testbench for each module.
  * `montmul_top_tb` runs the whole design at its default sizes. It covers every p from 1 to 4
    and several chunk lengths, with chained results. It checks each result against a bit-exact
    model and against the Montgomery congruence, and it checks the digit-cycle count. It also
    counts that every mechanism occurred: negative and doubled PP, -M and +2M, held selects,
    unshifted feedback, SI cycles, prefetch overlap, stalls, mid-word chunks and negative
    results.
  * `rsa1024_tb` runs a full 1024-bit exponentiation, which takes about a minute of simulation.

To simulate, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/mm_pkg.sv tb/montmul_top_tb.sv \
              --top-module montmul_top_tb && ./obj_dir/Vmontmul_top_tb

Each testbench prints `TB_RESULT checks=N failures=M`.

## What follows the reference design and what does not

These parts follow the reference design:

* the algorithm, the Booth and Montgomery tables, and the signed operand ranges;
* the row/column loop and the SI cycle with shifted, then unshifted, feedback;
* the register lengths (c'+4, c'+3 and 3) and the c'+5 compressor row;
* the 4-2 compressor and full-adder cells, and the places where NEG_PP and NEG_MM enter;
* the SP formulas and the double-buffered A/M registers with a single SI register;
* the PISO/SIPO digit streams and the pipelined w-bit CPA;
* the glitch-blocking latches, the select hold flops and the SEL_PP code rule;
* the default sizes (w = 32, a 512+16-bit data path, p up to 4, 2 KB of memory).

These parts are this design's own, because the reference leaves them open:

* **Accumulator weights.** The value held is 4*(ACC_C+ACC_S+ACC_L[2]) + ACC_L[1:0]. This is
  chosen to agree with the SP formula. A plain "2*(ACC_C+ACC_S)+ACC_L" reading would not.
  ACC_L[2] in unshifted mode is placed as described above.
* **Stream width.** The digit streams move in **16-bit units**, not the 32-bit PISO/SIPO
  registers of the reference. Extended chunks are aligned in 16-bit steps, and this way both
  alignments are handled alike.
* **Prefetch.** A/M/SI chunks load through a staging buffer by a prefetcher, with the access
  priorities given above.
* **Top chunk.** The CPA writes the whole sign-extended top chunk of each row result to
  memory, and SI is read back from memory. In the reference, the top two bits are kept in
  flip-flops (SIGN_S, MS1B_S) and merged into SI. Here they are still registered and output.
* **Memory layout and handshake.** The layout (base addresses, one chunk-sized Q area, S in
  place over SI), the two-bank memory, the start/busy/done handshake, the host arbitration, the
  codes for SEL_MM and for the stored quotient (qm mod 4), and reset are all chosen here.
* **Chunk length range.** `cfg_cw` accepts 1..16 (c = 32..512), where the reference names
  128..512. Smaller values are useful in simulation.

Not covered: gate count, clock rate and power. Those depend on a standard-cell
implementation. The RTL has been checked in simulation only.
