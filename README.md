# Self-compensation fixed-width Booth multiplier and a 128-point FFT built on it

A fixed-width multiplier takes two n-bit operands and returns only the upper n
bits of their 2n-bit product. The cheap way to build one is to drop every adder
that works on the lower n columns. That roughly halves the multiplier, but it
also throws away the carries that the low half would have passed upwards. The
result is then always too small, by up to several units of its last bit.

This design keeps the cheap structure and adds an estimate of that lost carry.
The estimate looks at just one column: the most significant of the dropped
columns, called **LP_major** here. Let **β** be the number of ones in that
column. The estimated carry is a small function of β and the operand width. It
is formed by at most four full and half adders and added into the lowest kept
column. The mean error then falls to 15–25 % of plain truncation, for almost no
extra area.

The second half of the RTL puts the multiplier to work. It is used for every
non-trivial twiddle factor of a 128-point, four-path, mixed-radix (2 × 8 × 8)
pipelined FFT. The chip around the FFT loads 10-bit samples serially into a
256-word memory, transforms them and returns 14-bit results serially. A
double-data-rate register cell sits beside the chip. It belongs to an
alternative build of the same chip that runs at half the clock.

All RTL is synthesisable SystemVerilog (IEEE 1800-2017) with no vendor
primitives. Tables are computed during elaboration, so there are no data
files.

## Module map

| module | what it is |
|---|---|
| `scfw_pkg` | per-width carry-equation constants, FFT frame constants |
| `carry_estimator` | the adder tree that turns LP_major into carry bits |
| `sc_fixed_width_mult` | n × n → n self-compensation Booth multiplier (default n = 10) |
| `complex_mult` | complex sample × twiddle with four fixed-width multipliers |
| `twiddle_rom` | W_P^e table, computed at elaboration |
| `w8_rotator` | multiplier-free × 1, W8¹, −j, W8³ |
| `sdf_bu2_stage` | radix-2 butterfly with a D-deep feedback delay line |
| `bu8` | radix-8 butterfly for one data path: three `sdf_bu2_stage`s and two rotators |
| `fft_module1` | radix-2 stage: register file, 4 butterflies, 2 complex multipliers |
| `fft_module2` | four `bu8`s, then four complex multipliers (W64) |
| `fft_module3` | last radix-8 step across the four paths, no multipliers |
| `fft128` | the three modules in a row, plus the frequency index of every output |
| `sample_buffer` | 256 × 14-bit sample memory with serial and four-wide ports |
| `fft128_chip` | **top**: serial load, FFT run, serial unload; plus the DDR cell |
| `ddr_register` | double-data-rate register built from two latches |

## The carry estimate

### Where LP_major comes from

The multiplier operand b is recoded into n/2 radix-4 Booth digits
dᵢ ∈ {−2, −1, 0, 1, 2}. Digit i selects an (n+1)-bit row dᵢ·a, shifted left by
2i. A negative digit gives the one's complement of |dᵢ|·a plus a separate
correction bit nᵢ = 1 in the row's lowest column. This is the usual way to
avoid a carry chain when forming each row.

Number the product columns 0 … 2n−1. Columns n … 2n−1 (HP) are kept, and
columns 0 … n−1 (LP) are not built at all. Column n−1 is LP_major. Row i
reaches that column with its bit n−1−2i, so LP_major holds exactly one bit from
each of the n/2 rows. β counts how many of those n/2 bits are 1.

### The equations

The carry that LP would have sent into column n grows with β, and it has a
roughly constant share from the columns below LP_major. The estimate per width
is:

| n | estimated carry into column n |
|---|---|
| 8 | ⌊β/2⌋ + 1 |
| 10, 12, 14 | ⌊(β+1)/2⌋ + 1 |
| 16 | ⌊β/2⌋ + 2 |

These equations come from the source design. `scfw_pkg` encodes them as two
numbers per width:
- `ce_tree_ones(n)`: how many constant 1s enter the adder tree (the "+1"
  inside the floor);
- `ce_const_carries(n)`: how many carry bits are tied to 1 (the constant
  outside the floor).

The code accepts only even n from 8 to 16.

### Turning β into carries with adders

⌊β/2⌋ is the number of carries produced when the LP_major bits are added up
with full and half adders. `carry_estimator` builds this in stages:
- it groups the current sum signals in threes, one full adder each;
- a left-over pair goes to a half adder, and a single left-over signal passes
  through;
- this repeats until one sum signal is left, and that signal is discarded.

Every adder carry has the weight of column n, so the carries count ⌊β/2⌋, or
⌊(β+1)/2⌋ when a constant 1 joins the tree. Each carry is a separate output bit
of weight one, and the multiplier adds all of them into column n. This gives:
- n = 8: one full adder and one half adder;
- n = 10: two full adders and one half adder;
- n = 12: three full adders;
- n = 14 and 16: three full adders and one half adder.

The source design quotes the same counts for n = 8 and n = 12, and four full
adders for n = 16. The n = 16 difference is in how the adders are grouped, not
in the value produced.

### How good the estimate is

`tb_sc_fixed_width_mult` checks every result against an independent model of
the same arithmetic:
- exhaustively for n = 8, 10 and 12 (2¹⁶, 2²⁰ and 2²⁴ operand pairs);
- on 300 000 random pairs for n = 14 and 16.

It also measures the error against the exact product, in units of the full
product's LSB:

| n | mean \|error\|, truncation | mean \|error\|, this multiplier | published | variance | published |
|---|---|---|---|---|---|
| 8 | 384.3 | 88.8 | 87.2 | 4111 | 3990 |
| 10 | 1920 | 460.9 | 457.9 | 107 046 | 106 142 |
| 12 | 9216 | 1654 | 1652 | 1 447 257 | 1 442 707 |
| 14 | 42 996 | 6769 | – | – | – |
| 16 | 196 597 | 31 269 | 31 250 | 5.2·10⁸ (sampled) | 4.2·10⁸ |

The test requires the mean error to be within 3 % of the published figures. For
n = 8, 10 and 12 it also requires the variance to be within 5 %. The source
design reports a larger error for direct truncation, so its "percent of
truncation" figures are lower than the ratios here. The absolute errors agree.

## The multiplier datapath

`sc_fixed_width_mult` builds the n/2 Booth rows in plain combinational logic.
From each row it keeps only the bits at columns ≥ n, sign-extended, and adds
those together with the carry bits. A row's nᵢ bit lies in column 2i < n, so it
is always dropped. Its effect is part of what the estimate accounts for.

The kept part is written as a word-level sum, and synthesis chooses the adder
array. The source design draws it as an explicit full-adder array with a final
carry-propagate adder.

- Ports: `a`, `b`, `p`, all signed N-bit.
- `p` approximates a·b / 2ᴺ.
- The module is purely combinational.

The parameter `MODE` also builds two reference multipliers, so the design can
be measured against them. `MUL_SC` (0, the default) is the design itself.
`MUL_TRUNC` (1) drops the low columns with no compensation. `MUL_FULL` (2) forms
the complete product and rounds it to n bits. `complex_mult` passes `MODE` on,
and `fft_module1`, `fft_module2` and `fft128` pass it on as `MUL_MODE`. The
chip always uses `MUL_SC`. `tb_sc_fixed_width_mult` checks both reference kinds
bit-exactly at n = 8 and 12.

## Complex multiplication with fixed-width parts

`complex_mult` computes re = ar·wr − ai·wi and im = ar·wi + ai·wr with four
square multipliers of width MW = DW + 1.

- The data goes in as {a, 0}, one bit higher.
- The TW_W-bit twiddle is left-aligned as a fraction with MW−1 fraction bits.
- The kept upper half of each product is then a·w in the data's own scale.
- The sums are saturated to DW bits. Saturation only happens in the corner
  where both components are close to full scale.

In the FFT, DW = 11, so the multipliers are 12 × 12 (n = 12).

## The 128-point FFT and its data order

The hardest part of the design is knowing which sample sits on which lane in
which cycle. Everything is described with the following decomposition. Write
the input index n and the output index K as

    n = 64·n1 + n2            n1 ∈ {0,1},  n2 ∈ 0..63
    n2 = 8·t + a4             t, a4 ∈ 0..7
    K = k1 + 2·(k + 8·b)      k1 ∈ {0,1},  k, b ∈ 0..7

- **Module 1** does the radix-2 step over n1 and multiplies by W128^(n2·k1).
- **Module 2** does an 8-point DFT over t (result index k) for every a4, then
  multiplies by W64^(a4·k).
- **Module 3** does an 8-point DFT over a4 (result index b).

Each radix-8 step is itself three radix-2 steps. The digits of k and b are
bit-reversed on the way: k = b1 + 2·b2 + 4·b3 is produced in the order b1, b2,
b3. Between those steps the rotations by 1, −j, W8¹ and W8³ are done by
`w8_rotator`. It uses swaps, negations and √2/2 ≈ 2⁻¹ + 2⁻³ + 2⁻⁴ + 2⁻⁶ + 2⁻⁸,
so these rotations need no multipliers.

### Input

A frame is 32 beats (cycles), and all four lanes are used on every beat.

- Beat m carries in(4m + l) on lane l = 0 … 3.
- `in_start` marks beat 0 and `in_valid` is high on all 32 beats.
- Frames may follow each other without a gap.

### Module 1: radix-2 over n1 (`fft_module1`)

- **Beats 0–15** bring n1 = 0, i.e. in(0) … in(63). They are written into a
  register file of 16 rows × 4 lanes of complex words.
- **Beats 16–31** bring n1 = 1. On each of them, each lane's butterfly takes
  in(i) from the register file and in(64 + i) from the input.
  - The four sums (k1 = 0) go straight out.
  - The four differences (k1 = 1) are written back into the same row. They
    leave during beats 0–15 of the next frame.

The differences need W128^(n2). There are only two complex multipliers and two
twiddle ROMs:
- lanes 0 and 1 are multiplied when the differences are stored;
- lanes 2 and 3 are multiplied when the row is read out again.

So both multipliers work on every beat. Module 1 outputs the 16 sum beats, then
the 16 difference beats. Lane l of output beat m holds n2 = 4m + l of its half.
The latency is 17 cycles, and the output is one bit wider (11 bits).

### Module 2: first radix-8 step, per lane (`fft_module2`, `bu8`)

Lane l holds n2 = 4m + l. So n2 mod 8 = a4 = l + 4·(m mod 2), and t = ⌊m/2⌋ (of
the half). Each lane therefore carries two independent 8-point groups,
a4 = l and a4 = l + 4, interleaved beat by beat.

One `bu8` per lane handles them with three delay-feedback radix-2 steps:
- the delay lines hold 8, 4 and 2 samples;
- those are 4, 2 and 1 group samples apart, times the interleave factor of 2.

Each `sdf_bu2_stage` works on blocks of 2D beats:
- during the first D beats it stores the new samples and sends out the
  previous block's differences;
- during the last D beats it outputs the sums at once and stores the
  differences.

The outputs of the 8-point DFTs come out bit-reversed. Within a 16-beat block,
output beat q holds group u = q[0] and index k = q[3] + 2·q[2] + 4·q[1].

Next, the three LSBs of each 14-bit `bu8` result are dropped. A complex
multiplier per lane then applies W64^(a4·k), with its own twiddle ROM. The
output is 11 bits wide and the latency is 18 cycles.

### Module 3: second radix-8 step, across the lanes (`fft_module3`)

Now the eight members of a group (a4 = 0 … 7, fixed k and k1) arrive in two
consecutive beats: a4 = l on the even beat and a4 = l + 4 on the odd beat.
Write a4 = 4·a1 + 2·a2 + a3. Then a1 is the beat parity, a2 is lane bit 1 and
a3 is lane bit 0. The three radix-2 steps are:

1. **Over a1 (in time).** Each lane has a butterfly with a one-register delay
   line. Lanes 2 and 3 are then multiplied by (−j)^b1.
2. **Over a2 (across lanes).** Butterflies pair lanes 0/2 and 1/3. The b2 = 1
   results move to lanes 2/3, and lanes 1 and 3 are multiplied by
   W8^(b1 + 2·b2).
3. **Over a3.** Butterflies pair lanes 0/1 and 2/3.

The result sits on lane L = 2·b2 + b3 of a beat with parity b1. The latency is
3 cycles and the output is 14 bits wide.

### Output index

`fft128` adds the three latencies (17 + 18 + 3 = 38 cycles from `in_start` to
`out_start`). For each lane it reports the frequency index of that lane's
result. Let q be the beat within the frame, counted from `out_start`. Lane L of
beat q holds X(K) with

    K = 2·(k + 8·b) + k1,   k1 = q[4],  k = q[3] + 2·q[2] + 4·q[1],
                            b  = q[0] + 2·L[1] + 4·L[0]

In other words the output order is a digit reversal of the input order.
`out_idx` is this K as a 7-bit number, one per lane.

### Word widths and scaling

| point | width | scale |
|---|---|---|
| input | 10 | x |
| after module 1 | 11 | one butterfly, no loss |
| inside `bu8` | 12, 13, 14 | one bit per step |
| after module 2 | 11 | 3 LSBs dropped, i.e. ÷ 8 |
| output | 14 | DFT/8 |

Seven butterfly steps would add seven bits to the 10-bit input. Dropping three
bits after module 2 brings the result to 14 bits, which represent the DFT
scaled by 1/8. This word plan is the one the source design states (11, 14 and
14 bits after its three stages, with 3 LSBs cut after the second). Every
non-trivial multiplication goes through `complex_mult`, so the FFT contains six
complex multipliers (24 fixed-width multipliers). No multiplier sits in
module 3.

## The chip (`fft128_chip`)

Ports: `clk`, `rst_n` (asynchronous, active low), `in_valid`, `in_data[9:0]`,
`in_ready`, `out_valid`, `out_data[13:0]`, `out_last`, and the DDR cell's
`ddr_d[13:0]` / `ddr_q[13:0]`.

The chip handles one frame at a time in three states:

1. **LOAD.** `in_ready` is high. It takes 256 words on `in_valid`: re(x0),
   im(x0), re(x1), … Idle cycles between words are allowed. The words go into
   `sample_buffer`, sign-extended to 14 bits.
2. **RUN.** The chip reads x(4m) … x(4m + 3) through the four-wide read port
   for 32 beats. It writes each result beat back through the four-wide write
   port, at the addresses given by `out_idx`. The first result arrives 38
   cycles after the first feed beat, which is after the last sample has been
   read. So a single memory is enough, and an assertion checks this.
3. **UNLOAD.** `out_valid` is high for 256 cycles. The words are re(X0), im(X0),
   re(X1), … in natural frequency order, and `out_last` marks the last one. The
   output has no back-pressure. The chip then returns to LOAD.

From the cycle that takes the last input word to the first output word is 71
cycles: 38 cycles of core latency, 32 result beats and one state change.

## The DDR register (`ddr_register`)

The source design also describes a second version of the chip. It has the same
datapath, but every flip-flop is replaced by a double-data-rate register, so it
reaches the same throughput at half the clock frequency. The cell is two latches
on a shared input:

| latch | transparent while | drives `q` while |
|---|---|---|
| 1 | clk = 1 | clk = 0 |
| 2 | clk = 0 | clk = 1 |

While clk is high, latch 2 is closed and shows d from the rising edge. While
clk is low, latch 1 shows d from the falling edge. So q takes a new value at
every edge, and d never reaches q through an open latch.

In the original cell the latches have output enables, and their two outputs
share one wire. Here that shared wire is a 2:1 multiplexer selected by clk. It
gives the same values without an internal tri-state net.

The cell is built and tested on its own, and one 14-bit instance sits in
`fft128_chip` with its own pins. The half-rate chip, i.e. the whole datapath
rebuilt from these cells, is not included.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` at the end and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_carry_estimator` | the carry count for every LP_major pattern, n = 8 … 16 |
| `tb_sc_fixed_width_mult` | bit-exact against a model; mean error and variance against published figures (above) |
| `tb_twiddle_rom` | every entry against cos/sin rounded to 10 bits |
| `tb_complex_mult` | random products within 4 LSB of exact, with mean bias under 0.5 LSB |
| `tb_w8_rotator` | all four rotations against exact values |
| `tb_sdf_bu2_stage` | butterfly results and D+1 latency on back-to-back blocks |
| `tb_bu8` | 8-point DFTs of two interleaved groups, output order, latency 17 |
| `tb_fft_module1`, `_2`, `_3` | each stage against a floating-point model of that stage, plus its latency |
| `tb_fft128` | six frames against a double-precision DFT/8: error below 40 LSB, SQNR above 35 dB, latency 38 |
| `tb_sample_buffer` | serial and four-wide ports |
| `tb_ddr_register` | capture at both edges; a 3-stage DDR pipeline at f/2 against a flip-flop pipeline at f |
| `tb_fft128_chip` | three frames end to end at default sizes (details below) |
| `tb_fft128_sqnr` | FFT SQNR at data/twiddle widths 10, 12 and 14, and with the reference multipliers |

`tb_fft128_chip` also checks the output order, `out_last`, the 71-cycle
turnaround and the DDR cell. It counts that each mechanism occurred: loading
with gaps, register-file stores, read-side multiplications, non-trivial W8
rotations and cross-lane rotations.

The SQNR test uses random half-scale data. It finds 36.2, 48.8 and 57.3 dB for
widths 10, 12 and 14. The source design publishes 32.4, 43.0 and 55.5 dB for its
version, without saying which test signal it used. The test requires at least
the published value, and at least 8 dB gain per two extra bits.

The same test also builds the width-10 core with the two reference multiplier
kinds (see below):

| multipliers in the FFT | SQNR here | published |
|---|---|---|
| complete products, rounded | 38.6 dB | 33.3 dB |
| self-compensation | 36.2 dB | 32.4 dB |
| direct truncation | 28.4 dB | 24.2 dB |

The self-compensation multiplier recovers 7.8 dB of the 10.2 dB that
truncation loses. The published figures show 8.2 of 9.1 dB. The test requires
the same order, a gain of at least 6 dB and a loss of at most 3 dB.

## Where this RTL departs from the source design

- **Multiplier width in the FFT.** The source design uses n = 10 fixed-width
  multipliers for its 10-bit twiddles. Here the data inside the FFT is 11 bits
  and is placed one bit up, so the multipliers are n = 12. At width 10 the SQNR
  test above uses n = 12 multipliers, which have their own equation. The
  stand-alone `sc_fixed_width_mult` still defaults to n = 10.
- **Bias on zero components.** The compensation constant is added even when a
  twiddle component is exactly 0 or the data is 0. For example, with b = 0 and
  n = 12 the product comes out as +1 in its last bit instead of 0. The source
  design does not single out this case.
- **Structure of module 3.** The source design gives only a block-level
  description of this stage. The structure here (delay-1 butterflies, then lane
  pairs 0/2 and 1/3, then 0/1 and 2/3) is derived from the data order that
  module 2 produces.
- **Output order.** The FFT core outputs results in digit-reversed order, as in
  the source design. The chip writes each result to its natural position, so
  the serial output is in natural order. The source design does not say which
  order its chip pins deliver.
- **Memory.** The source design names one 14 × 256-bit SRAM, and in one table
  13 × 256. Here it is a 256 × 14 register array with one serial port and four
  complex read and write ports. A real SRAM macro would need banking to give the
  four-wide access.
- **Serial protocol and reset.** The real-then-imaginary word order, the
  valid/ready handshake, `out_last` and the asynchronous reset are choices of
  this design. The source design does not specify them.
- **Rounding.** Twiddles are rounded to nearest, and +1.0 saturates to
  511/512. The W8 shifts truncate. Complex products and rotations saturate.
  The complete-product reference rounds to nearest. The source design does
  not state how its full Booth multiplier rounds.
- **Not included:**
  - the chip's built-in test module;
  - the half-rate chip built from DDR registers;
  - the 8192-point FFT that the source design simulates for comparison;
  - SQNR runs at widths 16 and 18 (their multipliers would be n = 18 and 20,
    for which no carry equation is given);
  - gate counts of the three multiplier kinds: the reference kinds exist here
    only for SQNR comparison, and the word-level sum leaves their adder arrays
    to synthesis.

## Simulating and changing it

Everything runs with plain Verilator (5.x). Put the package first and let
Verilator find the other modules by name:

    verilator --binary --timing --assert -Wno-fatal -O2 \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/scfw_pkg.sv tb/tb_fft128_chip.sv --top-module tb_fft128_chip
    ./obj_dir/Vtb_fft128_chip

Replace `tb_fft128_chip` with any other testbench name. Most of them finish in
seconds. `tb_sc_fixed_width_mult` takes about fifteen seconds because of the
2²⁴-pair sweeps.

Notes for making changes:
- **Reset.** The reset is asynchronous and active low, and the testbenches
  start it with a falling edge (`rst_n = 1; #1 rst_n = 0;`). This works with
  two-state simulators that start every signal at a random value.
- **Multiplier width.** `sc_fixed_width_mult #(.N(n))` works for even n from 8
  to 16. Other widths would need a new carry equation in `scfw_pkg`.
- **FFT widths.** The FFT is parameterised by the input width `W` and the
  twiddle width `TW_W`. The internal widths follow from them (W+1, W+4), and
  the multipliers are W+2 bits wide. So W must be 10, 12 or 14 unless the
  package is extended.
- **Frame size.** The frame size (128 points, 4 lanes, 32 beats) is fixed by
  the structure of the three modules.
