# Multiplierless LMS adaptive filter using distributed arithmetic

This is an adaptive FIR filter with 4 taps and 8-bit data. It adapts itself
with the LMS (least mean squares) algorithm, and its datapath has no
multiplier. Adders, shifters, a 16-word RAM and some shift registers do all
the work.

The filter does not store its tap weights. It stores a table of *partial
products*: word `a` of a 2^N-word RAM holds the sum of the weights whose bit
is set in `a`. The input samples go through the filter one bit at a time.
Each bit position of the N most recent samples forms a RAM address. The
output is a shifted sum of the words read, as in classic distributed
arithmetic (DA).

The new part is that adaptation also works on the table, not on the weights.
In a second pass over the same addresses, each word read is changed by the
error times a power of two. So one sample costs 2 x 8 RAM accesses and no
multiplications.

The same structure was put forward as a building block for the equalizer of
partial-response (PR4) disk read channels. The configuration here is the
prototype: N = 4 taps, B = 8-bit data, a 16 x 20-bit RAM and mu = 2^-4.

## The arithmetic

Write each input sample as a two's-complement fraction with bits b_0 (the sign
bit, weight -1) to b_7 (weight 2^-7):

    s = sum_i F_i b_i,   F = [-1, 2^-1, 2^-2, ..., 2^-7]

For the filter output y(k) = sum_j w_j s(k-j), swap the two sums:

    y(k) = sum_i F_i p(A_i),   A_i = {b_i(k-3), b_i(k-2), b_i(k-1), b_i(k)}
    p(a) = sum_{j : a[j] = 1} w_j

So y(k) needs 8 table reads, one for each bit position i. A scaling
accumulator adds them up. It takes the LSB term first and halves its running
sum at every step. The sign-bit term comes last and is subtracted:

    acc = p(A_7)
    acc = acc/2 + p(A_i)    for i = 6 .. 1
    y   = acc/2 - p(A_0)

**Adaptation.** LMS would change the weights by w += 2 mu e(k) s(k-j), with
e(k) = d(k) - y(k). The filter cannot afford to rebuild its table after every
weight change, so it changes the table words directly. If the input is white
with zero mean, the expected change of the words addressed in sample k is

    p(A_i) += 0.5 * mu * N * e(k) * F_i

The words that were not addressed stay as they are. With N = 4 and
mu = 2^-4, 0.5 mu N = 2^-3. Each of the 8 updates is therefore the error
shifted by 3 + i places, and negated for the sign bit.

Another way to read this rule: it is exact LMS on the 16 table words, taken
as 16 free parameters. The derivative of y(k) with respect to word `a` is the
sum of F_i over the bit positions i with A_i = a. This is why the filter also
converges on correlated inputs such as tones (see the composite-signal test
below). It also means the 16 words drift apart from the 4 weights they stand
for. The table can then fit slightly more than a linear 4-tap filter.

When two bit positions of one sample address the same word, both updates go
into that word. The update is a read-modify-write, so the second one sees the
first.

## Architecture

```
            lr                       re_turn
  s_in ──► PISO ─tap0─┬─────────────────────►┐
                      ▼                      │ address mux ──► RAM 16 x 20 ──┬──► ADD/SUB ─► ACC ──┐
                    SISO ─tap1─┬────────────►┤   (live taps     (async read,  │      ▲   ◄─ /2 ◄──┤
                               ▼             │    or replayed)   sync write)  │      s_a           │
                             SISO ─tap2─┬───►┤                       ▲        │                    ▼
                                        ▼    │                       │        │        saturate to 8 bits
                                      SISO ─tap3                     │        │            │ lbuff_op
                                                                     │        │     ┌──────┴───────┐
  tap0..tap3 ──► 4 replay SISOs ──► rep0..rep3 (to the mux)          │        │  y buffer     out buffer ──► y_out
                                                                     │        │     │
  d_in ──► d buffer (lr) ──► d(k) - y(k) = e(k) ──► shift bank ──────┴─ + ◄───┘     │
                                 ▲                  e*2^-3*F_i                      │
                                 └──────────────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `da_lms_filter` | top level; wires the blocks below |
| `da_lms_pkg` | default sizes, the control-word struct `ctrl_t`, the step-size function |
| `piso` | loads s(k) and shifts it out LSB first |
| `siso` | 8-stage serial delay. Three of them delay the input by one sample each (the tap delay line). Four more record the four address bit streams during the output pass and replay them in the update pass. |
| `pp_ram` | 2^N x RAM_W partial-product table: combinational read, clocked write |
| `scaling_acc` | `acc <= acc/2 ± din` |
| `buffer_reg` | holding register. Three instances: d(k), y(k) for the error, y(k) for the output pins. |
| `error_sub` | e = d - y, 9 bits wide |
| `pp_update` | the bank of fixed shifts e*2^-3*F_i, the selection by bit position, and the adder that makes the new word (saturating) |
| `control_unit` | the sequencer |

The control lines keep their architectural names: `lr` (load), `lacc` and
`clacc` (accumulator load and clear), `s_a` (subtract), `rd_wr` (1 = read,
0 = write), `lbuff_op` (load the output buffers), `re_turn` (address from the
replay registers) and `sc` (A/D start of conversion). The bit-shift strobe,
called `clk` in the original drawing, is `clk_sh` here. It is a clock enable
on the system clock, not a second clock.

## One sample period

One sample takes 2B + 2 = 18 cycles of the system clock:

| Cycle | Phase | What happens |
|---|---|---|
| 0 | LOAD | `lr`: PISO <= s_in, d buffer <= d_in; `clacc` clears ACC |
| 1-8 | output pass | RAM read at the live address of bit 7, 6, ..., 0; `lacc`; ACC adds (bits 7..1) or subtracts (bit 0, `s_a`). All shift registers shift. The replay SISOs record the addresses. |
| 9 | RESULT | `lbuff_op`: y(k) goes into both y buffers, so `y_out` changes after this edge; `sc` asks for the next sample |
| 10-17 | update pass | `re_turn`, `rd_wr = 0`: the replayed address for bit 7, ..., 0 is read, the update is added and the word is written back in the same cycle. Only the replay SISOs shift; the input delay line holds. |

After reset, 16 extra cycles write zero into every RAM word before the first
LOAD. So the first `sc` comes 25 cycles after reset is released.

Throughput is one sample per 18 clocks. The original FPGA build reached
5.47 MHz, which would be about 304 k samples/s. `y_out` changes 9 clock edges
after the edge that sampled `s_in`. The weights used for y(k) already include
the update from e(k-1).

## Number formats

| Quantity | Bits | Format |
|---|---|---|
| s(k), d(k), y(k) | 8 | two's-complement fraction, range [-1, 1) |
| e(k) | 9 | same LSB (2^-7), range (-2, 2) |
| RAM word p(a) | 20 | 3 integer bits (sign included) and 17 fraction bits, range [-4, 4) |
| accumulator | 21 | 17 fraction bits |

The 17 fraction bits are exactly the smallest update: 2^-3 (step) x 2^-7
(error LSB) x 2^-7 (smallest F_i) = 2^-17. y(k) is the accumulator with its
10 lowest bits dropped (truncation) and clipped to 8 bits. The updated RAM
words are clipped to 20 bits rather than wrapped.

## Top-level interface

```
module da_lms_filter #(B = 8, N = 4, RAM_W = 20, FRAC_W = 17, MU_SHIFT = 4) (
  input  clk, rst_n,                 // system clock, asynchronous active-low reset
  input  signed [B-1:0] s_in, d_in,  // input sample, desired signal
  output signed [B-1:0] y_out,       // filter output (registered)
  output sc);                        // one-cycle pulse: present the next s_in/d_in
```

The A/D and D/A converters are not part of the RTL. After each `sc` pulse,
the next `s_in` and `d_in` must be in place before the LOAD cycle, 9 clocks
later. They are sampled only in that cycle. The 18 input and 9 output pins
match the original device's pin count.

## Where this RTL departs from, or adds to, the original description

These are decisions of this implementation:

- **The cycle schedule.** The original timing diagram names the control
  signals but does not give enough detail to copy. The 18-cycle schedule
  above is this design's own.
- **The two SISO groups.** The original drawing has seven SISOs beside the
  PISO. Here three of them form the tap delay line and four replay the
  addresses. In the update pass only the replay group shifts, so that the
  delay line keeps its place.
- **Buffer loading.** The original text loads the error-path y buffer with
  `lr`. Here both y buffers load on `lbuff_op` when the output pass ends, and
  `lr` loads the PISO and the d buffer. This way e(k) pairs d(k) with y(k)
  inside one sample period.
- **`rd_wr` polarity** (1 = read) and **reset polarity** (active low).
- **Other choices:** the RAM number format, the truncation of y(k), the
  clipping of y(k) and of the RAM words, the combinational RAM read that
  makes the one-cycle read-modify-write possible, and the RAM clear after
  reset.
- **Shift bank.** The bank that scales the error is built from fixed wired
  shifts, not clocked shift registers.

The original build used 506 logic cells and 320 memory bits of an FPGA. A
generic synthesis of this RTL also gives 320 memory bits, with 110 flip-flops.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The top level also
carries concurrent assertions on its sequencing: the RAM is written only while it is
being cleared or in the update pass, the accumulator subtracts only on a
load, and no sample is loaded during the update pass. The testbenches of the
top level compare every output sample with a reference model of the algorithm
(`tb/da_lms_model.svh`). The model is written from the equations above, not
from the RTL, and the outputs must match bit for bit.

| Testbench | What it shows |
|---|---|
| `tb_da_lms_filter` | Full size, default parameters. It has three phases. (1) System identification of a 4-tap FIR with white input: the MSE falls from about 1900 LSB² to about 1.4 LSB². (2) Full-scale input that drives y(k) into clipping. (3) A square wave with a sine of the same period as the desired signal: the error goes to zero. It checks the sample period (18 cycles), when the first output appears, and that `y_out` changes only on the edge that ends the RESULT cycle. It also counts the RAM clear, the accumulate, subtract and result steps, the update writes, the updates shared by two bit positions, and the output clipping, and fails if any of them never happens. |
| `tb_wl_mse_mu` | MSE against iteration for mu = 2^-3, 2^-4 and 2^-5 (three instances). It uses white-input system identification, averaged over 40 runs of 600 iterations. The MSE falls below 10% of its start after about 70, 130 and 230 iterations. Each curve must end below 2% of its start, and a smaller mu must converge more slowly. |
| `tb_wl_composite` | The input is a 100 Hz tone plus a 1 kHz tone at half its amplitude, sampled at 4 kHz. The desired signal is the 100 Hz tone. After 20000 samples the remaining error power is about 1% of the 1 kHz tone's power. |
| `tb_piso`, `tb_siso`, `tb_pp_ram`, `tb_scaling_acc`, `tb_buffer_reg`, `tb_error_sub`, `tb_pp_update`, `tb_control_unit` | Unit tests. Each block is compared with values computed independently in the testbench. `tb_pp_update` covers every error value and bit position, including clipping. `tb_control_unit` checks the control word cycle by cycle. |

The convergence here takes more iterations than the curves published for
this structure (about 100 iterations). The 16 table words adapt separately,
which is slower than adapting 4 weights. The test setup of those curves (the
input, the unknown system, the averaging) is not known, so the tests here
check the trend, not the published numbers.

## Simulating

All files are SystemVerilog-2017. Each testbench is a top module with no
ports. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/da_lms_pkg.sv tb/tb_da_lms_filter.sv --top-module tb_da_lms_filter
./obj_dir/Vtb_da_lms_filter
```

Use the same command with another testbench's name to run it. Every
testbench finishes in well under a second of run time.

## Changing the design

- `MU_SHIFT` sets mu = 2^-MU_SHIFT. The update step is 2^-(MU_SHIFT + 1 -
  log2 N), which must be zero or positive.
- `N` (taps) sizes the RAM at 2^N words and the number of SISOs. For the step
  to stay a power of two, N must be a power of two.
- `B` (data width) sets the shift-register length and the period (2B + 2
  cycles). `B` must be at least 2.
- `RAM_W` and `FRAC_W` set the word format. Keep `FRAC_W` >= B - 1, and make
  it at least `MU_SHIFT + 1 - log2 N + 2(B - 1)` for the smallest updates not
  to be lost.
- The reference model in `tb/da_lms_model.svh` takes the same sizes as
  constructor arguments.
