# Two-stream 16-point pipelined FFT with a shared 1/√2 multiplier

This RTL computes the 16-point FFT of **two independent complex streams at once**.
Each stream delivers one sample per clock with no gaps, and each spectrum leaves in
**normal order** (X[0], X[1], … X[15]), one value per clock. No separate bit-reversal
memory is needed.

It follows the architecture described in *Power Efficient FFT Architecture using SMSS
for High Speed Real Time Application*: a radix-2 multipath delay commutator (MDC)
pipeline in which the constant multiplications by 1/√2 are done by a shift-add circuit.
That circuit is shared between the adder and the subtractor output of a butterfly
stage, which is the *shared multiplier scheduling scheme* (SMSS). Parts the source
leaves open are this design's own choices; they are marked as such below and in the
opening comment of each file.

## The idea: split each stream into even and odd halves

For one 16-sample frame x[n], let E[k] be the 8-point DFT of the even samples
x[2m] and O[k] the 8-point DFT of the odd samples x[2m+1]. Then

    X[k]   = E[k] + W16^k · O[k]
    X[k+8] = E[k] − W16^k · O[k]          k = 0..7,  W16 = exp(−j2π/16)

The pipeline builds both 8-point transforms in the order that makes the final step easy:

* The **odd** samples are reordered into bit-reversed order and sent through an
  8-point **decimation-in-time (DIT)** FFT. Its output is then in natural order.
* The **even** samples go in natural order through an 8-point
  **decimation-in-frequency (DIF)** FFT. Its output is in bit-reversed order. The final
  stage undoes this by writing E into a small register bank at bit-reversed addresses.

Each 8-point FFT needs only 8 samples per stream per 16 cycles. So one DIT and one DIF
serve both streams, alternating every 8 cycles. Two switches steer the data:

```
 in_a ─► P1 rsr_split ─┐        ┌─► P2 fft8_dit ─► tw16_mul ─► pad ─┐        ┌─► P3 bf_final ─► out_a
                       ├─ SW1 ──┤                                   ├─ SW2 ──┤
 in_b ─► Q1 rsr_split ─┘        └─► Q2 fft8_dif ───────────────► pad ─┘        └─► Q3 bf_final ─► out_b
```

| Stage | Module | What it does |
|---|---|---|
| P1, Q1 | `rsr_split` | Reordering shift registers. Each frame is re-emitted as 8 even samples (natural order), then 8 odd samples (bit-reversed). Q1 runs 8 cycles behind P1. |
| SW1 | `sw2x2` | Sends odd samples to P2 and even samples to Q2. It is in swap mode for 8 cycles and in normal mode for the next 8. |
| P2 | `fft8_dit` + `tw16_mul` | DIT FFT of the odd samples of A and B in turn, then multiplication by W16^k. |
| Q2 | `fft8_dif` | DIF FFT of the even samples of A and B in turn. |
| pad | `delay_line` | Scheduling registers. They bring both middle paths to 23 cycles. |
| SW2 | `sw2x2` | Sends stream A's results to P3 and stream B's results to Q3. It is always in the opposite mode to SW1. |
| P3, Q3 | `bf_final` | Bit-reverses E, runs the radix-2 butterfly, and emits X in normal order. |

## Schedule: why the switches toggle every 8 cycles

This is the part that takes the most care. Counting cycles from the first input
sample (cycle 0, frame 0):

* P1 outputs A's evens in cycles 8–15 and A's odds in cycles 16–23 (then every 16 cycles).
  Q1 is 8 cycles later: B's evens in cycles 16–23 and B's odds in cycles 24–31.
* So in every 8-cycle half-period, exactly one stream offers evens and the other
  offers odds. SW1 (one register of latency) swaps when P1 offers evens, so A's
  evens go to the DIF. It stays normal when P1 offers odds, so A's odds go to the DIT.
* The DIT path is 12 (FFT) + 1 (W16) + 10 (padding) cycles long. The DIF path is
  12 + 11. Both are 23 cycles. Because 23 + 1 ≡ 8 (mod 16), SW2 sees, in each
  half-period, the results that SW1 routed half a period earlier. It therefore swaps
  exactly when SW1 is normal, and the other way round. This is the rule the source
  states for the two switches. An assertion in the top (`a_sw_modes`) checks it on
  every cycle.
* Each final stage receives, per frame, 8 E values (bit-reversed) followed by 8
  values T[k] = W16^k·O[k] (natural order). As T[k] arrives, X[k] = E[k] + T[k]
  leaves at once. X[k+8] = E[k] − T[k] waits 8 cycles in a shift register, so the
  whole spectrum leaves in order.

Latency: X_A[0] of a frame leaves **42 cycles** after x_A[0] entered. X_B[0] leaves
**50 cycles** after x_B[0]. Stream B stays half a frame behind stream A. Throughput is
16 samples per 16 cycles per stream, sustained indefinitely.

## The SMSS unit and the 1/√2 multiplier

Inside each 8-point FFT, the only non-trivial twiddles are W8^1 = (1−j)/√2 and
W8^3 = −(1+j)/√2. W8^2 = −j is only a swap and a negation. For a sample a + jb:

    W8^1:  ( 0.707·(a+b) ) + j( 0.707·(b−a) )
    W8^3:  ( 0.707·(b−a) ) − j( 0.707·(a+b) )

Both need the sum and the difference scaled by 0.707. `mul_0707` does the scaling
without a multiplier, using the factorisation from the source:

    0.707 ≈ 1 + (1 + 2^-2)(2^-6 − 2^-2) = 0.70703125
    t = (x>>>6) − (x>>>2);   u = t + (t>>>2);   y = x + u       (3 adds, 3 wired shifts)

`smss_w8` has only **one** `mul_0707`:

* In the cycle a sample arrives, a multiplexer feeds it the sum.
* In the next cycle, it feeds it the difference, which was held in a register.
* The first product waits in a register, and the rotated sample leaves 2 cycles after
  it entered.

In a radix-2 8-point pipeline, the odd twiddles never fall on two consecutive samples
(they sit at positions 5 and 7 of each 8-sample block). So one multiplier keeps up
with one sample per clock. The assertion `a_no_conflict` watches this rule. Each
8-point FFT has one such unit, in its span-4 stage.

## Numbers and precision

* `fft_pkg` sets the widths. Inputs are `IW` = 16-bit two's complement per component.
  All internal values and the outputs are `DW` = IW + 6 = 22 bits. There is no scaling
  between stages, so the outputs are the full, unnormalised DFT sums. Even full-scale
  inputs cannot overflow. Change `IW` to resize everything.
* `mul_0707` truncates, and its constant is 7.8·10⁻⁵ too small.
* `tw16_mul` uses Q1.14 constants, round(2^14·cos) and round(2^14·sin), and rounds
  its products to nearest.
* Against a double-precision DFT, the worst error seen on random and full-scale frames
  is about 17 LSB of a 22-bit output. Most of it comes from the 0.70703125 constant
  on full-scale data.

## Interface (`fft16_smss_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_a`, `in_b` | in | `cin_t` (2×16) | one sample per stream per cycle, `{re, im}` |
| `out_a`, `out_b` | out | `cplx_t` (2×22) | spectrum value |
| `out_a_idx`, `out_b_idx` | out | 4 | spectral index k of the value on the output |
| `out_a_valid`, `out_b_valid` | out | 1 | high from the first result on |

The first cycle after reset is released carries x[0] of frame 0 on both inputs. The
design then takes one new sample per stream on every clock. There is no handshake:
the design is built for continuous streams. The position counters that drive the
switches and the butterflies all derive from one 4-bit counter started by reset.
`N` is a parameter, but only 16 is supported, because the 8-point stages are built
for 8 points.

## Where this RTL departs from, or adds to, the source

* **Inner form of the 8-point FFTs.** The source calls the two 8-point FFTs multipath
  delay commutator designs but gives no insides. Each receives one sample per cycle,
  so here each is three single-path delay-feedback radix-2 stages (`sdf_stage`).
* **The W16^k twiddle.** The source does not mention the twiddle needed to join the
  two half-size FFTs. Here it is `tw16_mul`, a constant complex multiplier placed once
  on the DIT output and shared by both streams.
* **Choices the source leaves open.** These are all this design's own:
    * the reorder order (evens first)
    * the shift-register depths and taps
    * the register after each switch
    * the 23-cycle path padding
    * stream B running half a frame behind stream A
    * widths, rounding and reset
* **Switch wiring.** The source describes the switches with four lines per side. This
  design has one line per path, so both switches are plain 2×2 exchanges.
* **Switch timing.** The switches' 8-cycle periods begin 9 cycles after the input
  frame boundary.
* **Waveform view.** The source's waveform shows "four inputs and four outputs". Here
  these are the real and imaginary parts of the two inputs and the two outputs.
* **Power and speed.** The source reports 0.166 W and 12.834 ns on an FPGA. That cannot
  be checked by simulation, and nothing here is tuned for it.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against values
computed independently in real arithmetic (DFTs, rotations) or against exact integer
expectations:

| Testbench | Checks |
|---|---|
| `tb_mul_0707` | bit-exact result and distance from x/√2, random and edge operands |
| `tb_smss_w8` | rotation by W8^k with the 2-cycle latency, including full-scale samples |
| `tb_tw16_mul` | rotation by W16^k |
| `tb_fft8_dit`, `tb_fft8_dif` | 200 back-to-back blocks against an 8-point DFT, 12-cycle latency |
| `tb_rsr_split` | exact order, tag and latency for LAT = 8 and 16 |
| `tb_sw2x2` | both modes |
| `tb_bf_final` | exact butterflies, normal order, 9 + k cycle timing |
| `tb_fft16_smss_top` | 64 frames per stream at the default size: random frames of varying amplitude, impulses, full-scale constant and alternating frames, and a complex tone. Every output is checked against a 16-point DFT; the first-output cycles (42 and 50) and the index sequence are checked. It also counts SW1 and SW2 in both modes, that the switches are never in the same mode, and that both SMSS units served held differences. |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

To simulate with Verilator (5.x), for example the whole design:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/fft_pkg.sv tb/tb_fft16_smss_top.sv --top-module tb_fft16_smss_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way; only the file and the top-module name change.
`fft_pkg.sv` must come first. For lint only:
`verilator --lint-only -Wall -Irtl rtl/fft_pkg.sv rtl/fft16_smss_top.sv -y rtl`.

## Files

`rtl/` holds the following:

* `fft_pkg`: types, widths and helpers
* `fft16_smss_top`: the top
* `rsr_split`, `sw2x2`, `fft8_dit`, `fft8_dif`, `smss_w8`, `mul_0707`, `tw16_mul` and
  `bf_final`: the blocks
* `sdf_stage`: the butterfly stage with its delay line, used by both 8-point FFTs
* `delay_line`: the padding registers

`tb/` holds one testbench per block, named `tb_<module>.sv`.
