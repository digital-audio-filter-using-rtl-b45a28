# Single-multiplier FIR audio filter

An FIR filter computes

    y[n] = b[0]·x[n] + b[1]·x[n-1] + … + b[N-1]·x[n-N+1]

The textbook structures (direct form and transposed form) spend one multiplier
and one adder per tap. Audio is slow compared with an FPGA or ASIC clock, so
this design spends time instead. One multiplier and one accumulator are shared
by all taps, and each tap gets one clock. A 16-tap filter runs 16 clocks per
sample: 24 kHz audio needs a 384 kHz clock.

The controller is unusual. There is no state machine. A free-running tap
counter (the coefficient-ROM address) drives everything, and each control
signal is a small gate decode of that address. The sample memory becomes a
delay line without moving any data. Its address counter simply skips one step
per sample period.

The default build is a 16-tap low-pass filter for 24 kHz audio, with its pass
band up to 4.8 kHz and its stop band from 6 kHz. Taps, word widths and
coefficients are parameters.

## Datapath

```
             +-----------------+   addr   +-----------+  b[k]
  clk ------>| rom_addr_counter|--------->| coeff_rom |---------------+
             +-----------------+    |     +-----------+               |
                    |               |                                 v
                    |        +---------------+   sel    +------------+    +----------+   +--------------+
                    |        | control_logic |--------->| sample_mux |--->| mac_unit |-->| output_latch |--> y_out
                    |        +---------------+  (OR)    +------------+    +----------+   +--------------+
                    |          latch_en (addr==0) ----------^ ^ x_in          ^ first          ^ en
                    v                                       | |
             +--------------+  ram_addr  +------------+ rdata |
             | ram_addr_gen |----------->| sample_ram |-------+
             +--------------+            +------------+
                                              ^ we = (addr==0), wdata = x_in
```

| module | role |
|---|---|
| `fir_pkg` | default sizes, the 16-tap and 8-tap coefficient sets |
| `rom_addr_counter` | tap index k = 0 … TAPS-1, one step per clock, wraps |
| `coeff_rom` | b[k], combinational read, contents from the `COEFFS` parameter |
| `ram_addr_gen` | sample-RAM address: counts with the tap index but skips one step per period |
| `sample_ram` | last TAPS samples, synchronous write, combinational read |
| `sample_mux` | multiplier operand: the new sample at k = 0, the RAM word otherwise |
| `mac_unit` | full-precision product, accumulator reloaded at k = 0 |
| `output_latch` | rounds, clips and holds the finished sum, once per period |
| `control_logic` | `mux_sel` = OR of the address bits, `latch_en` = address is zero |
| `fir_processor` | top level, wires the above together |

## The delay line: why one skipped count is enough

A delay line normally shifts every stored sample by one place per sample
period. Here the samples never move. The RAM address counter does the work.

Over one period the tap counter runs k = 0, 1, …, TAPS-1. The RAM address
counter steps on the same clock, except on the clock that ends the last tap
(tap address all ones). So within one period the RAM addresses are

    a, a+1, a+2, …, a+TAPS-1      (mod TAPS)

and the next period starts at a+TAPS-1 = a-1 (mod TAPS). Each period therefore
starts one word lower than the one before.

The new sample x[n] is written at tap 0, into word a. One period later that
word is read at tap 1, two periods later at tap 2, and so on. So the word read
at tap k always holds x[n-k], which is what coefficient b[k] needs. After TAPS
periods the word is overwritten by a new sample, exactly when x[n-TAPS] drops
out of the filter.

At tap 0 the sample is being written in that same clock, so the RAM read port
still returns the old word. The multiplexer solves this. Its select is the OR
of the tap-address bits, so it is 0 only at tap 0. There it passes `x_in`
straight to the multiplier.

The original circuit suppresses a pulse of a gated counter clock. It uses an
AND of the address bits, a flip-flop on a second clock phase, an inverter and a
second AND with the clock. Here the same decode is a clock enable on a single
clock. That gives the same address sequence without a gated clock.

## One sample period, cycle by cycle (TAPS = 16)

| tap k (ROM address) | RAM address | multiplier input | accumulator after the clock | other |
|---|---|---|---|---|
| 0 | a | `x_in` (bypass) | b[0]·x[n] (reloaded) | `x_in` written to RAM[a]; output latch takes the previous sum; `sample_take` = 1 |
| 1 | a+1 | RAM: x[n-1] | + b[1]·x[n-1] | |
| … | … | … | … | |
| 15 | a+15 | RAM: x[n-15] | + b[15]·x[n-15] = full sum | RAM counter holds: the next period starts at a-1 |

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | processor clock, TAPS clocks per audio sample |
| `rst_n` | in | 1 | synchronous, active low |
| `x_in` | in | DATA_W | input sample, signed |
| `sample_take` | out | 1 | high in the cycle whose closing edge takes `x_in` |
| `y_out` | out | DATA_W | filtered sample, signed, held between updates |
| `y_valid` | out | 1 | one-clock pulse in the cycle after `y_out` changed |
| `y_sat` | out | 1 | the current `y_out` was clipped |

- **Rate.** One sample is taken and one output produced every TAPS clocks.
  The counter is free-running, so the source must deliver a sample every TAPS
  clocks. Hold `x_in` until the edge at which `sample_take` is high.
- **Latency.** The output computed from a sample is in `y_out` TAPS clocks
  after the edge that took the sample.
- **After reset.** The tap counter and the RAM address counter start at 0.
  The RAM is not cleared, so the first TAPS-1 outputs mix in its old contents.
- An assertion in `fir_processor` checks that `sample_take` repeats exactly
  every TAPS clocks.

## Number format

- Samples: DATA_W = 16 bits, two's complement.
- Coefficients: COEF_W = 16 bits, Q1.15 (32768 would be 1.0).
- Accumulator: 16 + 16 + log2(TAPS) = 36 bits, so 16 full-scale products
  cannot overflow.
- Output: the output latch computes `floor((acc + 2^14) / 2^15)`, which is
  rounding half up. It clips the result to [-32768, 32767] and sets `y_sat`
  when it clips.
- The default low-pass has unity DC gain. Its step response overshoots, so a
  full-scale input swing does clip.

## Coefficients

The default set in `fir_pkg::LPF16_COEFFS` is a Hamming-windowed sinc:

    h[n] = 2·fc·sinc(2·fc·(n - 7.5)) · (0.54 - 0.46·cos(2π·n/15)),   n = 0 … 15
    fc   = 5.4 kHz / 24 kHz   (midway between the 4.8 kHz and 6 kHz band edges)

- The taps are scaled to sum to 1.0 and rounded to Q1.15.
- The rounding residue goes on the two centre taps, so the sum is exactly 32768.
- Response: about -3 dB at 4.8 kHz, -10 dB at 6 kHz and -44 dB at 8 kHz.
  Sixteen taps cannot make a sharp 1.2 kHz transition at this sample rate.
- `LPF8_COEFFS` is the same formula for 8 taps.

Any other FIR filter, whether low-pass, high-pass, band-pass or band-stop, is a
different `COEFFS` value, with a matching `TAPS`:

```systemverilog
fir_processor #(.TAPS(8), .COEFFS(fir_pkg::LPF8_COEFFS)) u_fir (...);
```

## What follows the original design and what does not

These parts follow it:
- One multiplier and one accumulator, one tap per clock.
- The 16-tap low-pass design point, with a 4-bit ROM address.
- The address-decoded control: the OR-gate multiplexer select, and the output
  latch updated at address 0000.
- The RAM address counter that loses one count per period.

These are this design's own choices:
- All word widths, the rounding and the clipping.
- The coefficient values.
- Where the new sample is written (at tap 0), and what the two multiplexer
  inputs are.
- Reloading the accumulator at tap 0.
- The reset behaviour and the `sample_take`/`y_valid` handshake.

These are departures:
- **Single clock.** The original uses CLK plus two phases, Phi1 and Phi2, and
  a gated counter clock. Here everything runs on one edge with clock enables.
- **Skipped step.** The skipped RAM step is the one after the last tap (address
  all ones). That is the only placement that keeps the 16 addresses of one
  period distinct.
- **Two variants.** The original describes its filter as both eight-coefficient
  and 16-tap. The default is 16, and 8 taps is a tested parameter setting.

Not included:
- The ADC and DAC. Connect them to `x_in` and `y_out`.
- The adaptive noise-cancelling channel. It is mentioned but not specified.
- The generation of the two clock phases.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- **`tb_fir_processor`** runs the top level at its default parameters. It sends
  400 samples:
  - zeros;
  - an impulse, whose response must reproduce the 16 coefficients;
  - a step;
  - a full-scale square wave, which must clip;
  - random samples;
  - a chirp.

  Every output is compared with a convolution computed independently in the
  testbench. It also checks the latency (TAPS clocks) and the output period
  (TAPS clocks). It counts the multiplexer bypasses, the latch updates, the
  outputs that depend on the rotating RAM address, and the clipped outputs.
  Each of these must occur at least once.
- **`tb_fir_processor_8tap`** does the same with TAPS = 8.
- The unit testbenches check, respectively:
  - the counter sequence and its wrap at 16 and at 5;
  - every decode of `control_logic`;
  - the RAM address sequence and its per-period step back;
  - the ROM contents;
  - RAM read-during-write;
  - the multiplexer;
  - exact MAC sums, including -32768·-32768;
  - the rounding and clipping corners of the output latch.

Simulate with Verilator from the repository root, for example:

```sh
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/fir_pkg.sv tb/tb_fir_processor.sv --top-module tb_fir_processor
./obj_dir/Vtb_fir_processor
```

The whole top-level run takes well under a second.
