# A direct digital synthesizer without sine table or DAC

A classic direct digital synthesizer (DDS) adds a tuning word `M` to a phase
register every clock, looks the phase up in a sine ROM and converts the
sample with a DAC. At multi-GHz clock rates the ROM and the DAC are the parts
that limit speed, burn power and add spurs. This design drops both. The phase
accumulator is used only as a programmable frequency divider: its top bit is
a square wave at

    f_out = M * f_clk / 2^N        (N = 16, f_clk = 9.09 GHz)

and a bank of narrow band-pass filters turns that square wave into a sine by
removing its harmonics. A decoder looks at `M`, switches on the one filter
whose pass band contains `f_out`, routes the square wave into it, and routes
its output to a class-A amplifier that drives a 50 ohm load.

The architecture, the bit-pipelined accumulator, the full-adder structure,
the stagger-tuned filter and the output amplifier follow the 90 nm CMOS
design of T. T. Nguyen (M.S. thesis, Wright State University, 2011). The
decoder, the multiplexer, the de-multiplexer and the band plan of the filter
bank are left open there and are this implementation's own. The digital part
is synthesizable SystemVerilog. The filters, the analog switch and the
amplifier are behavioural models on `real` voltages, meant for simulation.

```
ftw[15:0] ──┬──► phase_accumulator ──msb──► filter_mux ──► filter_bank ──► output_demux ──► output_driver ──► dds_out
            │      (16 cycles)                   ▲          (4 x stagger_filter)   ▲             (class A)
            └──► ftw_decoder ──band_en / band_sel┴──────────────────────────────────┘
                   (16 cycles)
```

## The bit-pipelined phase accumulator

This is the part that sets the clock rate, and the part that needs the most
care to read.

A plain 16-bit accumulator has a 16-stage carry ripple in its feedback loop,
so its clock period grows with its width. Here every bit is its own
accumulator cell (`accu_cell`): a full adder whose sum is registered and fed
back, and whose carry is registered before it reaches the next cell. The
longest path is now one full adder plus a register, whatever the width.

A registered carry arrives one cycle late, so bit `i` must work on a sum that
is `i` cycles older than bit 0's. The accumulator arranges this with two
triangles of registers (`pipe_delay` chains):

* **input skew**: tuning-word bit `i` is delayed `i` cycles before it enters
  cell `i`, so it meets the carry that belongs to the same word;
* **output de-skew**: accumulated bit `i` is delayed `N-1-i` cycles, so all
  bits leaving the block belong to the same sum.

The result is exact. After clock edge `t`, `phase` equals the sum of all
words sampled at edges up to `t-N+1`, modulo `2^N`. The word may change
every cycle. A new word appears at the output **N = 16 cycles** after it is
applied. The overflow carry of the top cell is discarded, which is the
modulo-`2^N` wrap that makes the phase periodic.

Cost at N = 16: 16 full adders, 32 cell registers and 2 x 120 skew/de-skew
registers. Synthesis removes the unused carry register of the top cell,
which leaves 271 flip-flops. Only the top bit feeds the filters. `phase` is
brought out in full for observation and for other uses.

For `M = 8000h` the top bit toggles every cycle (4.545 GHz). For `M = 4000h`
it toggles every second cycle (2.2725 GHz). For words that do not divide
`2^16` evenly, the top bit is a square wave whose edges jitter by one clock
around the ideal period. Its fundamental is still at `f_out`, and the filter
removes the jitter sidebands that fall outside its pass band.

### The full adder

`full_adder` is written the way the fast transistor cell is built: sum and
carry come from separate parallel paths, so the sum does not wait for the
carry.

* carry: NAND2(a,b) and NOR2(a,b) are formed, the carry-in steers a pass gate
  that picks one, and an inverter restores the level, giving
  `co = ci ? a|b : a&b`;
* sum: XNOR2(a,b) and its inverse are formed, the carry-in picks one, and an
  inverter restores it, giving `s = a^b^ci`.

Synthesis flattens this into ordinary logic. The structure is kept in the
RTL to document the cell. The transistor cell's figures (about 22 ps delay,
1.77 mW at 10 GHz, 27 transistors) have no RTL counterpart.

## Choosing a filter: decoder and multiplexers

The bank has `NUM_BANDS = 4` filters. Filter `b` is centred on
`f_clk * (b+1) / 8`: 1.136, 2.273, 3.409 and 4.545 GHz, which are the words
2000h, 4000h, 6000h and 8000h. The top filter is the 4.545 GHz design of the
source. The other three are the same design re-centred.

`ftw_decoder` rounds `M * NUM_BANDS / 2^(N-1)` to the nearest band centre and
clamps the result to the bank. A word of 0, or any word above `2^(N-1)`
(above the Nyquist frequency `f_clk/2`, e.g. C000h), selects no filter. The
selection is delayed by N = 16 cycles, so the filter switches on the same
edge on which the accumulator output starts running at the new frequency. It
is given three ways: `band_sel` (index), `band_valid`, and the one-hot
`band_en`. `band_en` plays the role of the filter bias voltages. Setting a
bias to zero switches that filter off, which is how an active filter bank is
switched without disconnecting anything.

`filter_mux` gates the square wave into the selected filter only. An
assertion checks that its enables are at most one-hot. `output_demux` passes
the selected filter's output to the driver. With no filter selected it holds
the 1.2 V level on which the filter outputs sit.

Each filter is 400 MHz wide. A word whose frequency falls between two band
centres is therefore passed with reduced amplitude or not at all. The bank
spacing, not the accumulator, limits which frequencies come out at full
amplitude. A denser bank is a matter of raising `NUM_BANDS`: the decoder and
bank follow the parameter.

## Stagger-tuned filters (behavioural)

One filter (`stagger_filter`) is three tuned cascode amplifier stages in
series (`tuned_stage`). Each stage is a parallel RLC tank, that is, a
second-order band-pass. Tuning the three stages to slightly different
frequencies widens and flattens the pass band. The stages are placed by
turning the poles of a 3rd-order Butterworth band-pass into Chebyshev poles.
For a filter of centre `f0`, bandwidth `BW`, `n` stages and ripple `r` dB,
stage `k` is tuned to

    f_k = f0 - (BW/2) cos((2k-1) pi / 2n)
    Q_k = f_k / (BW sin((2k-1) pi / 2n)) / tanh(a),   a = asinh(1/sqrt(10^(r/10) - 1)) / n

For 4.545 GHz, 400 MHz and 0.5 dB (tanh a = 0.531) this gives 4.37, 4.545
and 4.72 GHz with Q of 41.2, 21.4 and 44.4. The model computes these numbers
from its parameters at time zero.

Each stage is a bilinear-transformed resonator with unity gain at resonance,
stepped every `TSTEP_PS = 5` ps (a 200 GHz sample rate, 22 steps per
110 ps clock period). Three staggered unity-peak stages give only 0.084 at
the centre frequency. `GAIN = 6.2` scales the result so that the
fundamental of a 0/1.2 V square wave (0.764 V) gives 0.8 V peak to peak.
The common-source stages invert the signal, and the output sits on a 1.2 V
DC level. The sine settles in well under 45 ns.

What the model does not capture: transistor non-linearity, parasitics, the
finite rejection of the real circuit and its power. An octave away from the
centre, the model attenuates by about 70 dB. The transistor-level filter
reaches about 36.5 dB there, and its 2nd and 3rd harmonics sit 27 dB and
30 dB below the carrier. Treat the analog models as functional, not as a
noise or spur prediction.

## Output driver (behavioural)

`output_driver` models the single-transistor class-A stage with a choke,
AC-coupled at input and output, driving 50 ohm from 1.2 V. The model has a
first-order high-pass at 314 MHz (the stage's lower corner), an inverting
gain of 1, and a hard limit at +/-0.6 V, the largest swing a 1.2 V supply
can put across the load (14.4 mW, 11.6 dBm). An 800 mVpp filter output gives
+/-400 mV on the load with no DC. `bias_en` low turns the stage off.

## Interfaces and timing

`dds_top` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | reference clock, 9.09 GHz (110 ps) in the intended use |
| `rst_n` | in | 1 | asynchronous active-low reset, clears every register |
| `ftw` | in | N | tuning word `M`, may change every cycle |
| `driver_en` | in | 1 | output amplifier bias |
| `phase` | out | N | accumulated phase, 16 cycles behind `ftw` |
| `band_sel`, `band_valid` | out | 2, 1 | selected filter, aligned with `phase` |
| `filter_out` | out | real | selected filter output (1.2 V DC + sine) |
| `dds_out` | out | real | voltage on the load |

* Word to `phase` and to filter selection: 16 clock cycles (1.76 ns).
* Filter and driver settling after a hop: a few tens of ns.
* Top parameters: `N` (16), `NUM_BANDS` (4), `F_CLK_HZ` (9.09e9). The analog
  models run on their own 5 ps time step and assume `clk` really has the
  period `F_CLK_HZ` implies; the filter centres are derived from it.
* Shared constants live in `dds_pkg` (supply, bandwidth, ripple, stage
  count, time step, the band-selection struct).

Every file uses `timescale 1ps/1ps`. Delays in the behavioural models are in
picoseconds.

## Where this RTL departs from the source design

* The decoder, the two multiplexers and the four-band plan are this
  design's own. The source leaves them unbuilt and simulates one filter only.
  A consequence: 4000h gives a full-amplitude 2.27 GHz sine here. With its
  single 4.545 GHz filter, the source saw it attenuated by 36.5 dB.
* Words above `2^(N-1)` switch the bank off. They are not passed as aliases.
* The FPGA demonstration of the accumulator registers the whole word once
  more on entry. That register is left out so that the latency is the 16
  cycles of the main design.
* The tapered buffers that drive the adder inputs and the filter input
  capacitance have no logic function. They are not modelled.
* The reference clock, possibly from an on-chip PLL, is an input.
* Reset (asynchronous, active low) is added. The source only starts from
  all-zero state.
* Analog blocks are idealised models, see above.

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          --top-module tb_dds_top rtl/dds_pkg.sv tb/tb_dds_top.sv
./obj_dir/Vtb_dds_top
```

Replace `tb_dds_top` by any other `tb_<module>`.

* `tb_dds_top`: the full design at its default size. It compares `phase`
  every cycle with an integer accumulator delayed 16 cycles. It hops through
  8000h, 4000h, 2000h and 6000h, one word per filter, and checks for each that
  the band switches exactly 16 cycles after the word, that the load sees
  about +/-400 mV with no DC, and that the zero-crossing frequency is
  `M f_clk / 2^16` within 3 %. Measured: 4.5455, 2.2727, 1.1364 and
  3.4091 GHz. It then applies C000h (bank off, output silent) and switches
  the driver off. It runs in well under a second.
* `tb_phase_accumulator`: 16-bit random words every cycle against the integer
  model, the 16-cycle latency for 8000h, and an 8-bit instance with M = 01h
  (bit k toggles every 2^k cycles).
* `tb_ftw_decoder`: band centres, ties, zero, above-Nyquist and random words
  against a floating-point nearest-centre model, 16 cycles late.
* `tb_tuned_stage`, `tb_stagger_filter`, `tb_filter_bank`,
  `tb_output_driver`: measured gains and levels against hand-calculated
  resonator responses, the 800 mVpp / 1.2 V filter output, settling by 45 ns,
  out-of-band rejection, the 314 MHz corner, inversion, clipping and the
  bias switches.
* `tb_full_adder`, `tb_accu_cell`, `tb_pipe_delay`, `tb_filter_mux`,
  `tb_output_demux`: exhaustive or random checks against reference models.

The synthesizable modules are `full_adder`, `accu_cell`, `pipe_delay`,
`phase_accumulator`, `ftw_decoder` and `filter_mux`. The others use `real`
and delays, and only simulate.
