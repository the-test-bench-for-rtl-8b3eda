# QPSK / 256-QAM test-signal generator for direct I/Q modulators

This design generates baseband test signals for measuring a direct (I/Q)
microwave modulator. A direct modulator takes its carrier from a local
oscillator and needs only the two amplitude signals, I and Q. The generator
produces them as two 14-bit words for a D/A converter board. You can select
QPSK or 256-QAM and attenuate I and Q separately, all while it runs. A
pseudo-random bit sequence (PRBS-7) supplies the data. A matching PRBS
detector finds that sequence in a received bit stream and measures how many
bits arrived intact. The system runs stand-alone from board controls:
one switch, four pushbuttons, LEDs and a seven-segment digit.

```
            +-----------+    +---------------+    +-----------+
 PRBS-7 --->| symbol    |--->| qpsk_mod      |--+ |           |   +---------------+
 prbs_gen   | framer    |    +---------------+  +>| mod select|-->| power_control |--> dac_i
            | 2 or 8 b  |--->| qam256_mod    |--+ |   (mux)   |   |  (I and Q)    |--> dac_q
            +-----------+    +---------------+    +-----------+   +---------------+
                 ^                                      ^                ^
                 |           control_unit: switch -> modulation, buttons -> stages,
                 +---------- LEDs and HEX digit
 rx_bit/rx_valid --> prbs_detector --> peak, lag, found          tx_bit --> (monitor / loop-back)
```

Everything runs on one clock. On the board, a global PLL supplies this
clock and also clocks the D/A converter. The PLL and the D/A board are
outside this RTL.

## Files

| file | contents |
|---|---|
| `rtl/qam_tb_pkg.sv` | shared types (`sample_t`, `dac_word_t`, `stage_t`, `mod_t`), level constants, the power-stage factor function |
| `rtl/prbs_gen.sv` | PRBS-7 linear feedback shift register |
| `rtl/symbol_framer.sv` | serial bits to 2-bit or 8-bit symbols |
| `rtl/qpsk_mod.sv`, `rtl/qam256_mod.sv` | symbol to I/Q level mappers |
| `rtl/power_control.sv` | attenuation and conversion to offset binary, one per channel |
| `rtl/control_unit.sv` | switch, pushbuttons, LEDs, HEX digit |
| `rtl/prbs_detector.sv` | correlation-based PRBS detector |
| `rtl/measurement_system.sv` | top level |
| `tb/<module>_tb.sv` | one self-checking testbench per module; `measurement_system_tb` is the end-to-end test |

## The PRBS-7 source

`prbs_gen` is a 7-stage shift register. Stage 1 shifts towards stage 7, and
stage 7 is the output. The feedback into stage 1 is the XNOR of stages 6
and 7. This implements x^7 + x^6 + 1, a maximum-length polynomial, so the
period is 2^7 - 1 = 127 bits. With XNOR feedback the all-zeros state belongs
to the sequence and all-ones is the lock-up state. The register therefore
resets to zero (parameter `SEED`), and an assertion reports a lock-up.
With XOR feedback on the same taps the sequence would be the bitwise
complement, and the register would have to reset to a non-zero state. This
design uses XNOR.

In the top level the generator runs at one bit per clock, and its output is
also available as `tx_bit`. The `k`-th clock after reset carries bit
`k mod 127` of the period starting from the all-zeros state.

## Symbols and amplitude levels

`symbol_framer` collects bits, first bit most significant, into 2-bit (QPSK)
or 8-bit (256-QAM) symbols. The bit rate stays fixed, so the symbol rate is
f_clk/2 for QPSK and f_clk/8 for 256-QAM. When the modulation changes, the
framer drops the partial symbol and starts again.

A direct modulator makes its own carrier. So neither mapper generates an IF
carrier: each axis is a multiplier times a constant.

| modulation | bits per axis | multipliers | constant | peak (counts) | peak at a 500 mV / 8192-count D/A |
|---|---|---|---|---|---|
| QPSK | 1 | -1, +1 | 7680 (`QPSK_AMP`) | 7680 | 468.75 mV |
| 256-QAM | 4 | -15, -13, ..., +15 | 512 (`QAM_STEP`) | 7680 | 468.75 mV |

The 256-QAM step of 512 means the largest multiplier, 15, sits on a 10-bit
sine/cosine scale (2^9 = 512), which gives 15 × 512 = 7680. QPSK uses the
same peak so that both modulations span the same range. Both mappers output
signed 14-bit samples. The bit-to-point mapping is natural binary:
`sym[7:4]` (I) and `sym[3:0]` (Q) code k gives multiplier 2k − 15. For QPSK,
a 1 gives +7680, with `sym[1]` on I. Gray coding is not used.

## Power control: dividing by multiplying

Each channel has its own `power_control`. The levels already fill the D/A
range, so power can only be reduced, and every level must be scaled by the
same fraction d (between 0.5 and 1). The unit avoids a divider. It
multiplies the signed 14-bit sample by an unsigned 14-bit factor
x = d · 2^14, then keeps bits [27:14] of the 28-bit product. That is an
arithmetic shift right by 14, which rounds towards minus infinity. Finally
it adds 2^13 = 8192, which maps the signed range −8192..8191 onto the D/A
converter's offset-binary range 0..16383.

There are eight stages, one per LED. At stage 0 the peak is 468.75 mV, and
each further stage lowers it by 15 mV. The factors follow from that rule,
round(2^14 · (468.75 − 15k) / 468.75), with stage 0 capped at the largest
14-bit value. `qam_tb_pkg::stage_factor` computes them:

| stage k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| factor x | 16383 | 15860 | 15335 | 14811 | 14287 | 13763 | 13238 | 12714 |
| peak (mV) | 468.7 | 453.7 | 438.7 | 423.7 | 408.8 | 393.8 | 378.8 | 363.7 |

Stage 0 is 1/16384 short of unity, so the QPSK peak reads 7679 counts
rather than 7680. The unit registers the sample and its stage together and
registers the result, so its latency is 2 clocks.

## The PRBS detector

`prbs_detector` answers two questions about a received bit stream: does it
contain the PRBS-7, and how many bits are wrong? It uses circular cross
correlation against a reference period.

1. **INIT** (127 clocks after reset): a built-in `prbs_gen` fills a 127-bit
   reference register, so `ref[j]` is bit j of the period.
2. **CAPTURE**: 127 bits qualified by `rx_valid` are shifted into a window.
   `win[0]` holds the oldest bit. `ready` is high in this state only, so
   bits offered at other times are not taken.
3. **CORRELATE** (127 clocks): at lag L the window is compared with the
   reference rotated by L, and the correlation 2·(agreeing bits) − 127 is
   formed. This takes one lag per clock and a 127-bit popcount. The rotation
   comes from a register that rotates by one bit per clock, not from a
   barrel shifter. The largest value and its lag are kept.
4. **DONE** (1 clock): `result_valid` pulses. `corr_peak`, `peak_lag` and
   `found` (`corr_peak >= THRESHOLD`, default 63) hold until the next
   result.

A maximum-length sequence correlates with its own rotations at −1 for
every lag except the right one. A clean window therefore gives a peak of
+127, and each wrong bit lowers it by 2. Random data stays far below the
threshold. `peak_lag = L` means the window's first bit was bit L of the
period. `result_valid` rises 128 clocks after the clock that accepted the
window's 127th bit.

The detector works on whole 127-bit windows and does not keep bit
alignment from one window to the next. The bits of a window are joined
across clocks where `rx_valid` is low. `rx_valid` low therefore means "no
bit this clock". The stream must not lose bits, because a lost bit breaks
the window. In the top level the detector
is a separate port group (`rx_bit`, `rx_valid`, `det_*`). Feed it `tx_bit`
back through the unit under test, or feed it `tx_bit` directly as a
self-test.

Circular correlation is often computed with an FFT and an inverse FFT.
This design instead spends 127 clocks per window in the time domain. That
needs no transform cores, and the result is bit-exact.

## Board controls

`control_unit` synchronises the switch and the buttons with two flip-flops
each.

* `sw_mod`: 0 selects QPSK and 1 selects 256-QAM. The change reaches the
  datapath 3 clocks later. The seven-segment digit (`hex_mod`, active low,
  bits {g,f,e,d,c,b,a}) shows the bits per symbol: "2" or "8".
* `btn[0]` I up, `btn[1]` I down, `btn[2]` Q up, `btn[3]` Q down. The inputs
  are active high, so an active-low board button needs an inverter at the
  pins. "Up" means less attenuation. Stages saturate at 0 and 7, and reset
  sets both to 0. Each button is debounced: its level is accepted after it
  has been stable for `DEBOUNCE` clocks (default 500,000, 5 ms at 100 MHz).
  A press acts once, `DEBOUNCE + 3` clocks after it starts.
* `led_i`, `led_q`: two bars of 8 − stage lit LEDs, lit from bit 0 upwards.
  On the board these drive two colours of the RGB LEDs.

## Timing summary (top level)

| path | latency |
|---|---|
| last bit of a symbol → `sym_valid` | 1 clock |
| symbol → mapper output | 1 clock |
| mapper → `dac_i`/`dac_q` | 2 clocks (the select mux is combinational) |
| stage change → D/A words | 2 clocks |
| switch → modulation in use | 3 clocks |
| 127th window bit → `det_valid` | 128 clocks |

After a modulation change, the D/A words carry a few clocks of the old
symbol before the new framing takes over.

## Where this design fills in or departs from the original system

* The factors of the eight power stages, the QPSK constant, the HEX symbols,
  the LED pattern, the button assignment and the debounce are derived or
  chosen here. The original lists them in tables that this design does not
  reproduce. The design uses the rules it states: a 15 mV step, equal
  peaks, and a 10-bit scale with multiplier 15.
* The original gives 32 amplitude levels for 256-QAM. This design reads
  that as 32 levels counting I and Q together. That is 16 per axis, which
  is what a rectangular 256-point grid needs.
* The original does not say how test data reaches the modulators. This
  design frames the PRBS-7 serially.
* The detector computes the correlation directly instead of with FFT cores.
  Window handling, output format and threshold are this design's own.
* The original had an earlier QPSK modulator with a 75 MHz IF carrier,
  which the direct-modulator version replaced. That version is not
  included. Nor is the D-QPSK precoder of the wider radio project, whose
  function is not specified.
* The modulation select offers QPSK and 256-QAM only.
* Outside the RTL: the global PLL, the D/A converter board, the flash that
  configures the FPGA at power-up, and the FFT cores.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5, run from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl +libext+.sv rtl/qam_tb_pkg.sv tb/measurement_system_tb.sv \
  --top-module measurement_system_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `measurement_system_tb`
runs the top at its default parameters, including the 500,000-clock
debounce. It covers about 9 million clocks and takes under half a minute.
It decodes the D/A words back into bits using its own level tables, then
checks that the bits follow the PRBS-7 recurrence. It also checks `tx_bit`
against the sequence and the detector's peak and lag for clean, corrupted
and random input. It counts that every mechanism occurred: both
modulations, switching both ways, up and down presses on both channels, a
press at a stage limit, and clean, damaged and absent detections. The unit
testbenches check the mappers over all symbols, every power stage against
a floating-point model, the detector's latency and peaks, and the button
debouncing and saturation.

## Changing the design

* Output scale: `QAM_STEP` and `QPSK_AMP` in the package, or the `STEP` and
  `AMP` parameters of the mappers. Keep 15·STEP below 8192.
* Power stages: edit `stage_factor`. The factor is a 14-bit unsigned
  fraction of 2^14.
* Detector sensitivity: `THRESHOLD`. The window length is fixed at 127 by
  the PRBS order.
* Button debounce: `DEBOUNCE`. Shorten it for simulation, as
  `control_unit_tb` does.
