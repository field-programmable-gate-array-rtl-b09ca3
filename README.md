# FPGA signal processing for an LPI radar receiver and a DRFM false-target generator

This RTL implements two FPGA signal processors from electronic warfare, placed side by side in one
top level (`radar_drfm_top`). They share a clock and a reset but no data.

* **Radar receiver.** This is one channel of a continuous-wave, low-probability-of-intercept radar
  that transmits a polyphase (P4) code. It turns the stream of received complex samples into
  integrated range-Doppler maps. It does this in three steps:
  1. correlation against the transmitted code (range compression);
  2. an FFT across code periods (Doppler filtering);
  3. summing several maps point by point (coherent integration).
* **DRFM image synthesizer.** A digital RF memory captures an intercepted radar pulse as I/Q
  samples. It later replays the pulse through a chain of 512 range-bin modulators. Each bin adds a
  copy of the pulse with its own delay, gain and phase rotation. The sum is a synthetic extended
  target with a chosen range profile and Doppler behaviour, which goes to the DACs.

Everything is synthesizable SystemVerilog with one clock and a synchronous, active-high reset. The
analog parts (mixers, local oscillator, filters, ADCs, DACs), the control processor that writes the
DRFM coefficients, and the radar transmitter are outside the design. The top brings out their
signals as ports.

## Fixed-point conventions

All radar data words are complex, with 16-bit real and imaginary parts (`c16_t` in `radar_pkg`).
The integrated output uses 17 bits (`c17_t`). The word types follow a Simulink-style
`sfixW_EnF` notation: W bits in total, F of them fractional.

| point in the chain | type |
|---|---|
| received sample | sfix16_En40 |
| reference coefficient | sfix16_En15 |
| range compression output | sfix16_En34 |
| window value | sfix16_En15 |
| window × data product | sfix32_En49 |
| Doppler filter output | sfix16_En36 |
| integrated map | sfix17_En36 |

Every narrowing step rounds toward minus infinity (arithmetic shift) and saturates
(`sat16`/`sat17` in `radar_pkg`).

## Radar receiver: `three_stage_compression`

```
rx ──► range_compression ──► data_storage ──► doppler_filter ──► coherent_integration ──► map
       (correlate, 2 periods)  (corner turn)    (window+FFT)       (sum NMAPS maps)
```

Each stage passes a valid bit with every word, so gaps in the input stream are allowed anywhere.
The defaults are:

* NC = 102 subcodes per code period;
* NPER = 4096 code periods per map;
* NMAPS = 4 maps per integration.

One map is NC × NPER = 417,792 points. The outputs carry the range bin (`map_range`) and the
Doppler bin (`map_doppler`) of each point.

### Range compression (`range_compression`)

This is a time-domain correlation receiver spanning N = 2 code periods. It keeps a tapped delay line
of 2·NC received samples. Each tap is multiplied by the conjugate reference subcode for its
position. The product is quantized back to 16 bits, and the products one code period apart are
added. The adder tree then sums over all NC subcodes, and the result is shifted by 6 to reach
sfix16_En34 (40 − 6 = 34).

The reference subcodes are written through `coef_we/coef_addr/coef_data`. For a P4 code they are
`exp(-j(π k²/NC − π k))`, in Q15 and stored in reverse order of arrival. An echo delayed by d
subcodes then peaks on range bin (d − 1) mod NC.

* One output per valid input, 3 clocks later.
* 816 real 16×16 multipliers at NC = 102.

### Corner turn (`data_storage`)

The correlator delivers its data range bin by range bin within each code period. The Doppler FFT
needs each range bin's values across all code periods. The corner turn uses two banks of NC × NPER
words:

* One bank is written in arrival order, at address `p·NC + r`.
* The other bank, filled earlier, is read transposed, at `r = 0..NC-1`, `p = 0..NPER-1`.
* When the write bank fills (`bank_swap`), the banks change roles. A bank is never read and written
  in the same turn.

The read runs at one word per clock. It may start on the last clock of the previous read, so maps
that arrive back to back leave back to back. An assertion checks that a bank never fills while the
other is still being read. With input at most one word per clock, that cannot happen.

### Doppler filter (`doppler_filter`, `blackman_window`, `fft_r2sdf`, `fft_stage`, `cordic_rotate`)

For each range bin, the NPER samples are multiplied by a Blackman window, transformed by an
NPER-point FFT, and converted back to 16 bits.

**Window.** `blackman_window` computes `w[n] = 0.42 − 0.5 cos θ + 0.08 cos 2θ`, with
`θ = 2πn/(N−1)`. It uses the identity `0.08 cos 2θ = 0.16 cos²θ − 0.08`, so a single CORDIC cosine
and one squaring give the value. No table is needed. Latency is CORDIC_STAGES + 2 clocks. The
window's pipeline runs every clock, and the data is delayed by the same amount to meet it.

**FFT.** `fft_r2sdf` is a streaming radix-2 single-path delay-feedback FFT with decimation in
frequency. It takes one sample per clock and has LOG2N stages.

* Stage s has a feedback memory of N/2^(s+1) words, kept as a circular buffer so that it maps onto
  RAM.
* During the first half of each 2D-sample block, a stage parks its inputs in the memory. During the
  second half, it outputs the sums and stores the differences. The differences are multiplied by
  the twiddle factor `exp(−j2πk/2D)` as they leave.
* Each stage generates its twiddles with its own `cordic_rotate`, so there are no coefficient
  ROMs. The data path is delayed by the CORDIC latency to meet them.
* Each stage adds one bit of growth. The output is IN_W + LOG2N bits wide, with no scaling inside
  the FFT.
* The outputs come in bit-reversed frequency order. `out_bin` gives each one's true bin index.

The parts of the FFT that are hardest to follow are these:

* **Run control.** The stages advance together on one enable. Input passes through a FIFO that
  holds one frame. A frame starts only on a frame boundary and once a whole frame's worth of input
  is available or already flowing. Inside a frame, a late sample stalls the whole pipeline for that
  clock.
* **Drain.** Once the input stops, the last frame is still inside the pipeline. The FFT then runs
  on its own, feeding whole frames of zeros, until the last real frame has left. A valid bit shifts
  through a register as long as the pipeline latency, so zero frames never produce output. New
  input that arrives during the drain is queued in the FIFO and starts at the next frame boundary.
* **Latency.** The first output comes N + LOG2N·(CORDIC_STAGES + 2) enabled clocks after the first
  input: N for filling the delays, plus CORDIC_STAGES + 2 per stage. At the defaults this is
  4096 + 12·18 = 4312 clocks.

**Conversion.** The FFT output carries the full LOG2N bits of growth. The reference fixed-point model
allows only 3 bits of growth at its FFT output (sfix35_En49) and then converts to sfix16_En36. This
design matches those types by shifting right by `13 + LOG2N − 3` (22 at the default size) before
saturating to 16 bits. Strong coherent targets can therefore saturate the Doppler output, just as
in the reference model. Input levels must leave room for the gain of about 4096 × 0.42 that the
FFT and window give a pure tone.

### Coherent integration (`coherent_integration`)

An accumulator memory holds one map, at 18 bits per part. Integration runs in groups of NMAPS
maps:

* During the first map of a group, each point is written into the memory.
* During the following maps, each point is read, added to the new sample, and written back.
* During the last map, the sum goes out instead, saturated to sfix17_En36, one clock after its
  input sample. `map_done` pulses after the last point of the group.

The read is issued one point ahead (`rd_q`), so the read-modify-write sustains one point per clock.

## DRFM image synthesizer

```
adc_iq ──► drfm_dpram ◄── drfm_mem_ctrl (store / recall / delay)
               │
               ▼
        iq_phase_converter ──► dis_array (512 × drfm_range_bin) ──► dac_i, dac_q
```

### Memory and controller (`drfm_mem_ctrl`, `drfm_dpram`)

The memory is a simple dual-port RAM of 4096 8-bit I/Q pairs, with a registered read.

* **Storing.** While `store_en` and `adc_valid` are high, samples are written from `store_addr`
  onward.
* **Recall.** A `recall` strobe starts a recall cycle. After `recall_delay` clocks of throughput
  delay, the controller reads `recall_len` words starting at `recall_addr`. The first address goes
  out 1 + delay clocks after the strobe, and its data one clock later. The delay is what places the
  false target in range.

### I/Q to phase (`iq_phase_converter`)

A 12-iteration vectoring CORDIC computes `atan2(Q, I)` of each recalled sample and rounds it to
5 bits: 32 phase states of 11.25°. Latency is 14 clocks. From here on, the pulse is represented
by phase only. Its amplitude is supplied by the range bins.

### Range bins (`drfm_range_bin`, `dis_array`)

Every bin sees the same phase sample in the same clock. Bin r performs these steps:

1. It adds its phase register (5 bits) to the sample.
2. It looks up 8-bit cos/sin in a 32-entry table. The table is
   `round(127·cos(2πk/32))`, built from a 9-entry quarter-wave table.
3. It shifts both left by its gain register g (0 to 10), giving an 18-bit product.
4. It splits the product. The low 5 bits go to the expansion outputs. The upper 13 bits are
   sign-extended to 16 bits and added to the partial sum arriving from the previous bin.

The partial-sum register in every bin delays the sum by one clock. The chain therefore computes

```
I(m) = Σ_r  (2^g(r) · exp(j(φ(m − r) + φ_r))) / 32      (16-bit wrap-around sum)
```

Here φ(m) is the input phase sequence, and each term is floored to an integer before it is added.
Bin r is the bin r places before the end of the chain.

At each `pulse_start`, every bin adds its phase increment to its phase register and its gain
increment to its gain register. The gain is clamped at 10. Per-pulse phase steps make a Doppler
shift, and the gain profile over r sets the target's length and shape.

The coefficients are written through `cfg_we/cfg_addr/cfg` (a `bin_cfg_t`: phase, phase
increment, gain, gain increment). This is the port a control processor would use.

Timing of `dis_array`:

* Range bin r's part of sample m appears 4 + r clocks after the sample enters.
* `out_valid` stays high until the last contribution of a pulse has left the chain.
* From a recall strobe to the first DAC sample takes `recall_delay` + 20 clocks: 2 in the memory
  path, 14 in the phase converter and 4 in the bins.

## Where this design departs from, or adds to, its source

* **One clock.** The source targets 500 MHz for the correlator, the corner turn and the DRFM, 400 MHz
  for the Doppler filter and the integration, and 100 MHz for the whole receiver chain. Here
  everything runs on one clock.
* **Valid bits instead of a zero test.** The source derives the corner-turn enable from "output is
  non-zero". That test would drop genuine zero samples, so each word carries an explicit valid bit
  instead.
* **Sign extension.** The source pads the 13-bit range-bin field with zeros. That is only correct
  for non-negative values, so the field is sign-extended here.
* **FFT.** The source uses a vendor FFT core with a fixed latency of 38 and a 3-bit-growth output
  type. Here the FFT is a full-growth streaming design with its own latency (see above), followed by
  a conversion scaled to reach the same output type.
* **Coefficient sources.** Twiddles, window values and the range-bin tables are computed (CORDIC, or
  a quarter-wave table) rather than stored.
* **Choices where the source is silent:**
  * the reference-code write port;
  * the DRFM memory depth (4096) and the recall length input;
  * the coefficient bus;
  * clamping the gain at 10;
  * 4 maps per integration in total (NMAPS = 5 gives the "one map plus four more" reading).
* **Only one modulus channel.** The full radar runs three moduli in parallel with different code
  lengths. Only the 102-subcode channel is specified, so only one channel is built. Three copies
  would need about 128 Mbit of buffer memory, more than the block RAM of the intended FPGA
  (about 80 Mbit).

## Resources at the default size

Synthesis of the top (before technology mapping) reports these figures:

| resource | amount |
|---|---|
| memory bits | 42.6 Mbit |
| corner-turn banks | 26.7 Mbit |
| integration accumulator | 15.0 Mbit |
| flip-flop bits | about 65,000 |
| word-level cells | about 46,000 |

The correlator needs 816 real multipliers and the FFT 48.

## Files

* `rtl/radar_pkg.sv` holds the shared types (`c16_t`, `c17_t`, `iq8_t`, `bin_cfg_t`), the
  saturation functions and the CORDIC arctangent table.
* All other `rtl/` files hold one module each.
* `tb/tb_<module>.sv` is a self-checking testbench for each block. It prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_radar_drfm_top.sv` runs the whole design at reduced size. It drives a P4 echo with range
  delay and Doppler shift through four maps, and checks the map peaks. It stores, delays and
  recalls a pulse through the range bins, and checks every DAC sample against the equation above.
  It also counts bank swaps, FFT drains, integrations, recalls, pulse steps and gain clamps, and
  fails if any of them never happens.
* `tb/tb_full_size.sv` runs the same scenario at the default sizes, with no parameter overrides:
  * 1.67 million received samples, giving one integrated 102 × 4096 map;
  * three pulses through all 512 range bins.

  It takes about a minute in Verilator.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tb_radar_drfm_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/radar_pkg.sv tb/tb_radar_drfm_top.sv
./obj_dir/Vtb_radar_drfm_top
```

To run another testbench, replace the testbench name. Every testbench has a watchdog. The
unit testbenches override parameters to keep runs short (for example a 16-point FFT and 4 range
bins). Each RTL file opens with a comment giving its interface, its latency, and which choices
follow the source and which are this design's own.
