# Tileable distributed digital beamformer: 4 chiplets, 64 elements, 4 beams

A large digital phased array normally ships every element's raw ADC data to one central
beamforming processor. That costs link power, routing and chip I/O, and stops scaling at
some array size. This design removes the central processor. Each chiplet serves 16 antenna
elements. It digitizes them, forms four *partial* beams from its own elements, adds them to
the partial beams of the previous chiplet, and forwards the sum to the next one. Beamforming
is linear, so the last chiplet in the chain outputs the full-array beams exactly. One chiplet
design therefore tiles to any array size. This RTL builds the module's digital part: four
identical chiplets in a chain, an 8x8 array, four beams.

Two mechanisms make the chain work:

* **Time alignment of partial beams.** A chiplet receives its predecessor's sum several
  frames late. It delays its own beams in a FIFO by a calibrated number of frames before
  adding.
* **Multi-chip clock synchronization.** Every chiplet divides a shared 4GHz reference. After
  reset the dividers start in arbitrary phases. A leader/follower digital PLL between each
  pair of neighbours brings them into phase. Without it, chiplets would decimate at
  different instants and disagree on I/Q polarity.

## Clocking model

Everything is written in one clock domain: the 4GHz reference (`clk`). One cycle is one
sample of the sub-ADC bitstreams. The slower rates are phases of a 4-bit divider
(`clock_gen`): 2GHz, 1GHz, 500MHz and 250MHz. A **frame** is one 250MHz period, 16 cycles.
A Streaming-AIB lane bit lasts 4 cycles (1Gbps). In simulation all chiplets share `clk`,
but each has its own `rst_n`, so their dividers really do start out of phase.

## One chiplet, channel to beam

```
adc_a/adc_b --> adc_combiner --> bitstream_beamformer (x4 beams) --> cic_decimator (I,Q)
 (16 ch)          y in -2..2      fs/4 downconvert, rotate, sum       /16, sinc^2
                                       ^ phase_weight_lut (10-bit code -> cos/sin)
--> scale 2^-10, saturate to 13 bit --> I or Q by frame parity --> beam_align_fifo
--> beam_summer (+ words from saib_rx) --> saib_tx --> next chiplet
```

**Sub-ADC combining (`adc_combiner`).** Each channel has two single-bit bandpass
delta-sigma sub-ADCs. One samples on the rising 4GHz edge, the other on the falling edge.
Adding them (bits mapped to +-1) forms a two-tap FIR, which notches clock crosstalk and gives
6dB more signal. In low-power mode (`dual_mode = 0`) only the rising-edge sub-ADC is used.

**Mux-based bitstream beamforming (`bitstream_beamformer`).** The IF is 1GHz, exactly
fs/4. Downconverting sample *n* multiplies it by j^-n, so in every cycle exactly one of I and
Q is non-zero, and it equals +-y. Rotating by the channel weight w = wc + j*ws therefore
needs no multiplier. Each output is a choice among +-y*wc and +-y*ws, and with y in {-2..2}
that is only a shift and a negation:

| n mod 4 | beam I | beam Q |
|---|---|---|
| 0 | y*wc | y*ws |
| 1 | y*ws | -y*wc |
| 2 | -y*wc | -y*ws |
| 3 | -y*ws | y*wc |

The 16 channel terms are summed into a 13-bit I and Q per beam per cycle. The `n` used is the
divider phase, which is why the dividers must agree across chiplets.

**Weights (`phase_weight_lut`).** A beam is steered by one 10-bit phase code per channel
(angle 2*pi*code/1024). The LUT returns round(127*cos) and round(127*sin). Only a quarter
sine table of 257 entries is stored. It is computed at elaboration from a Taylor series, so
no data file is needed. The spiral placement rotates each die by 90 degrees. That changes
which antenna a channel drives, and the phase codes absorb it.

**Decimation and the link word.** A second-order CIC (`cic_decimator`, R = 16) dumps once
per frame, at divider phase 0. Its output is shifted right by `OUT_SHIFT` = 10 and saturated
to 13 bits. One chiplet at full scale then gives about +-1016, so four chiplets fit in a
13-bit word. Each frame carries one 13-bit word per beam. I goes on one frame and Q on the
next, which gives 125MS/s complex per beam: 250M real samples/s for a 100MHz channel
(oversampling 2.5). Which frame parity carries Q is set by the `iq_phase` input (see
calibration).

## The chain: alignment and summation

`beam_align_fifo` stores one word set per frame. It returns the set written `fifo_delay`
frames before the latest one. At divider phase 14, `beam_summer` adds that set to the latest
packet from `saib_rx`, saturating to 13 bits. At phase 15, `saib_tx` latches the result for
the next frame. The first chiplet (`first = 1`) ignores its receiver.

Latency in this implementation, with all dividers aligned:

* From decimation to the last 1GHz edge of the matching packet on a chiplet's output: 31
  cycles.
* Each further hop: 2 frames (32 cycles). The output and input registers of each link are
  part of this.

So the calibration is `fifo_delay = 2*k` for chiplet *k*, counted from 0. The module's
output carries a sample 31 + 32*(N-1) cycles after its decimation: 127 cycles for four
chiplets.

**Calibration.** The clock PLL aligns dividers to one 250MHz period, but not the I/Q frame
parity, which repeats every two frames. After lock, read `frame_par` of all chiplets and set
`iq_phase[k] = frame_par[0] ^ frame_par[k]`. Also set `fifo_delay` as above. Both are static
afterwards. The original hardware calibrates the FIFO delay once with on-chip test
structures. Those are not modelled; the delay is a configuration input.

## Streaming-AIB framing (`saib_tx`, `saib_rx`)

Each link has 13 data lanes, a forwarded 1GHz clock and a forwarded 250MHz clock. Lane *i*
carries bit *i* of a beam word. Each lane sends the four beams one after another in a
frame: a 4:1 serializer, 4 x 250Mbps into 1Gbps. Because the outputs are registered, the
link runs one cycle behind the sender's divider:

```
divider phase  : 1 2 3 4 | 5 6 7 8 | 9 ... 12 | 13 ... 16(0)
lanes          : beam 0  | beam 1  | beam 2   | beam 3
clk1g (fwd)    : _ _/^ ^ | _ _/^ ^ |  ...       (rises mid-bit)
clk250 (fwd)   : ^ ^ ^ ^   ^ ^ ^ ^ | _ _ ...    (rises with beam 0)
```

The receiver captures the link in input registers. It samples on detected rising edges of
the forwarded 1GHz clock, and treats the first sample after a 250MHz rising edge as beam 0.
After beam 3 it presents all four words together for the rest of the frame. The forwarded
clock is not used as a separate clock domain. This works because the clock PLL has put both
ends in phase. `tx_boost` is registered out as `drv_boost`. In hardware it selects the
stronger pad driver that the last chiplet uses towards the FPGA; the pads themselves are
analog and not part of the RTL.

## Multi-chip clock synchronization (`mc_dpll`)

This is the least obvious part. Chiplets synchronize in pairs along the chain. In each
pair, chiplet *k* is the leader and chiplet *k+1* the follower:

1. The leader forwards its 250MHz clock (the same clock as the Streaming-AIB packet marker).
2. The follower delays the received clock in a 16-stage shift register (`sync_delay_line`).
   On every rising edge of the delayed clock, `clock_gen` loads its divider with
   `ALIGN_PHASE`.
3. The follower sends the delayed clock back (loop-back). The leader delays it by the *same*
   setting and compares it with its own 250MHz clock (`phase_comparator`). The comparator
   counts 4GHz cycles from the reference edge to the loop-back edge and reports the result
   as -8..+7.
4. `phase_counter` averages 16 errors and corrects a 3-bit code. The code drives the leader's
   shift register and, through `sync_code_out -> sync_code_in`, the follower's.

Let *d* be the one-way delay in cycles, from the leader's divider edge to the follower's
input register. The shift registers delay by D = (16 - code) mod 16. The follower's divider
is then in phase when d + D = 0 (mod 16), that is when code = d. The loop-back has passed the
link and the delay twice, so the comparator sees 2(d - code) mod 16. Halving that modulo 8
gives (d - code) mod 8 without sign ambiguity, for any d from 0 to 7. The design therefore
covers one-way delays of up to 7 cycles (1.75ns). Longer delays would lock half a 250MHz
period off. With direct wiring between chiplets, d = 2 (one output register and one input
register), and every code settles at 2. `ALIGN_PHASE = 1` accounts for the register latency
around the loop. The loop runs continuously, so it follows a change of channel delay or a
glitch. In the testbenches, lock takes about 500 to 750 cycles after the last reset.

The delay code travels on a sideband (`sync_code_*`), which stands in for the chiplet's
control interface.

## Files

| file | role |
|---|---|
| `rtl/bf_pkg.sv` | constants, `beam_word_t`, `saib_link_t`, saturation helper |
| `rtl/bf_module_top.sv` | top: `NUM_CHIPLETS` chiplets in a chain, final link out |
| `rtl/bf_chiplet.sv` | one chiplet |
| `rtl/adc_combiner.sv` | two-sub-ADC combining, single/dual mode |
| `rtl/phase_weight_lut.sv` | 10-bit phase code to cos/sin weights |
| `rtl/bitstream_beamformer.sv` | mux-based downconversion, rotation and channel sum |
| `rtl/cic_decimator.sv` | order-2 CIC, one output per frame |
| `rtl/beam_align_fifo.sv` | frame-delay FIFO |
| `rtl/beam_summer.sv` | saturating partial-beam adder |
| `rtl/saib_tx.sv`, `rtl/saib_rx.sv` | Streaming-AIB serializer and deserializer |
| `rtl/clock_gen.sv` | divider with follower re-phasing |
| `rtl/sync_delay_line.sv`, `rtl/phase_comparator.sv`, `rtl/phase_counter.sv`, `rtl/mc_dpll.sv` | multi-chip PLL |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/ctbpdsm_model.sv` | behavioural bandpass delta-sigma sub-ADC (testbench only) |
| `tb/chiplet_ref_model.sv` | real-arithmetic reference of a chiplet's local beam words |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`, where M = 0 means it passed. Each has
a watchdog. With Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/bf_pkg.sv \
    tb/tb_bf_module_top.sv --top tb_bf_module_top
obj_dir/Vtb_bf_module_top
```

`tb_bf_module_top` runs the whole module at the default parameters and takes under a minute.
It releases the four resets at random times and waits for every divider to align. It then
calibrates and drives a plane wave from beam 1's direction through 128 behavioural sub-ADCs.
Every output packet is compared with the sum of four reference models at the fixed
127-cycle latency. Beam 1 must carry far more power than the other three beams. Halfway
through, the test switches from dual to single sub-ADC mode. It also counts follower
re-phases, code corrections, received packets, FIFO use and boost, and fails if any of
them never happened. `tb_bf_chiplet` does the same for a single chiplet. `tb_mc_dpll` checks
locking for several channel delays, changed while running.

`tb_beampattern` measures the array's beam pattern. It uses the same 4-chiplet module and
drives plane waves at 17 arrival angles, from sin(theta) = -1 to 1. For each angle it records
the power of beam 0 (broadside) and beam 1 (steered to sin(theta) = 0.5). Both are compared
with the ideal array factor of 8 elements spaced half a wavelength apart. Where the ideal lies
above -20 dB they must agree within 1.5 dB. At the ideal nulls the measured response must be
below -12 dB; the test prints the whole table, and nulls usually fall below -30 dB. The test
also measures the gain from using both sub-ADCs instead of one: +5.4 dB. Adding two
single-bit outputs doubles the step, which is +6 dB at DC. At the fs/4 IF the half-sample
offset between the two modulators costs 0.7 dB, because cos(pi/8)^2 gives -0.69 dB.

The chain length is the `NUM_CHIPLETS` parameter. A 16x8 array of 128 elements has also
been simulated by copying `tb_bf_module_top` with `NC = 8` and eight chiplet positions. The
copy passed the same exact checks. With
`FIFO_DEPTH = 16`, each hop adds two frames of alignment delay, so up to 8 chiplets fit.

## What is modelled, and where it departs from the original

Taken from the original design:

* 16 channels and 4 beams per chiplet, a 4-chiplet daisy chain.
* Two sub-ADCs on opposite clock edges, with single and dual modes.
* fs/4 mux-based processing of the un-decimated bitstream, with 10-bit phase codes.
* 13 lanes with 4:1 multiplexing at 1Gbps, and forwarded 1GHz and 250MHz clocks.
* FIFO alignment, then summation.
* A leader/follower PLL with shift-register delays, a 4GHz comparator and an averaging
  phase counter.

Choices of this implementation, not taken from the original:

* Single-bit sub-ADC outputs.
* 8-bit weights.
* The CIC decimator and its scaling.
* Carrying I and Q on alternate frames, with the `iq_phase` calibration bit.
* Saturation in the summer.
* The data-movement phases 0, 14 and 15, and the FIFO depth (16 frames).
* PLL averaging over 16 errors, the code range of 0-7 cycles, and the code sideband.
* Asynchronous active-low resets.
* The receiver samples the forwarded clocks in its own 4GHz domain. It does not use them as
  clocks. This relies on the clock PLL having aligned both ends.

Not in the RTL:

* The analog front end: LNA, mixer, 27GHz LO PLL and the sub-ADCs themselves. The
  sub-ADCs have a behavioural model for the testbenches.
* The pad drivers.
* The FIFO calibration structures.
* The physical spiral placement.

Not checked by any testbench:

* The 3dB SNR gain of dual mode. The behavioural sub-ADC is a bare second-order
  error-feedback loop. Its in-band error is dominated by its own pattern noise and spurs,
  not by noise at its input. With independent input noise on each sub-ADC, the measured
  gain moved erratically with the noise level. The model cannot show this property.
* The suppression of sampling-clock crosstalk by the two-tap FIR. The combiner implements
  the sum that causes the suppression, but no testbench injects crosstalk.

The summer's saturation never triggers in the testbenches. Even an 8-chiplet chain driven
at 0.7 of full scale peaks near 2100, against a limit of 4095. Saturation only guards much
longer chains or a smaller `OUT_SHIFT`.
