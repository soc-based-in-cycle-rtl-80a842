# In-cycle load identification for induction-heating inverters

Domestic induction hobs usually run from a rectified mains bus that is not smoothed. The excitation
of the pot therefore swings from zero to its peak twice per mains cycle. A ferromagnetic pot's
equivalent resistance R and inductance L change with that excitation. A single averaged impedance
per bus cycle hides this variation, and the variation is what tells pot materials apart, warns of
saturation near the Curie temperature, and shows a pan being tossed.

This core tracks the first-harmonic impedance of two inverter loads continuously, 86.8 thousand
times per second. It uses a phase-sensitive detector (PSD) locked to the inverter's own
phase-accumulator modulator. In the FPGA fabric of a Zynq-class SoC it:

* drives both half-bridge inverters from 25-bit DDS modulators;
* samples v_o, v_c and i_L of each load with 12-bit SPI converters at 2.78 Msps;
* multiplies voltage and current by quadrature references taken from the modulator phase;
* filters the products down to 86.8 ksps, through one time-multiplexed filter chain per load;
* streams the four first-harmonic components of each load, plus its switching-frequency word, over
  AXI4-Stream to a DMA.

Software turns each frame into R and L. Configuration goes through AXI4-Lite.

## Measurement principle

Multiply a signal `x(t) = d + a cos(ω t + φ)` by `r_c = cos(ω t)` and by `r_s = sin(ω t)`, then
low-pass filter the two products. Only the DC terms survive:

    y_c =  a/2 cos φ        y_s = -a/2 sin φ

The DC term `d` and every term at ω or 2ω are removed. So `y_c - j y_s` is the phasor of x, with
amplitude a/2, relative to the reference. Apply this to the load voltage and to the load current,
with the same reference, to get the two phasors `V = vc - j vs` and `I = ic - j is`. The load
impedance is their ratio, and the reference's phase and amplitude cancel:

    R = (vc·ic + vs·is) / (ic² + is²)
    X = (vc·is − vs·ic) / (ic² + is²),   L = X / (2π f_sw)

The references must run at exactly the switching frequency, in step with the inverter. This is
automatic here: the 10 MSBs of the modulator's 25-bit phase accumulator address the sine table. The
phase used for each sample is the phase latched at the converters' sampling instant (chip-select
falling edge).

### Two views of the load voltage

`load_identifier` has a run-time voltage mode per load:

| mode | voltage used | impedance obtained |
|---|---|---|
| `VMODE_RL` (0) | v_o − v_c, the drop across the coil and pot | R + jωL of the load itself |
| `VMODE_RLC` (1) | v_o alone | R + j(ωL − 1/(ωC_r)) of the whole resonant tank |

The first mode needs the resonant-capacitor voltage, and it gives L without depending on the
capacitor's tolerance. The second mode needs one sensor fewer. L then follows from
`L = X/ω + 1/(C_r ω²)` with a known C_r. Both modes run from the same three converters per load.
The mode is a register bit, so software can switch between them.

## Signal chain and rates

| point | rate | clocks per sample (100 MHz) | width |
|---|---|---|---|
| ADC samples v_o, v_c, i_L (x2 loads) | 2.778 Msps | 36 | 12 bit unsigned |
| load voltage / current | 2.778 Msps | 36 | 13 bit signed |
| mixer products (4 per load) | 2.778 Msps | 36 | 31 bit |
| after CIC /8 (+ scaler) | 347.2 ksps | 288 | 43 → 32 bit |
| after FIR 1 /2 | 173.6 ksps | 576 | 32 bit |
| after FIR 2 /2 = result | 86.81 ksps | 1152 | 32 bit |

The modulator gives `f_sw = ftw · 100 MHz / 2^25`, which is 2.98 Hz per LSB. At the hob's working
range, 20 kHz is `ftw = 6711` and 75 kHz is `ftw = 25166`. The tuning words reset to 75 kHz, where
a hob starts modulating. The gates run at a fixed duty cycle of 0.5.

## The low-pass filter

The filter sets the time resolution of the identification. It is also where most of the design
freedom lies. Its cutoff has to sit far below the switching frequency: the mixer products at f_sw
and 2·f_sw, and the sidebands that the AC bus adds, must go. It also has to sit well above 100 Hz,
so that the variation within one bus half-cycle passes. This design uses 600 Hz.

Filtering 600 Hz directly at 2.78 Msps would need an impractically long FIR. The filter
(`psd_lpf`) therefore decimates in three stages:

1. **CIC, 4 sections, decimation 8** (`cic_decimator`). This stage needs no multipliers. Its DC
   gain 8^4 = 2^12 is removed by a rounded shift, the "scaler". The number of sections is not a
   free choice. With 4 sections the group delay of the whole chain is
   0.4375 + 0.375 + 52.5 = 53.3 output samples (614 µs). That total is the delay this filter is
   specified to have; 3 sections would give 53.2.
2. **FIR of order 3, decimation 2**, taps 1 3 3 1 (sum 8). This is a short anti-alias stage.
3. **FIR of order 210 (211 taps), decimation 2**. The taps are a Blackman-windowed sinc with a
   600 Hz cutoff at 173.6 ksps. They are 18 bits wide and sum to 2^23; the largest tap is 103640.

Both FIR stages use `fir_decimator`. It has one multiply-accumulate unit that walks the taps, one
per clock. The taps are computed at
elaboration time by `lid_pkg::fir_coef`, from the formula in the package header. Changing the
cutoff or the order is a parameter change.

Response of the 211-tap stage: −2 dB at 600 Hz, −26 dB at 2 kHz, below −68 dB from 3 kHz, and
below −110 dB at the 20–150 kHz mixer products. A 60 dB stop band already at 2 kHz would need
roughly twice as many taps at this rate with this kind of design. The order 210 is kept, so the
2–3 kHz region is only partly attenuated. This matters only for disturbances in that band, such as
bus-ripple sidebands. The switching products are removed completely.

### One filter chain for four signals

Each load produces four mixer products per sample: v·cos, v·sin, i·cos and i·sin. They all need
the same filter. Instead of four copies, one chain is time-multiplexed between them:

* `tdm_serializer` captures the four products of a sample and sends them on four consecutive
  clocks, tagged with channel numbers 0 to 3 in that order.
* Every stage keeps its state per channel and passes the tag along with the data:
  * The CIC keeps four sets of integrator and comb registers and selects them by the tag.
  * Each FIR keeps one circular sample buffer per channel. After every second input set, its
    multiply-accumulate unit filters channel 0, then 1, 2 and 3, one tap per clock.
* At the end, `load_identifier` routes each tagged output into its field of the result. The
  result is complete, and `valid_o` pulses, when channel 3 arrives.

Timing budget of the 211-tap stage:

* It needs 4 × 211 + 2 = 846 clocks per output set.
* It gets 1152 clocks per output set.
* An assertion checks that a new set never arrives while the unit is still busy.

The sharing adds up to about 850 clocks (23 samples) of latency. This is small next to the
61 400-clock group delay.

Multipliers per load:

* four in the two mixers;
* one in each FIR stage.

That makes six per load and twelve for the two-load core.

The whole chain has unit DC gain. A result word is therefore (a/2)·(2^17−1) for a signal of
amplitude a ADC codes: the amplitude of the reference sine is 2^17−1.

## Sampling interface

`adc_spi_ctrl` drives six serial 12-bit converters of the LTC2315-12 kind. They share chip select
and SCK; each converter has its own SDO line.

* Every 36 clocks, chip select falls. That edge is the sampling instant and is reported to the
  modulator-phase latch.
* 16 SCK cycles at 50 MSCK/s follow. The converter presents one leading zero and then 12 data
  bits, MSB first, each changing after a falling SCK edge.
* The master takes each bit in the clock in which it drives SCK low.

The frame details (leading zero, 16 clocks) follow the usual behaviour of this converter family.
They are parameters (`FRAME_BITS`, `LEAD_BITS`, `SCK_HALF`) if a different part is used.

Channel map: `adc_sdo[3l+0]` = v_o, `adc_sdo[3l+1]` = v_c, `adc_sdo[3l+2]` = i_L of load l. The
codes are taken as unsigned, and the mid-scale 2048 is subtracted. Any remaining offset is rejected
by the detector.

## Software interface

### Registers (AXI4-Lite, `axil_regs`)

| address | name | access | bits |
|---|---|---|---|
| 0x00 | CTRL | rw | [1:0] modulator enable per load, [2] ADC sampling, [3] result stream, [5:4] voltage mode per load |
| 0x04 | FTW0 | rw | [24:0] tuning word of load 0 (reset 25166 = 75 kHz) |
| 0x08 | FTW1 | rw | [24:0] tuning word of load 1 (reset 25166) |
| 0x0C | STATUS | ro | number of result frames dropped |
| 0x10 | INFO | ro | 0x4C49 in [31:16], number of loads in [15:8], ADC bits in [7:0] |

Byte strobes are honoured. Unmapped addresses answer SLVERR.

### Result stream (AXI4-Stream, `axis_result_stream`)

Each result produces one frame of 10 32-bit words:

    vc0 vs0 ic0 is0 ftw0   vc1 vs1 ic1 is1 ftw1(tlast)

The vc, vs, ic and is words are signed. A frame enters a 32-word FIFO only if all of it fits.
While the sink stalls, whole frames are dropped and counted (STATUS, and the `stream_ovf` output).
A frame is never torn. To compute an impedance, apply the formulas above to each frame. The
frame's own tuning word gives f_sw for L.

## Modules

| file | role |
|---|---|
| `rtl/lid_pkg.sv` | constants, `vmode_e`, `psd_result_t`, FIR tap and sine-table functions |
| `rtl/lid_top.sv` | top: two loads, register file, ADC controller, stream |
| `rtl/dds_modulator.sv` | 25-bit phase accumulator, gate commands, 10-bit phase |
| `rtl/sine_ref_gen.sv` | 256 x 18-bit quarter-wave table, cos/sin of the phase |
| `rtl/adc_spi_ctrl.sv` | SPI master for the converter bank |
| `rtl/load_identifier.sv` | PSD of one load: signal forming, 2 mixers, shared filter, result |
| `rtl/tdm_serializer.sv` | time-division multiplexer: 4 products onto one tagged stream |
| `rtl/psd_mixer.sv` | x·cos, x·sin |
| `rtl/psd_lpf.sv` | CIC + scaler + FIR + FIR, multi-channel |
| `rtl/cic_decimator.sv` | multi-channel CIC decimator |
| `rtl/fir_decimator.sv` | multi-channel serial-MAC decimating FIR |
| `rtl/axis_result_stream.sv` | frame packing, FIFO, drop counting |
| `rtl/axil_regs.sv` | AXI4-Lite register file |

Handshake rules (AXI4-Stream stability, AXI4-Lite response hold, FIR input spacing, channel order
into the shared filter, loads in lock step) are written as concurrent assertions next to the logic.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. Expected values are computed independently in the testbench:
floating-point sines, the CIC's equivalent FIR by polynomial multiplication, a floating-point
windowed sinc, and integer products.

`tb/tb_lid_top.sv` runs the whole core at its default sizes (about 1.6 M clocks, a few seconds in
Verilator). A plant model feeds six converter models (`tb/ltc2315_model.sv`) with a load current
that includes a third harmonic, the load voltage Z·i_L, and a capacitor voltage. The test computes
R and X from every streamed frame. It checks:

* both loads (40 kHz and 75 kHz), to within 0.003 of the plant impedance;
* a switch of load 0 to the R-L-C voltage mode (Z + V_c/I);
* half a 50 Hz bus period in which load 0's R and L vary with the excitation, tracked to within
  0.02 once the 614 µs filter delay is allowed for;
* a stream stall, with the dropped-frame count read back over AXI4-Lite;
* the 1152-clock frame spacing, the tuning words in the frames, and the gate frequency.

Typical results: R 0.49998 and X 0.80001 against 0.5 and 0.8.

`tb_psd_lpf` drives four channels with different levels. It confirms, on every channel:

* unit DC gain;
* removal of an 80 kHz product;
* the channel order of the outputs;
* the 53.3-sample group delay, measured on a step in one channel.

`tb_cic_decimator` and `tb_fir_decimator` check each channel against its own reference model.

To run one with plain Verilator, from the folder above `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/lid_pkg.sv tb/tb_lid_top.sv \
        --top-module tb_lid_top -Mdir obj -o sim && ./obj/sim

The testbenches are written for a two-state simulator. They do not depend on X propagation, and
they pass with random initial values.

## Departures and open points

* **R and L are not computed in hardware.** The core delivers the four components and f_sw; the
  division is left to software, as in the system this design follows. A hardware divider could be
  added after `load_identifier`.
* **Filter taps are this design's own** (binomial, then Blackman-windowed sinc). The stop band at
  2 kHz is −26 dB rather than 60 dB (see above).
* **CIC order 4** is inferred from the specified total group delay; it was not given directly.
* **Converter frame, SPI clock, channel map, register map, stream framing, FIFO depth and the
  frame-drop policy** are this design's choices.
* **No dead time** in the gate commands. It must come from the gate drivers, or be added in
  `dds_modulator`. Power-density modulation (burst on/off of the inverter) is left to software
  through the modulator enable bits.
* **Sensor scaling is outside the core.** Results are in ADC-code ratios. Converting them to
  ohms and henries needs the voltage and current sensor gains.
* **Resources:** the reference implementation of this kind of core (vendor filter cores, both
  loads) is reported at about 1500 LUTs, 12 DSP slices, 4 block RAMs and 2600 flip-flops.
  * This RTL has the same count of twelve multipliers: per load, four mixers plus one per FIR
    stage, the FIRs shared by the four channels.
  * Its data paths are full width, and the CIC and FIR sample stores are plain register arrays
    (4 × 212 words per load for the long FIR).
  * It has not been fitted to the LUT and flip-flop budget.
