# Ultrasonic time-of-flight receiver

This receiver measures distance by timing a sound pulse against a radio pulse. A transmitter
sends a short 40 kHz ultrasonic burst and, at the same moment, a 2.4 GHz radio packet. The radio
packet arrives at the receiver practically at once (its flight time is neglected). The sound
arrives about 2.9 ms per metre later. The receiver digitises the ultrasonic sensor signal and
extracts the burst's envelope. It notes when the envelope crosses a reference level and counts
the clock cycles from the radio pulse to that crossing. Multiplying the count by the speed of
sound gives the distance.

The structure follows a published Zynq-7010 design. In that design the front end (ADC
interface, band-pass filter, rectifier) is FPGA logic, and the rest runs as bare-metal C on the
two ARM cores. Here that rest is also logic, so the whole chain from ADC samples to millimetres
is SystemVerilog. `rtl/tof_receiver.sv` is the top.

## Signal chain

```
 XADC hard block          xadc_sysmon        fir_bpf              abs_fnc        kalman_rf
 (VAUX7/14/15,   EOC,CH   DRP reads,   AD14  101-tap band-pass   |x|, 14 bit    +-----------------------------+
  1 MSPS total) -------->  AD7/14/15  -----> 35-45 kHz, one  --->  saturated --->| kalman_filter -> ultra_pulse_gen --+
                 <-------  SynPul     SynPul multiplier, 52 clk  Dout32          |   envelope      env > vref        |
                 DEN/DADDR                                                       |                                   v
 RF transceiver ---------------------------------------------------------------> | rf_pulse_gen -----------------> tof_calc --> tof_cycles,
 packet signal (rf_sync)                                                          |  sync + 1 ms pulse   start  stop          dist_mm
                                                                                  +-----------------------------+
```

| Module | Job | Clocks per sample |
|---|---|---|
| `xadc_sysmon` | reads each XADC conversion over the DRP and holds it in AD7/AD14/AD15; SynPul marks every conversion | about 6 |
| `fir_bpf` | removes the ADC's DC offset and everything outside 35-45 kHz | 52 |
| `abs_fnc` | full-wave rectification of the 32-bit filter output, reduced to 14 bits | 1 |
| `kalman_filter` | scalar Kalman filter (R = 2500, Q = 1), turns the rectified carrier into an envelope | 19 |
| `ultra_pulse_gen` | ultrasonic pulse = envelope above `vref` | 1 |
| `rf_pulse_gen` | synchronises the transceiver's packet signal and makes a 1 ms RF pulse | - |
| `tof_calc` | counts clocks between the RF pulse's rising edge and the next ultrasonic rising edge; converts the count to mm | - |
| `kalman_rf` | groups the last four modules; its ports keep the names of the original processor block | - |
| `tof_pkg` | widths, XADC channel numbers, band-pass coefficients, the result struct | - |

At a 100 MHz clock one sample period is 100 clocks. The work per sample takes 52 + 1 + 19
clocks, so the chain keeps up with room to spare. The `sample_dropped` and `adc_overrun`
outputs report any sample lost because a stage was still busy. Neither fires in the tests.

## Sampling: three inputs, one filter rate

The XADC converts at most one million samples per second. Here it cycles through three
auxiliary inputs, so each input is refreshed at about 333 kHz. The band-pass filter is designed
for 1 MHz sampling. The two rates fit together because `xadc_sysmon` pulses SynPul at every
conversion, whatever its channel. The filter therefore runs at 1 MHz and sees the ultrasonic
input (VAUX14 by default, chosen with `US_CHANNEL`) held for three samples in a row. This hold
multiplies the spectrum by a gentle sinc. At 40 kHz that costs about 2 % of amplitude. The
images it creates near 333 kHz fall far outside the 35-45 kHz pass band. This reading of the two
rates is this design's own; the original only states both numbers.

## Number formats through the chain

Most of the design's subtlety is in the scaling, and every stage assumes the one before it:

- **ADC:** 12-bit unsigned code, 0 to 4095 for 0 to 1 V (XADC unipolar mode). The ultrasonic
  signal rides on an offset near mid-scale.
- **Band-pass coefficients:** a windowed ideal band-pass, given below. They are normalised to
  gain 1 at 40 kHz and stored as signed 16-bit integers with 19 fractional bits. The largest is
  20683. The accumulator therefore holds the output in ADC units with 19 fractional bits. The
  gain is 1.000 at 40 kHz, about 0.83 at the band edges, 0.02 at 20 and 60 kHz, and 0.0023 at DC.
  The 2048-LSB offset thus leaves about 5 LSB.
- **Dout32** (32 bits) is the filter output with 16 fractional bits. **Dout** (14 bits) is its
  integer part, saturated.
- **Rectifier:** takes |Dout32|, drops the 16 fractional bits and saturates at 16383. The
  envelope filter gets plain ADC units.
- **Kalman filter:** the estimate has 16 fractional bits and the covariance P is Q16.16. The
  gain K is a 16-bit fraction. R and Q are in LSB². The output is rounded to 13 bits.
- **Reference level `vref`:** in the same units. 1 LSB is 1/4096 V at the ADC input, so the
  levels 0.1 / 0.075 / 0.05 / 0.025 V become 410 / 307 / 205 / 102.

Coefficient formula (n = 0..100, k = n - 50, f1 = 0.035, f2 = 0.045):

```
h[n] = w[n] * (sin(2*pi*f2*k) - sin(2*pi*f1*k)) / (pi*k),  h[50] = w[50] * 2*(f2 - f1)
w[n] = 0.54 - 0.46*cos(2*pi*n/100)                          (Hamming)
stored = round(2^19 * h[n] / |H(40 kHz)|)
```

Only taps 0 to 50 are stored, because tap n equals tap 100-n. `fir_bpf` adds the two samples
that share a coefficient before it multiplies (a pre-adder). This halves the multiply count, so
one multiplier finishes a sample in 51 clocks. The original FPGA part also used a single DSP
slice.

## The envelope filter

The rectified 40 kHz carrier is a train of half-sine humps. The Kalman filter treats the
envelope as a constant disturbed by process noise Q and each sample as that constant plus
measurement noise R. For every sample it:

```
P' = P + Q;   K = P' / (P' + R);   x = x + K (z - x);   P = (1 - K) P'
```

K does not depend on the data. It starts near 0.5 (P0 = R) and settles within a few hundred
samples at the steady state of the Riccati equation. With R = 2500 and Q = 1 that gives
P' ≈ 51 and K ≈ 0.0196. After start-up the filter is therefore a first-order low-pass with a
time constant of about 50 µs. That is long enough to smooth the 12.5 µs humps and short enough
to follow a burst that lasts about a millisecond. The mean of a rectified sine is 2/π of its
peak, so a burst of peak amplitude A settles at an envelope of about 0.64 A.

The divider computes K one bit per clock (16 clocks). The update takes two multiplies.
Compared with a floating-point Kalman filter, the output stays within 1.5 LSB in the unit test.

## Time of flight and the level bias

`tof_calc` starts counting at the rising edge of the RF pulse. It stops at the first rising edge
of the ultrasonic pulse after that. Later edges are ignored until the next RF pulse: reflections,
and the comparator toggling on ripple. If no edge comes within `MAX_CYCLES` (14 ms, about
4.8 m), the measurement is dropped and `tof_timeout` pulses. The distance is

```
dist_mm = tof_cycles * SOUND_MM_S / CLK_HZ  =  (tof_cycles * round(2^32 * SOUND_MM_S / CLK_HZ)) >> 32
```

By default that is 343 m/s at a 100 MHz clock, or 0.00343 mm per clock.

The measured time is never the exact arrival time. The burst grows over a fraction of a
millisecond, and the envelope filter adds its own lag, so the envelope crosses a higher level
later. **The measured distance therefore grows with `vref`.** The original system reports the
same trend: about 3 cm over its four levels. With the end-to-end testbench's burst model (linear
rise over 250 µs, peak 1000 LSB) a true 2300 mm reads 2345, 2361, 2375 and 2389 mm at
0.025/0.05/0.075/0.1 V. The absolute offset depends on how fast the real transducer rings up,
which the model only approximates. The receiver adds fixed delays of its own. The band-pass
filter's linear phase delays the signal by 50 samples (50 µs, about 17 mm). Processing from a
conversion to the pulse takes about 80 clocks. The RF pulse lags `rf_sync` by 3 clocks. A
calibration would subtract an offset that depends on the level; none is built in.

## Departures from the original system

- **Processor functions as logic.** The original runs the Kalman filter and comparator on one ARM
  core. The second core initialises the RF module, generates the RF pulse and computes the TOF;
  the samples reach the cores through an AXI GPIO. Here all of these are logic blocks with the
  same inputs and outputs. The processor system, the GPIO and the AXI interconnect are absent.
- **RF transceiver setup is not included.** The design expects the transceiver's
  packet-received signal on `rf_sync`; configuring the transceiver is left to other logic or
  software.
- **XADC and logic analyser.** The XADC is a hard block outside this RTL; its DRP and EOC
  signals are top-level ports. The on-chip logic analyser is replaced by bringing the
  intermediate signals (AD values, filter output, rectifier output, envelope, pulses) out as
  ports.
- **Clock and reset are ports.** In the original the processor system supplies both (its
  FCLK_CLK0 and reset outputs).
- **The all-hardware variant is not built.** The original was also compared with a version that
  replaces the Kalman filter with a second FIR low-pass filter in the FPGA. Only the Kalman
  version is built here.
- **This design's own choices**, where the original is silent: the 100 MHz clock, 343 m/s, the
  coefficient quantisation and all fixed-point formats, the one-strobe-per-conversion sampling,
  VAUX14 as the ultrasonic input, the initial covariance P0 = R, the 1 ms RF pulse, the
  two-flop synchroniser, the first-edge rule and the 14 ms timeout. The reset is synchronous and
  active high.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `US_CHANNEL` | `5'h1E` (VAUX14) | which AD register feeds the filter (`5'h17`, `5'h1E`, `5'h1F`) |
| `R`, `Q` | 2500, 1 | Kalman noise covariances, LSB² |
| `CLK_HZ` | 100 000 000 | clock frequency, used only for the distance conversion |
| `SOUND_MM_S` | 343 000 | speed of sound, mm/s |
| `MAX_CYCLES` | 1 400 000 | TOF timeout in clocks |
| `RF_PULSE_CYCLES` | 100 000 | RF pulse width in clocks (at least 2) |

The filter size and coefficients are constants in `tof_pkg`. Changing the band means
recomputing the 51 coefficients with the formula above; `COEF_FRAC` and `FIR_HALF` follow from
them.

## Simulation

Every testbench checks its own results and ends with a line `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/tof_pkg.sv tb/tb_tof_receiver.sv --top-module tb_tof_receiver
./obj_dir/Vtb_tof_receiver
```

Replace the testbench name to run another one.

| Testbench | What it shows | Run time |
|---|---|---|
| `tb_tof_receiver` | Whole receiver at default parameters, fed by `tb/xadc_model.sv` and a model transmitter 2.3 m away. It runs four 15 ms periods: levels 0.1, 0.025 and 0.075 V, plus one period without a burst (timeout). It checks distance bounds, the agreement of distance with cycle count, the level trend, DC removal, the channel registers and lost samples. It also counts that each mechanism occurs: RF pulse, ultrasonic pulse, ignored echo, timeout, shared-channel conversions. | ~5 s |
| `tb_distance_sweep` | 25 measurements at each of the four levels, with amplitude and noise variation. It prints mean, spread, min and max per level and checks the trend. | ~90 s |
| `tb_fir_bpf` | Impulse response tap by tap, against coefficients recomputed in floating point. Exact output for random input, against direct convolution. Latency, handshake, gain at 40 kHz, rejection at DC and 20 kHz. | seconds |
| `tb_abs_fnc` | Corner values and random values, saturation, valid handling | seconds |
| `tb_kalman_filter` | Floating-point reference within 2 LSB; steady-state gain; 19-clock latency; busy handling | seconds |
| `tb_kalman_rf` | Envelope against a floating-point model, and TOF against the predicted crossing sample; timeout on a weak burst | seconds |
| `tb_ultra_pulse_gen`, `tb_rf_pulse_gen`, `tb_tof_calc`, `tb_xadc_sysmon` | Cycle-exact behaviour of the small blocks. `tb_tof_calc` includes a 2.3 m case and the 14 ms timeout. | seconds |

`tb/xadc_model.sv` is a behavioural model, not RTL. It models the XADC sequencing the three
inputs at one conversion per 100 clocks and answering DRP reads after 4 clocks. The analogue
inputs are given as codes.

## How far to trust it

- All blocks are tested against models written independently of them, at the default
  parameters. The filter coefficients are checked against the formula. The Kalman filter is
  checked against floating-point arithmetic.
- The end-to-end distance is checked only against bounds and trends. The signal comes from an
  idealised transducer model (linear ring-up, fixed decay, a few LSB of noise). A real sensor's
  burst shape sets the absolute offset.
- Nothing here has been run on hardware or through FPGA place-and-route. The combinational paths
  worth watching at 100 MHz are the filter's pre-add, multiply and accumulate, the Kalman
  update's 17×31-bit and 32×17-bit products, and the 32×32-bit distance product. Each is
  registered on both sides but has no internal pipeline.
