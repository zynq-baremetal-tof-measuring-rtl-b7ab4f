// tof_receiver: ultrasonic time-of-flight receiver, from the ADC samples to the distance.
//
// The transmitter sends a 40 kHz ultrasonic burst and, at the same moment, a 2.4 GHz radio
// packet. The radio packet arrives practically at once and marks the start; the sound arrives
// after distance / (speed of sound). This module recovers the burst's arrival time and reports
// the distance:
//   XADC interface -> FIR band-pass (35-45 kHz) -> absolute value -> Kalman envelope
//   -> comparison with vref (ultrasonic pulse) -> TOF counter, started by the RF pulse.
//
// Interface: the XADC hard block (EOC/CHANNEL and its DRP read port) connects directly; the
// ultrasonic input is VAUX14 by default; US_CHANNEL selects VAUX7 or VAUX15 instead.
// rf_sync is the packet-received output of the RF transceiver. vref is the
// comparator level in ADC LSBs (1 LSB = 1/4096 V). The intermediate signals (samples, filter,
// rectifier and envelope outputs, pulses) come out as well, for a logic analyser.
//
// Timing: one XADC conversion per microsecond gives one filter sample per microsecond; the
// filter needs 52 clocks, the rectifier 1 and the envelope filter 19, well inside the
// 100 clocks of a sample period at 100 MHz. Reset is synchronous and active high.
//
// The chain and the block names follow the document (Figs. 1, 4, 5); running the envelope
// filter, the comparison and the TOF calculation in logic instead of processor software, and
// the channel choice, are this design's.
module tof_receiver
  import tof_pkg::*;
#(
  parameter logic [4:0]  US_CHANNEL      = CH_VAUX14,
  parameter int unsigned R               = 2500,
  parameter int unsigned Q               = 1,
  parameter int unsigned CLK_HZ          = 100_000_000,
  parameter int unsigned SOUND_MM_S      = 343_000,
  parameter int unsigned MAX_CYCLES      = 1_400_000,
  parameter int unsigned RF_PULSE_CYCLES = 100_000
) (
  input  logic                         clk,
  input  logic                         reset_in,
  // XADC hard block
  input  logic                         xadc_eoc,
  input  logic [4:0]                   xadc_channel,
  output logic                         xadc_den,
  output logic [6:0]                   xadc_daddr,
  input  logic                         xadc_drdy,
  input  logic [15:0]                  xadc_do,
  // RF transceiver and comparator level
  input  logic                         rf_sync,
  input  logic [ENV_W-1:0]             vref,
  // results
  output logic                         ultra_pulse,
  output logic                         rf_pulse,
  output logic                         meas_valid,
  output tof_meas_t                    meas,
  output logic                         tof_timeout,
  // observation
  output logic [ADC_W-1:0]             ad7,
  output logic [ADC_W-1:0]             ad14,
  output logic [ADC_W-1:0]             ad15,
  output logic                         syn_pul,
  output logic signed [FIR_OUT_W-1:0]  bpf_dout,
  output logic [ABS_W-1:0]             abs_dout,
  output logic [ENV_W-1:0]             kalman,
  output logic                         kalman_valid,
  output logic [7:0]                   adc_overrun,
  output logic                         sample_dropped
);

  logic [ADC_W-1:0] us_sample;
  always_comb begin
    unique case (US_CHANNEL)
      CH_VAUX7:  us_sample = ad7;
      CH_VAUX15: us_sample = ad15;
      default:   us_sample = ad14;
    endcase
  end

  xadc_sysmon u_xadc (
    .clk      (clk),
    .reset_in (reset_in),
    .eoc      (xadc_eoc),
    .channel  (xadc_channel),
    .den      (xadc_den),
    .daddr    (xadc_daddr),
    .drdy     (xadc_drdy),
    .do_data  (xadc_do),
    .ad7, .ad14, .ad15,
    .syn_pul  (syn_pul),
    .overrun  (adc_overrun)
  );

  logic                         fir_ready;
  logic                         fir_valid;
  logic signed [FIR_WIDE_W-1:0] fir_dout32;

  fir_bpf u_bpf (
    .clk, .rst (reset_in),
    .s_axis_data_tvalid (syn_pul),
    .s_axis_data_tready (fir_ready),
    .din                (us_sample),
    .m_axis_data_tvalid (fir_valid),
    .dout32             (fir_dout32),
    .dout               (bpf_dout)
  );

  logic abs_valid;
  abs_fnc u_abs (
    .clk, .rst (reset_in),
    .din_valid  (fir_valid),
    .din        (fir_dout32),
    .dout_valid (abs_valid),
    .dout       (abs_dout)
  );

  logic env_dropped;
  kalman_rf #(
    .R(R), .Q(Q), .CLK_HZ(CLK_HZ), .SOUND_MM_S(SOUND_MM_S),
    .MAX_CYCLES(MAX_CYCLES), .RF_PULSE_CYCLES(RF_PULSE_CYCLES)
  ) u_kalman_rf (
    .clk, .rst (reset_in),
    .gpio_valid     (abs_valid),
    .gpio_io_i      (abs_dout),
    .vref           (vref),
    .rf_sync        (rf_sync),
    .kalman         (kalman),
    .kalman_valid   (kalman_valid),
    .ultra_pulse    (ultra_pulse),
    .rf_pulse       (rf_pulse),
    .meas_valid     (meas_valid),
    .meas           (meas),
    .tof_timeout    (tof_timeout),
    .sample_dropped (env_dropped)
  );

  // A sample is lost if the band-pass filter or the envelope filter is still busy.
  assign sample_dropped = (syn_pul & ~fir_ready) | env_dropped;

endmodule
