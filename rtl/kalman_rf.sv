// kalman_rf: the processing that follows the rectifier: envelope extraction, the two pulses and
// the time-of-flight measurement.
//
// The rectified samples (gpio_io_i) enter the Kalman filter, whose envelope (kalman) is
// compared with the reference level vref to form the ultrasonic pulse. In parallel the
// transceiver's packet-received signal (rf_sync) becomes the RF reference pulse. The TOF unit
// counts the clocks from the rising edge of the RF pulse to the next rising edge of the
// ultrasonic pulse and converts them to millimetres.
//
// In the document this hierarchical block holds the dual-core processor system with a GPIO
// peripheral: the first core runs the Kalman filter and the comparison, the second core brings
// up the RF transceiver and computes TOF and distance (Figs. 2, 4 and 5). This module does the
// same work in logic, block for block; the ports keep the names of the document's block
// (gpio_io_i[13:0], Kalman[12:0], UltraPulse, RFPulse). Transceiver configuration over its
// serial port is not part of it.
//
// Timing: the envelope is updated 19 clocks after each input sample, the ultrasonic pulse one
// clock later. The RF pulse lags rf_sync by 3 clocks (synchronizer), so a measured tof_cycles
// is 3 clocks short of the time from rf_sync to the ultrasonic pulse edge.
module kalman_rf
  import tof_pkg::*;
#(
  parameter int unsigned R              = 2500,
  parameter int unsigned Q              = 1,
  parameter int unsigned CLK_HZ         = 100_000_000,
  parameter int unsigned SOUND_MM_S     = 343_000,
  parameter int unsigned MAX_CYCLES     = 1_400_000,
  parameter int unsigned RF_PULSE_CYCLES = 100_000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             gpio_valid,
  input  logic [ABS_W-1:0] gpio_io_i,
  input  logic [ENV_W-1:0] vref,
  input  logic             rf_sync,
  output logic [ENV_W-1:0] kalman,
  output logic             kalman_valid,
  output logic             ultra_pulse,
  output logic             rf_pulse,
  output logic             meas_valid,
  output tof_meas_t        meas,
  output logic             tof_timeout,
  output logic             sample_dropped
);

  logic z_ready;
  logic [15:0] gain_unused;

  // A sample that arrives while the filter is still busy is lost; flag it.
  assign sample_dropped = gpio_valid & ~z_ready;

  kalman_filter #(.R(R), .Q(Q), .P0(R)) u_kalman (
    .clk, .rst,
    .z_valid (gpio_valid),
    .z_ready (z_ready),
    .z       (gpio_io_i),
    .x_valid (kalman_valid),
    .x_out   (kalman),
    .gain    (gain_unused)
  );

  ultra_pulse_gen u_ultra (
    .clk, .rst,
    .env_valid   (kalman_valid),
    .env         (kalman),
    .vref        (vref),
    .ultra_pulse (ultra_pulse)
  );

  rf_pulse_gen #(.PULSE_CYCLES(RF_PULSE_CYCLES)) u_rf (
    .clk, .rst,
    .rf_sync  (rf_sync),
    .rf_pulse (rf_pulse)
  );

  logic tof_busy;
  tof_calc #(.CLK_HZ(CLK_HZ), .SOUND_MM_S(SOUND_MM_S), .MAX_CYCLES(MAX_CYCLES)) u_tof (
    .clk, .rst,
    .rf_pulse    (rf_pulse),
    .ultra_pulse (ultra_pulse),
    .meas_valid  (meas_valid),
    .meas        (meas),
    .timeout     (tof_timeout),
    .busy        (tof_busy)
  );

endmodule
