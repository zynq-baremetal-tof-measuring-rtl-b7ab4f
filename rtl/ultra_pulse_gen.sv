// ultra_pulse_gen: turns the ultrasonic envelope into the ultrasonic pulse.
//
// At every new envelope value (env_valid) the output is set high when the envelope exceeds
// the reference level vref and low otherwise, so the pulse is high while the received burst
// is above the level; its rising edge marks the arrival of the burst. The comparison is
// registered: ultra_pulse changes one clock after env_valid and holds between samples.
//
// From the document: the comparison of the envelope with a reference level and its use as the
// ultrasonic pulse (Sections II.1 and IV.3, Fig. 10(f)); the document programs it on a processor
// core and sweeps the level over 0.1, 0.075, 0.05 and 0.025 V. Here vref is an input in
// envelope units; with the XADC's 1 V unipolar range and unit filter gain 1 LSB = 1/4096 V, so
// 0.1 V is about 410. The strict "greater than" and the absence of hysteresis are this design's
// choice. Reset is synchronous and active high.
module ultra_pulse_gen
  import tof_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             env_valid,
  input  logic [ENV_W-1:0] env,
  input  logic [ENV_W-1:0] vref,
  output logic             ultra_pulse
);

  always_ff @(posedge clk) begin
    if (rst)            ultra_pulse <= 1'b0;
    else if (env_valid) ultra_pulse <= (env > vref);
  end

endmodule
