// abs_fnc: rectifier between the band-pass filter and the envelope filter.
//
// It takes the 32-bit band-pass output (ADC units with WIDE_FRAC = 16 fractional bits, two's
// complement), forms its absolute value, drops the fractional bits and saturates the integer
// part to the 14-bit unsigned output that the envelope filter reads. One register stage: the
// result and dout_valid appear one clock after din_valid.
//
// From the document: the function (absolute value, "rectified") and the port widths
// Din[31:0] and Dout[13:0] (Fig. 4). The fixed-point scaling and the saturation are this
// design's choice; the valid strobe is added so that the envelope filter updates once per
// sample. Reset is synchronous and active high.
module abs_fnc
  import tof_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          din_valid,
  input  logic signed [FIR_WIDE_W-1:0]  din,
  output logic                          dout_valid,
  output logic [ABS_W-1:0]              dout
);

  logic [FIR_WIDE_W-1:0] mag;
  logic [FIR_WIDE_W-WIDE_FRAC-1:0] mag_int;
  logic [ABS_W-1:0] mag_sat;

  always_comb begin
    // The magnitude of the most negative value, 2^31, still fits the unsigned width.
    mag     = din[FIR_WIDE_W-1] ? FIR_WIDE_W'(-din) : FIR_WIDE_W'(din);
    mag_int = mag[FIR_WIDE_W-1:WIDE_FRAC];
    mag_sat = (mag_int > (FIR_WIDE_W-WIDE_FRAC)'(2**ABS_W - 1)) ? '1 : mag_int[ABS_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout_valid <= 1'b0;
      dout       <= '0;
    end else begin
      dout_valid <= din_valid;
      if (din_valid) dout <= mag_sat;
    end
  end

endmodule
