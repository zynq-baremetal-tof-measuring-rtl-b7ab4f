// tof_pkg: widths, constants and shared types of the ultrasonic time-of-flight receiver.
//
// The receiver samples a 40 kHz ultrasonic burst with the Zynq XADC, band-pass filters it,
// rectifies it, extracts its envelope with a scalar Kalman filter, turns the envelope into a
// pulse by comparing it with a reference level, and measures the time from an RF reference pulse
// to that ultrasonic pulse.
//
// The band-pass coefficients below are the first 51 taps of a symmetric 101-tap filter
// (order 100, Hamming window, pass band 35-45 kHz, sampling rate 1 MHz; these four figures
// follow the document). They are the windowed ideal band-pass response
//   h[n] = w[n] * (sin(2*pi*f2*k) - sin(2*pi*f1*k)) / (pi*k),   k = n - 50,
//   h[50] = w[50] * 2*(f2 - f1),  w[n] = 0.54 - 0.46*cos(2*pi*n/100),
//   f1 = 35 kHz / 1 MHz, f2 = 45 kHz / 1 MHz,
// divided by the magnitude of the response at 40 kHz (unit gain at the centre frequency) and
// rounded to signed 16-bit integers with 19 fractional bits (h * 2^19). Tap n and tap 100-n are
// equal; the filter reads each stored value for both.
package tof_pkg;

  // XADC conversion result (the 12 most significant bits of the 16-bit status register).
  localparam int unsigned ADC_W     = 12;
  // FIR band-pass filter.
  localparam int unsigned FIR_TAPS  = 101;                  // order 100
  localparam int unsigned FIR_HALF  = (FIR_TAPS + 1) / 2;   // 51 distinct coefficients
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 19;
  localparam int unsigned FIR_OUT_W = 14;                   // Dout[13:0]
  localparam int unsigned FIR_WIDE_W = 32;                  // Dout32[31:0]
  localparam int unsigned WIDE_FRAC = 16;                   // fractional bits of Dout32
  // Rectifier output, Kalman filter input (gpio_io_i[13:0]) and output (Kalman[12:0]).
  localparam int unsigned ABS_W     = 14;
  localparam int unsigned ENV_W     = 13;

  // XADC channel numbers (CHANNEL output and DRP status-register address) of the
  // auxiliary analogue inputs VAUX7, VAUX14 and VAUX15.
  localparam logic [4:0] CH_VAUX7  = 5'h17;
  localparam logic [4:0] CH_VAUX14 = 5'h1E;
  localparam logic [4:0] CH_VAUX15 = 5'h1F;

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t BPF_COEF [FIR_HALF] = '{
      16'sd1053,   16'sd1052,   16'sd1003,   16'sd896,    16'sd719,
      16'sd458,    16'sd104,   -16'sd347,   -16'sd885,   -16'sd1490,
     -16'sd2126,  -16'sd2740,  -16'sd3271,  -16'sd3647,  -16'sd3797,
     -16'sd3656,  -16'sd3175,  -16'sd2328,  -16'sd1120,   16'sd409,
      16'sd2183,   16'sd4091,   16'sd5993,   16'sd7731,   16'sd9138,
      16'sd10055,  16'sd10347,  16'sd9914,   16'sd8707,   16'sd6738,
      16'sd4079,   16'sd867,   -16'sd2702,  -16'sd6393,  -16'sd9938,
     -16'sd13064, -16'sd15511, -16'sd17058, -16'sd17539, -16'sd16860,
     -16'sd15013, -16'sd12077, -16'sd8218,  -16'sd3676,   16'sd1249,
      16'sd6222,   16'sd10893,  16'sd14932,  16'sd18047,  16'sd20011,
      16'sd20683
  };

  // One time-of-flight result.
  typedef struct packed {
    logic [31:0] tof_cycles;   // clock cycles from RF pulse edge to ultrasonic pulse edge
    logic [15:0] dist_mm;      // tof * speed of sound, in millimetres
  } tof_meas_t;

endpackage
