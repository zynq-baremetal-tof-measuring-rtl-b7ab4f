// tb_kalman_rf: self-checking test of the envelope, pulse and TOF block.
//
// Rectified samples arrive every 100 clocks (1 MHz at 100 MHz): noise, then a rectified
// 40 kHz burst that starts a known number of samples after the RF packet signal. A
// floating-point Kalman filter with the comparator predicts the sample at which the envelope
// first exceeds vref; the measured tof_cycles must match the clocks from the RF pulse edge to
// that sample's ultrasonic edge within one sample period. The testbench also checks the
// envelope against the floating-point one, that no sample is dropped, that the RF pulse and the
// ultrasonic pulse both occur, and that a burst that never reaches vref ends in a timeout.
module tb_kalman_rf;
  import tof_pkg::*;

  localparam int unsigned MAXC = 100_000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic gpio_valid = 1'b0;
  logic [ABS_W-1:0] gpio_io_i = '0;
  logic [ENV_W-1:0] vref = 13'd410;
  logic rf_sync = 1'b0;
  logic [ENV_W-1:0] kalman;
  logic kalman_valid, ultra_pulse, rf_pulse, meas_valid, tof_timeout, sample_dropped;
  tof_meas_t meas;

  kalman_rf #(.MAX_CYCLES(MAXC), .RF_PULSE_CYCLES(1000)) dut (
    .clk, .rst, .gpio_valid, .gpio_io_i, .vref, .rf_sync, .kalman, .kalman_valid,
    .ultra_pulse, .rf_pulse, .meas_valid, .meas, .tof_timeout, .sample_dropped);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_meas = 0, n_timeout = 0, n_drop = 0, n_rf = 0, n_us = 0;
  tof_meas_t last;
  logic rf_q = 1'b0, us_q = 1'b0;
  always @(posedge clk) begin
    if (meas_valid) begin n_meas++; last <= meas; end
    if (tof_timeout) n_timeout++;
    if (sample_dropped) n_drop++;
    rf_q <= rf_pulse; us_q <= ultra_pulse;
    if (!rst && rf_pulse && !rf_q) n_rf++;
    if (!rst && ultra_pulse && !us_q) n_us++;
  end

  real pi = 3.14159265358979323846;
  real xr = 0.0, pr = 2500.0;
  real maxerr = 0.0;

  // One measurement: RF packet signal at sample 0, burst from sample `onset`.
  task automatic run(input int onset, input real amp, input bit expect_hit);
    int   first = -1;
    int   m0, t0;
    real  pp, k, e;
    m0 = n_meas; t0 = n_timeout;
    for (int n = 0; n < onset + 1500; n++) begin
      real s;
      int  v;
      s = (n >= onset && n < onset + 800) ? amp * $sin(2.0*pi*0.04*(n - onset)) : 0.0;
      if (s < 0) s = -s;
      v = int'($rtoi(s)) + $urandom_range(0, 30);
      pp = pr + 1.0; k = pp / (pp + 2500.0); xr = xr + k * (real'(v) - xr); pr = (1.0 - k) * pp;
      if (first < 0 && n >= 0 && xr > 410.0 + 2.0) first = n;
      @(negedge clk);
      if (n == 0) rf_sync = 1'b1;
      if (n == 5) rf_sync = 1'b0;
      gpio_io_i = ABS_W'(v); gpio_valid = 1'b1;
      @(negedge clk);
      gpio_valid = 1'b0;
      repeat (98) @(negedge clk);
      e = real'(kalman) - xr; if (e < 0) e = -e;
      if (e > maxerr) maxerr = e;
      check(e <= 3.0, $sformatf("envelope %0d, reference %f", kalman, xr));
    end
    if (expect_hit) begin
      // RF pulse edge: 3 clocks after rf_sync (driven 1 clock before sample 0 is presented).
      // Ultrasonic edge: 21 clocks after the sample that crosses (1 accept, 19 filter, 1 compare).
      int expected;
      expected = first * 100 + 21 - 2;
      check(n_meas == m0 + 1, "one measurement");
      check(int'(last.tof_cycles) >= expected - 100 && int'(last.tof_cycles) <= expected + 100,
            $sformatf("tof %0d expected about %0d", last.tof_cycles, expected));
    end else begin
      check(n_meas == m0 && n_timeout == t0 + 1, "weak burst gives a timeout");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(300, 1500.0, 1'b1);
    run(600, 1200.0, 1'b1);
    run(200, 300.0, 1'b0);
    check(n_drop == 0, "no sample dropped");
    check(n_rf == 3, $sformatf("three RF pulses (%0d)", n_rf));
    check(n_us >= 2, "ultrasonic pulses seen");
    $display("largest envelope deviation %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
