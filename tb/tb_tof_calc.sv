// tb_tof_calc: self-checking test of the time-of-flight counter and distance conversion.
//
// Runs at the default parameters (100 MHz, 343 m/s, 14 ms timeout). Each measurement raises
// the RF pulse, then the ultrasonic pulse d clocks later; the testbench checks tof_cycles == d
// and dist_mm against d * 343 000 / 10^8 computed in floating point (within 1 mm). It also
// checks that echoes after the first ultrasonic edge are ignored, that an ultrasonic pulse
// already high at the RF edge does not count until its next rising edge, that a missing burst
// ends in a timeout after 14 ms, and that a new RF edge restarts the count.
module tb_tof_calc;
  import tof_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic rf_pulse = 1'b0, ultra_pulse = 1'b0;
  logic meas_valid, timeout, busy;
  tof_meas_t meas;

  tof_calc dut (.clk, .rst, .rf_pulse, .ultra_pulse, .meas_valid, .meas, .timeout, .busy);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_valid = 0, n_timeout = 0;
  tof_meas_t last;
  always @(posedge clk) begin
    if (meas_valid) begin n_valid++; last <= meas; end
    if (timeout) n_timeout++;
  end

  // RF edge, ultrasonic edge d clocks later, a few echoes, then wait for the result.
  task automatic measure(input int unsigned d, input int echoes);
    real dref;
    int v0;
    v0 = n_valid;
    @(negedge clk); rf_pulse = 1'b1;
    repeat (d) @(negedge clk);
    ultra_pulse = 1'b1;
    repeat (20) @(negedge clk);
    ultra_pulse = 1'b0;
    for (int e = 0; e < echoes; e++) begin
      repeat (300) @(negedge clk); ultra_pulse = 1'b1;
      repeat (100) @(negedge clk); ultra_pulse = 1'b0;
    end
    rf_pulse = 1'b0;
    repeat (5) @(negedge clk);
    check(n_valid == v0 + 1, $sformatf("one result for d=%0d (%0d)", d, n_valid - v0));
    check(last.tof_cycles == d, $sformatf("tof %0d expected %0d", last.tof_cycles, d));
    dref = real'(d) * 343000.0 / 1.0e8;
    check(real'(last.dist_mm) >= dref - 1.0 && real'(last.dist_mm) <= dref + 1.0,
          $sformatf("distance %0d mm expected %f", last.dist_mm, dref));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    measure(1, 0);
    measure(7, 2);
    measure(670_554, 3);                 // 2.3 m
    for (int i = 0; i < 6; i++) measure($urandom_range(1000, 1_390_000), i % 3);
    // Ultrasonic pulse already high when the RF edge comes: only its next rise counts.
    ultra_pulse = 1'b1;
    @(negedge clk); rf_pulse = 1'b1;
    repeat (500) @(negedge clk); ultra_pulse = 1'b0;
    repeat (500) @(negedge clk); ultra_pulse = 1'b1;
    repeat (10) @(negedge clk); ultra_pulse = 1'b0; rf_pulse = 1'b0;
    repeat (5) @(negedge clk);
    check(last.tof_cycles == 1000, $sformatf("late rise: tof %0d expected 1000", last.tof_cycles));
    // No burst: timeout after MAX_CYCLES.
    begin
      int v0, t0, waited;
      v0 = n_valid; t0 = n_timeout; waited = 0;
      @(negedge clk); rf_pulse = 1'b1;
      repeat (10) @(negedge clk); rf_pulse = 1'b0;
      while (n_timeout == t0 && waited < 2_000_000) begin @(negedge clk); waited++; end
      check(n_timeout == t0 + 1 && n_valid == v0, "timeout without a burst");
      check(waited >= 1_399_980 && waited <= 1_400_000, $sformatf("timeout after %0d clocks", waited + 10));
      check(!busy, "idle after timeout");
    end
    // RF edge during a measurement restarts it.
    @(negedge clk); rf_pulse = 1'b1;
    repeat (2000) @(negedge clk); rf_pulse = 1'b0;
    repeat (100) @(negedge clk); rf_pulse = 1'b1;
    repeat (3000) @(negedge clk); ultra_pulse = 1'b1;
    repeat (5) @(negedge clk); ultra_pulse = 1'b0; rf_pulse = 1'b0;
    repeat (5) @(negedge clk);
    check(last.tof_cycles == 3000, $sformatf("restart: tof %0d expected 3000", last.tof_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
