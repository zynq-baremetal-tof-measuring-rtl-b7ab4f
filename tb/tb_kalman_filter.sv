// tb_kalman_filter: self-checking test of the scalar Kalman filter.
//
// A floating-point Kalman filter with the same R, Q and initial values runs beside the
// block. The testbench feeds a step, a rectified 40 kHz burst with noise, and random values,
// and checks that every output is within 2 LSB of the floating-point estimate, that the gain
// settles at the steady-state value of the Riccati equation, that each sample takes 19 clocks,
// and that the filter refuses input while busy.
module tb_kalman_filter;
  import tof_pkg::*;

  localparam int unsigned R = 2500;
  localparam int unsigned Q = 1;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic z_valid = 1'b0;
  logic z_ready;
  logic [ABS_W-1:0] z = '0;
  logic x_valid;
  logic [ENV_W-1:0] x_out;
  logic [15:0] gain;

  kalman_filter #(.R(R), .Q(Q), .P0(R)) dut (.clk, .rst, .z_valid, .z_ready, .z, .x_valid,
                                             .x_out, .gain);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr = 0.0, pr = 2500.0, kr;
  real maxerr = 0.0;
  int  lat;

  task automatic sample(input int unsigned v);
    real pp, e;
    pp = pr + Q;
    kr = pp / (pp + R);
    xr = xr + kr * (real'(v) - xr);
    pr = (1.0 - kr) * pp;
    @(negedge clk);
    check(z_ready, "ready when idle");
    z = ABS_W'(v); z_valid = 1'b1;
    @(negedge clk);
    z_valid = 1'b0;
    check(!z_ready, "busy after accepting");
    // A sample offered while busy must be ignored.
    z = 14'h3FFF; z_valid = 1'b1;
    lat = 1;
    @(negedge clk); lat++;
    z_valid = 1'b0;
    while (!x_valid) begin @(negedge clk); lat++; end
    check(lat == 20, $sformatf("latency %0d", lat));   // accepting edge + 19
    e = real'(x_out) - xr;
    if (e < 0) e = -e;
    if (e > maxerr) maxerr = e;
    check(e <= 2.0, $sformatf("x %0d, reference %f", x_out, xr));
  endtask

  real pi = 3.14159265358979323846;
  real pss, kss;
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 600; n++) sample(1000);
    // Steady state: P'^2 - Q P' - Q R = 0.
    pss = (Q + $sqrt(Q*Q + 4.0*Q*R)) / 2.0;
    kss = pss / (pss + R);
    check(gain >= 16'($rtoi(kss * 65536.0)) - 2 && gain <= 16'($rtoi(kss * 65536.0)) + 2,
          $sformatf("steady gain %0d, expected %f", gain, kss * 65536.0));
    check(x_out >= 998 && x_out <= 1000, $sformatf("step settled at %0d", x_out));
    for (int n = 0; n < 400; n++) begin
      real s;
      s = (n < 200) ? 1500.0 * $sin(2.0*pi*0.04*n) : 0.0;
      if (s < 0) s = -s;
      sample(int'($rtoi(s)) + $urandom_range(0, 40));
    end
    for (int n = 0; n < 200; n++) sample($urandom_range(0, 16383));
    $display("largest deviation from the reference: %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
