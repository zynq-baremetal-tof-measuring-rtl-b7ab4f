// tb_fir_bpf: self-checking test of the band-pass filter.
//
// The testbench recomputes the 101 coefficients from the window formula with real arithmetic
// and checks: the impulse response tap by tap, the exact output for random input against a
// direct 101-term convolution, the 52-clock latency, tready during a computation, and the
// frequency response (unit gain at 40 kHz, strong rejection of DC and 20 kHz).
module tb_fir_bpf;
  import tof_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic              tvalid = 1'b0;
  logic              tready;
  logic [ADC_W-1:0]  din = '0;
  logic              mvalid;
  logic signed [FIR_WIDE_W-1:0] dout32;
  logic signed [FIR_OUT_W-1:0]  dout;

  fir_bpf dut (.clk, .rst, .s_axis_data_tvalid(tvalid), .s_axis_data_tready(tready), .din,
               .m_axis_data_tvalid(mvalid), .dout32, .dout);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Coefficients from the formula, independent of the package table.
  longint coef [FIR_TAPS];
  function automatic void make_coef();
    real h [FIR_TAPS];
    real re, im, g, pi, f1, f2, k, ideal, w;
    pi = 3.14159265358979323846;
    f1 = 35.0e3 / 1.0e6;
    f2 = 45.0e3 / 1.0e6;
    for (int n = 0; n < FIR_TAPS; n++) begin
      k = n - 50;
      if (n == 50) ideal = 2.0 * (f2 - f1);
      else ideal = ($sin(2.0*pi*f2*k) - $sin(2.0*pi*f1*k)) / (pi*k);
      w = 0.54 - 0.46 * $cos(2.0*pi*n/100.0);
      h[n] = ideal * w;
    end
    re = 0.0; im = 0.0;
    for (int n = 0; n < FIR_TAPS; n++) begin
      re += h[n] * $cos(2.0*pi*0.04*n);
      im -= h[n] * $sin(2.0*pi*0.04*n);
    end
    g = $sqrt(re*re + im*im);
    for (int n = 0; n < FIR_TAPS; n++) begin
      real v;
      v = h[n] / g * 524288.0;
      coef[n] = (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
    end
  endfunction

  longint hist [FIR_TAPS];   // most recent first
  longint exp_acc;

  function automatic longint sat14(longint v);
    if (v > 8191) return 8191;
    if (v < -8192) return -8192;
    return v;
  endfunction

  // Push one sample, wait for the result, compare with the direct convolution.
  int lat;
  task automatic push(input logic [ADC_W-1:0] s, input bit compare);
    for (int i = FIR_TAPS-1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = s;
    exp_acc = 0;
    for (int i = 0; i < FIR_TAPS; i++) exp_acc += coef[i] * hist[i];
    @(negedge clk);
    check(tready == 1'b1, "tready high when idle");
    din = s; tvalid = 1'b1;
    @(negedge clk);
    tvalid = 1'b0;
    lat = 1;
    check(tready == 1'b0, "tready low while computing");
    while (!mvalid) begin @(negedge clk); lat++; end
    if (compare) begin
      // lat counts the accepting edge too: result 52 edges after it.
      check(lat == FIR_HALF + 2, $sformatf("latency %0d", lat));
      check(dout32 == FIR_WIDE_W'(exp_acc >>> 3),
            $sformatf("dout32 %0d expected %0d", dout32, exp_acc >>> 3));
      check(dout == FIR_OUT_W'(sat14(exp_acc >>> 19)),
            $sformatf("dout %0d expected %0d", dout, sat14(exp_acc >>> 19)));
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pi = 3.14159265358979323846;
  real peak40, peak20, sum0;

  initial begin
    make_coef();
    for (int i = 0; i < FIR_TAPS; i++) hist[i] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Impulse response: one sample of 4095, then zeros.
    push(12'd4095, 1'b1);
    check(dout32 == FIR_WIDE_W'((coef[0] * 4095) >>> 3), "impulse tap 0");
    for (int n = 1; n < FIR_TAPS; n++) begin
      push(12'd0, 1'b1);
      check(dout32 == FIR_WIDE_W'((coef[n] * 4095) >>> 3), $sformatf("impulse tap %0d", n));
    end
    // Random input.
    for (int n = 0; n < 400; n++) push(12'($urandom_range(0, 4095)), 1'b1);
    // 40 kHz tone on a DC offset of 2048: unit gain, DC removed.
    peak40 = 0.0; sum0 = 0.0;
    for (int n = 0; n < 400; n++) begin
      push(12'($rtoi(2048.0 + 1000.0 * $sin(2.0*pi*0.04*n) + 0.5)), 1'b1);
      if (n >= 150) begin
        if ($itor(dout) > peak40) peak40 = $itor(dout);
        sum0 += $itor(dout);
      end
    end
    check(peak40 > 980.0 && peak40 < 1020.0, $sformatf("40 kHz gain, peak %f", peak40));
    check(sum0 / 250.0 < 20.0 && sum0 / 250.0 > -20.0, $sformatf("DC removed, mean %f", sum0/250.0));
    // 20 kHz tone: rejected.
    peak20 = 0.0;
    for (int n = 0; n < 400; n++) begin
      push(12'($rtoi(2048.0 + 1000.0 * $sin(2.0*pi*0.02*n) + 0.5)), 1'b1);
      if (n >= 150 && $itor(dout) > peak20) peak20 = $itor(dout);
    end
    check(peak20 < 50.0, $sformatf("20 kHz rejected, peak %f", peak20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
