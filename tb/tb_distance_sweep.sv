// tb_distance_sweep: distance measurement against the comparator level, at default parameters.
//
// The receiver measures a transmitter 2.3 m away once per 15 ms period, as in the experiment
// this design is built for, with the comparator level stepped through 0.1, 0.075, 0.05 and
// 0.025 V (410, 307, 205 and 102 LSB). N_PER_LEVEL measurements are taken at each level (the
// experiment took 1000; 25 keep the simulation to a couple of minutes). The burst amplitude
// varies by +-5 % and the ADC input carries noise of a few LSB, so the measurements scatter.
// Per level the testbench prints mean, standard deviation, minimum and maximum, and checks
// that every period gave a measurement, that all lie between the true distance and 120 mm
// beyond it, that the scatter stays below 10 mm, and that the mean distance grows with the
// level, which is the trend the experiment reports.
module tb_distance_sweep;
  import tof_pkg::*;

  localparam int     N_PER_LEVEL = 25;
  localparam int     N_LEVELS    = 4;
  localparam longint PERIOD      = 1_500_000;
  localparam longint T_FIRST     = 100_000;
  localparam longint TOF_TRUE    = 670_554;      // 2.3 m / 343 m/s at 100 MHz
  localparam real    TRUE_MM     = 2300.0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [11:0] code7 = 12'd0, code14 = 12'd2048, code15 = 12'd0;
  logic        eoc, den, drdy;
  logic [4:0]  channel;
  logic [6:0]  daddr;
  logic [15:0] do_data;
  logic        rf_sync = 1'b0;
  logic [ENV_W-1:0] vref = 13'd410;

  logic ultra_pulse, rf_pulse, meas_valid, tof_timeout, syn_pul, kalman_valid, sample_dropped;
  tof_meas_t meas;
  logic [ADC_W-1:0] ad7, ad14, ad15;
  logic signed [FIR_OUT_W-1:0] bpf_dout;
  logic [ABS_W-1:0] abs_dout;
  logic [ENV_W-1:0] kalman;
  logic [7:0] adc_overrun;

  xadc_model u_xadc (.dclk(clk), .reset(rst), .code7, .code14, .code15, .den, .daddr, .drdy,
                     .do_data, .eoc, .channel);

  tof_receiver dut (
    .clk, .reset_in(rst),
    .xadc_eoc(eoc), .xadc_channel(channel), .xadc_den(den), .xadc_daddr(daddr),
    .xadc_drdy(drdy), .xadc_do(do_data),
    .rf_sync, .vref,
    .ultra_pulse, .rf_pulse, .meas_valid, .meas, .tof_timeout,
    .ad7, .ad14, .ad15, .syn_pul, .bpf_dout, .abs_dout, .kalman, .kalman_valid,
    .adc_overrun, .sample_dropped);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_600_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pi = 3.14159265358979323846;
  longint t = 0;
  always @(posedge clk) t <= rst ? 0 : t + 1;

  function automatic real burst(longint dt, real amp);
    real us, env;
    if (dt < 0) return 0.0;
    us = real'(dt) / 100.0;
    if (us < 250.0)       env = us / 250.0;
    else if (us < 500.0)  env = 1.0;
    else if (us < 1500.0) env = (1500.0 - us) / 1000.0;
    else                  return 0.0;
    return amp * env * $sin(2.0 * pi * 0.04 * us);
  endfunction

  real amp = 1000.0;
  always @(posedge clk) begin
    longint ph;
    ph = (t < T_FIRST) ? -1 : (t - T_FIRST) % PERIOD;
    rf_sync <= (ph >= 0 && ph < 5_000);
    if (ph == 1) amp = 950.0 + real'($urandom_range(0, 100));
    if (u_xadc.conv_cnt == 97)
      code14 <= 12'($rtoi(2048.0 + (ph >= 0 ? burst(ph - TOF_TRUE, amp) : 0.0) + 0.5)
                    + $urandom_range(0, 8) - 4);
  end

  int level = 0;
  int n_at [N_LEVELS] = '{0, 0, 0, 0};
  real sum [N_LEVELS] = '{0.0, 0.0, 0.0, 0.0};
  real sq  [N_LEVELS] = '{0.0, 0.0, 0.0, 0.0};
  int  mn  [N_LEVELS] = '{99999, 99999, 99999, 99999};
  int  mx  [N_LEVELS] = '{0, 0, 0, 0};
  int  n_timeout = 0;
  logic [ENV_W-1:0] levels [N_LEVELS] = '{13'd410, 13'd307, 13'd205, 13'd102};

  always @(posedge clk) if (!rst) begin
    if (tof_timeout) n_timeout++;
    if (meas_valid) begin
      int d;
      d = int'(meas.dist_mm);
      n_at[level]++;
      sum[level] += real'(d);
      sq[level]  += real'(d) * real'(d);
      if (d < mn[level]) mn[level] = d;
      if (d > mx[level]) mx[level] = d;
      check(real'(d) >= TRUE_MM - 5.0 && real'(d) <= TRUE_MM + 120.0, $sformatf("distance %0d mm", d));
    end
  end

  real mean [N_LEVELS];
  initial begin
    repeat (5) @(negedge clk);
    rst = 1'b0;
    for (int l = 0; l < N_LEVELS; l++) begin
      level = l;
      vref = levels[l];
      wait (t == T_FIRST + longint'((l + 1) * N_PER_LEVEL) * PERIOD - 10);
    end
    for (int l = 0; l < N_LEVELS; l++) begin
      real sd;
      mean[l] = sum[l] / N_PER_LEVEL;
      sd = $sqrt(sq[l] / N_PER_LEVEL - mean[l] * mean[l]);
      $display("vref %0d LSB (%.3f V): %0d measurements, mean %.1f mm, std %.2f mm, min %0d, max %0d",
               levels[l], real'(levels[l]) / 4096.0, n_at[l], mean[l], sd, mn[l], mx[l]);
      check(n_at[l] == N_PER_LEVEL, $sformatf("level %0d: %0d measurements", l, n_at[l]));
      check(sd < 10.0, $sformatf("level %0d: scatter %f mm", l, sd));
      if (l > 0) check(mean[l] < mean[l-1], $sformatf("mean distance falls with the level (%0d)", l));
    end
    check(n_timeout == 0, "no timeouts");
    check(sample_dropped == 1'b0 && adc_overrun == 0, "no lost samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
