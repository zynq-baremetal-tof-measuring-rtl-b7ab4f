// tb_tof_receiver: end-to-end test of the receiver at its default parameters.
//
// A model transmitter fires every 15 ms: the RF packet signal (rf_sync) at the start of the
// period and, TOF_TRUE clocks later, a 40 kHz burst on VAUX14 (2.3 m at 343 m/s). The burst
// rises over 0.25 ms, holds 0.25 ms and rings down over 1 ms, riding on a 0.5 V offset with a
// few LSB of noise; a weaker reflection follows. The XADC model converts VAUX7, VAUX14 and
// VAUX15 in turn at 1 MSPS. Four periods are run:
//   1. vref = 410 (0.1 V)     a measurement, echoes ignored
//   2. no burst               a timeout
//   3. vref = 102 (0.025 V)   a measurement, shorter than in period 1
//   4. vref = 307 (0.075 V)   a measurement between the two
// Checks: each measurement lies between the true distance and 120 mm beyond it (the envelope
// needs time to reach the level) and agrees with tof_cycles * 343 000 / 10^8; the measured
// distance grows with vref; the band-pass output is centred on zero (DC removed); the AD7 and
// AD15 inputs reach their registers; no sample or conversion is lost. Each mechanism (RF
// pulse, ultrasonic pulse, ignored echo edge, timeout, level change, channel sharing) is
// counted and must have happened.
module tb_tof_receiver;
  import tof_pkg::*;

  localparam longint PERIOD   = 1_500_000;          // 15 ms
  localparam longint T_FIRST  = 100_000;            // first transmission at 1 ms
  localparam longint TOF_TRUE = 670_554;            // 2.3 m / 343 m/s at 100 MHz
  localparam real    TRUE_MM  = 2300.0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [11:0] code7 = 12'd1000, code14 = 12'd2048, code15 = 12'd3000;
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
    #80_000_000;       // 8 M clocks
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- transmitter, air and sensor model -------------------------------------------------
  real pi = 3.14159265358979323846;
  longint t = 0;
  always @(posedge clk) t <= rst ? 0 : t + 1;

  function automatic real burst(longint dt, real amp);
    real us, env;
    if (dt < 0) return 0.0;
    us = real'(dt) / 100.0;                         // microseconds
    if (us < 250.0)       env = us / 250.0;
    else if (us < 500.0)  env = 1.0;
    else if (us < 1500.0) env = (1500.0 - us) / 1000.0;
    else                  return 0.0;
    return amp * env * $sin(2.0 * pi * 0.04 * us);
  endfunction

  int period_idx;
  always @(posedge clk) begin
    longint ph;
    real a;
    period_idx = (t < T_FIRST) ? -1 : int'((t - T_FIRST) / PERIOD);
    ph = (t < T_FIRST) ? -1 : (t - T_FIRST) % PERIOD;
    rf_sync <= (ph >= 0 && ph < 5_000);
    // Input changes two clocks before each conversion ends.
    if (u_xadc.conv_cnt == 97) begin
      a = 0.0;
      if (ph >= 0 && period_idx != 1) begin
        a = burst(ph - TOF_TRUE, 1000.0) + burst(ph - TOF_TRUE - 250_000, 350.0);
      end
      code14 <= 12'($rtoi(2048.0 + a + 0.5) + $urandom_range(0, 6) - 3);
      code7  <= 12'(1000 + $urandom_range(0, 3));
      code15 <= 12'(3000 + $urandom_range(0, 3));
    end
  end

  // ---- observation ----------------------------------------------------------------------
  int n_rf = 0, n_us = 0, n_meas = 0, n_timeout = 0, n_syn = 0, n_drop = 0;
  int n_echo = 0;                  // ultrasonic edges after the measured one
  bit measured_this_period = 0;
  logic rf_q = 0, us_q = 0;
  longint bpf_sum = 0, bpf_n = 0;
  tof_meas_t res [4];
  bit got [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (!rst) begin
    rf_q <= rf_pulse; us_q <= ultra_pulse;
    if (rf_pulse && !rf_q) begin n_rf++; measured_this_period = 0; end
    if (ultra_pulse && !us_q) begin
      n_us++;
      if (measured_this_period) n_echo++;
    end
    if (syn_pul) n_syn++;
    if (sample_dropped) n_drop++;
    if (tof_timeout) n_timeout++;
    if (meas_valid) begin
      n_meas++;
      measured_this_period = 1;
      if (period_idx >= 0 && period_idx < 4) begin res[period_idx] = meas; got[period_idx] = 1; end
      $display("period %0d: vref %0d tof %0d clocks, %0d mm", period_idx, vref, meas.tof_cycles,
               meas.dist_mm);
    end
    if (kalman_valid && t > 50_000) begin bpf_sum += bpf_dout; bpf_n++; end
  end

  // ---- sequence -------------------------------------------------------------------------
  initial begin
    repeat (5) @(negedge clk);
    rst = 1'b0;
    wait (t == T_FIRST + 1 * PERIOD - 10);  vref = 13'd410;
    wait (t == T_FIRST + 2 * PERIOD - 10);  vref = 13'd102;
    wait (t == T_FIRST + 3 * PERIOD - 10);  vref = 13'd307;
    wait (t == T_FIRST + 4 * PERIOD - 10);
    for (int p = 0; p < 4; p++) begin
      if (p == 1) begin
        check(!got[p], "no measurement without a burst");
        continue;
      end
      check(got[p], $sformatf("measurement in period %0d", p));
      check(real'(res[p].dist_mm) >= TRUE_MM - 5.0 && real'(res[p].dist_mm) <= TRUE_MM + 120.0,
            $sformatf("period %0d distance %0d mm", p, res[p].dist_mm));
      check(res[p].tof_cycles >= TOF_TRUE,
            $sformatf("period %0d tof %0d not before the burst", p, res[p].tof_cycles));
      check(real'(res[p].dist_mm) >= real'(res[p].tof_cycles) * 0.00343 - 1.0 &&
            real'(res[p].dist_mm) <= real'(res[p].tof_cycles) * 0.00343 + 1.0,
            $sformatf("period %0d distance matches tof", p));
    end
    check(res[2].dist_mm < res[3].dist_mm && res[3].dist_mm < res[0].dist_mm,
          "distance grows with the reference level");
    check(bpf_n > 1000 && bpf_sum / bpf_n > -20 && bpf_sum / bpf_n < 20,
          $sformatf("band-pass output centred (mean %0d)", bpf_n > 0 ? bpf_sum / bpf_n : 0));
    check(ad7 >= 1000 && ad7 <= 1003 && ad15 >= 3000 && ad15 <= 3003, "AD7/AD15 registers");
    check(adc_overrun == 0, "no XADC overrun");
    check(n_drop == 0, "no sample dropped");
    // Mechanisms.
    check(n_rf == 4, $sformatf("RF pulses: %0d", n_rf));
    check(n_us >= 3, $sformatf("ultrasonic pulses: %0d", n_us));
    check(n_meas == 3, $sformatf("measurements: %0d", n_meas));
    check(n_echo >= 1, $sformatf("ignored echo edges: %0d", n_echo));
    check(n_timeout == 1, $sformatf("timeouts: %0d", n_timeout));
    check(n_syn > 50_000, $sformatf("shared-channel conversions: %0d", n_syn));
    $display("mechanisms: rf=%0d ultrasonic=%0d measurements=%0d echoes=%0d timeouts=%0d conversions=%0d",
             n_rf, n_us, n_meas, n_echo, n_timeout, n_syn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
