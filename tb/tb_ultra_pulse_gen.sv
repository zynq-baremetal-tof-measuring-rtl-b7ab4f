// tb_ultra_pulse_gen: self-checking test of the envelope comparator.
//
// Random envelope values and levels, with and without the valid strobe: the pulse must be
// (env > vref) one clock after a valid sample, and hold its value otherwise. Equal values,
// which must give a low output, are forced regularly.
module tb_ultra_pulse_gen;
  import tof_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic env_valid = 1'b0;
  logic [ENV_W-1:0] env = '0, vref = '0;
  logic ultra_pulse;

  ultra_pulse_gen dut (.clk, .rst, .env_valid, .env, .vref, .ultra_pulse);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic expected = 1'b0;
  int highs = 0, lows = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(ultra_pulse == 1'b0, "low after reset");
    for (int i = 0; i < 3000; i++) begin
      env_valid = 1'($urandom_range(0, 2) != 0);
      vref = ENV_W'($urandom_range(0, 8191));
      env  = (i % 7 == 0) ? vref : ENV_W'($urandom_range(0, 8191));
      if (env_valid) expected = (int'(env) > int'(vref));
      @(negedge clk);
      check(ultra_pulse == expected, $sformatf("env %0d vref %0d valid %0d -> %0d", env, vref, env_valid, ultra_pulse));
      if (ultra_pulse) highs++; else lows++;
    end
    check(highs > 100 && lows > 100, "both output levels seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
