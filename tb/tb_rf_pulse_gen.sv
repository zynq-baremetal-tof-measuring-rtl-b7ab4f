// tb_rf_pulse_gen: self-checking test of the RF pulse generator.
//
// rf_sync edges arrive at random times, some while a pulse is running. Each accepted edge must
// give exactly one pulse of PULSE_CYCLES clocks starting 3 clocks after the edge; edges during
// a pulse must be ignored.
module tb_rf_pulse_gen;

  localparam int unsigned PULSE = 50;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic rf_sync = 1'b0;
  logic rf_pulse;

  rf_pulse_gen #(.PULSE_CYCLES(PULSE)) dut (.clk, .rst, .rf_sync, .rf_pulse);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: cycle-level model of the expected output.
  int cyc = 0;
  int pulse_end = -1;      // last cycle the expected pulse is high
  bit exp_pulse;
  int ignored = 0, pulses = 0;
  logic sync_prev = 1'b0;

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      // Drive rf_sync at the negative edge; an edge seen at cycle c gives a pulse over
      // cycles c+3 .. c+2+PULSE as observed at the following negative edges.
      if ($urandom_range(0, 60) == 0) rf_sync = ~rf_sync;
      if (rf_sync && !sync_prev) begin
        if (cyc + 2 > pulse_end) begin
          pulse_end = cyc + 2 + PULSE;
          pulses++;
        end else begin
          ignored++;
        end
      end
      sync_prev = rf_sync;
      @(negedge clk);
      cyc++;
      exp_pulse = (cyc >= pulse_end - PULSE + 1) && (cyc <= pulse_end);
      check(rf_pulse == exp_pulse, $sformatf("cycle %0d: pulse %0d expected %0d", cyc, rf_pulse, exp_pulse));
    end
    check(pulses > 10, "pulses generated");
    check(ignored > 3, "edges during a pulse occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
