// tb_abs_fnc: self-checking test of the rectifier.
//
// Drives random and corner-case 32-bit values (zero, small fractions, both signs, the
// saturation threshold, the most negative value) and compares with floor(|x| / 2^16)
// saturated at 16383, one clock later, with dout_valid following din_valid.
module tb_abs_fnc;
  import tof_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic din_valid = 1'b0;
  logic signed [31:0] din = '0;
  logic dout_valid;
  logic [ABS_W-1:0] dout;

  abs_fnc dut (.clk, .rst, .din_valid, .din, .dout_valid, .dout);

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

  function automatic longint expected(longint v);
    longint m;
    m = (v < 0) ? -v : v;
    m = m / 65536;
    return (m > 16383) ? 16383 : m;
  endfunction

  int n_sat = 0;
  task automatic one(input logic signed [31:0] v, input bit valid);
    logic [ABS_W-1:0] prev;
    prev = dout;
    @(negedge clk);
    din = v; din_valid = valid;
    @(negedge clk);
    din_valid = 1'b0;
    check(dout_valid == valid, "dout_valid follows din_valid");
    if (valid) begin
      check(dout == ABS_W'(expected(v)), $sformatf("abs(%0d) -> %0d, expected %0d", v, dout, expected(v)));
      if (expected(v) == 16383) n_sat++;
    end else begin
      check(dout == prev, "output held without valid");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    one(32'sd0, 1);
    one(32'sd65535, 1);
    one(-32'sd65535, 1);
    one(32'sd65536, 1);
    one(-32'sd65536, 1);
    one(-32'sd196608, 1);
    one(32'sd1073676288, 1);                 // 16383 * 65536
    one(32'sd1073741824, 1);                 // 16384 * 65536: saturates
    one(-32'sd1073741824, 1);
    one(32'h8000_0000, 1);                   // most negative
    one(32'sd12345678, 0);
    for (int i = 0; i < 2000; i++) begin
      logic signed [31:0] v;
      v = (i % 2 == 0) ? 32'($urandom) : 32'($signed(32'($urandom_range(0, 32'h3FFF_FFFF))) - 32'sh2000_0000);
      one(v, 1'($urandom_range(0, 3) != 0));
    end
    check(n_sat > 2, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
