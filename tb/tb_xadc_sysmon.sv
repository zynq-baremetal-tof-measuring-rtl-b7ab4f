// tb_xadc_sysmon: self-checking test of the XADC read interface against the XADC model.
//
// Random codes are presented on the three inputs; after every SynPul the testbench checks
// that the register of the channel just converted holds the code presented at that
// conversion, that the other two registers are unchanged, that SynPul comes once per
// conversion (every 100 clocks) and that no conversion is lost.
module tb_xadc_sysmon;
  import tof_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [11:0] code7 = '0, code14 = '0, code15 = '0;
  logic        den, drdy, eoc, syn_pul;
  logic [6:0]  daddr;
  logic [15:0] do_data;
  logic [4:0]  channel;
  logic [ADC_W-1:0] ad7, ad14, ad15;
  logic [7:0]  overrun;

  xadc_model #(.CONV_CYCLES(100), .DRP_LATENCY(4)) u_model (
    .dclk(clk), .reset(rst), .code7, .code14, .code15, .den, .daddr, .drdy, .do_data,
    .eoc, .channel);

  xadc_sysmon dut (.clk, .reset_in(rst), .eoc, .channel, .den, .daddr, .drdy, .do_data,
                   .ad7, .ad14, .ad15, .syn_pul, .overrun);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Codes latched by the model at each conversion, in order.
  logic [11:0] expq [$];
  logic [4:0]  chq  [$];
  always @(posedge clk) if (!rst && u_model.conv_cnt == 99) begin
    unique case (u_model.seq)
      0: begin expq.push_back(code7);  chq.push_back(5'h17); end
      1: begin expq.push_back(code14); chq.push_back(5'h1E); end
      default: begin expq.push_back(code15); chq.push_back(5'h1F); end
    endcase
  end

  // New random inputs every 37 clocks, independent of the conversion schedule.
  always begin
    repeat (37) @(negedge clk);
    code7  = 12'($urandom);
    code14 = 12'($urandom);
    code15 = 12'($urandom);
  end

  int n_syn = 0;
  int last_syn = -1;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic [ADC_W-1:0] p7, p14, p15;
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    p7 = '0; p14 = '0; p15 = '0;
    while (n_syn < 300) begin
      @(negedge clk);
      if (syn_pul) begin
        logic [11:0] e;
        logic [4:0]  c;
        e = expq.pop_front();
        c = chq.pop_front();
        n_syn++;
        if (last_syn >= 0) check(cyc - last_syn == 100, $sformatf("SynPul period %0d", cyc - last_syn));
        last_syn = cyc;
        unique case (c)
          5'h17: begin check(ad7  == e, "AD7 value");  check(ad14 == p14 && ad15 == p15, "others held"); end
          5'h1E: begin check(ad14 == e, "AD14 value"); check(ad7 == p7 && ad15 == p15, "others held"); end
          default: begin check(ad15 == e, "AD15 value"); check(ad7 == p7 && ad14 == p14, "others held"); end
        endcase
        p7 = ad7; p14 = ad14; p15 = ad15;
      end
    end
    check(overrun == 0, "no overrun");
    check(expq.size() <= 1, "no conversion lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
