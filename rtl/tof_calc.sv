// tof_calc: measures the time of flight from the RF pulse to the ultrasonic pulse and turns it
// into a distance.
//
// A rising edge of rf_pulse starts a cycle counter; the first rising edge of ultra_pulse after
// it stops the counter and publishes the count as tof_cycles together with
//   dist_mm = tof_cycles * SOUND_MM_S / CLK_HZ,
// computed as (tof_cycles * MM_MULT) >> 32 with MM_MULT = round(SOUND_MM_S * 2^32 / CLK_HZ).
// meas_valid pulses for one cycle with the result. Later ultrasonic edges (echoes, or the
// comparator toggling on ripple) are ignored until the next RF edge. If no ultrasonic edge comes
// within MAX_CYCLES the measurement is dropped and `timeout` pulses instead. An RF edge during
// a measurement restarts it.
//
// Timing: when the two edges are d clocks apart at the inputs, tof_cycles = d; meas_valid rises
// 2 clocks after the ultrasonic edge (edge detection, then the registered product).
//
// From the document: TOF as the time between the rising edges of the RF pulse and the
// ultrasonic pulse, distance as TOF times the speed of sound in air, one measurement every
// 15 ms (Section IV.3, Figs. 10-12); the document computes this in software on the second
// processor core. This design's choices: the speed of sound (343 m/s, air at 20 degC), the
// 100 MHz clock, counting in clock cycles, the first-edge rule and the 14 ms timeout (the end
// of the range, 4.8 m, before the next 15 ms period). Reset is synchronous and active high.
module tof_calc
  import tof_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned SOUND_MM_S = 343_000,      // speed of sound, mm/s
  parameter int unsigned MAX_CYCLES = 1_400_000     // 14 ms at 100 MHz
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      rf_pulse,
  input  logic      ultra_pulse,
  output logic      meas_valid,
  output tof_meas_t meas,
  output logic      timeout,
  output logic      busy
);

  localparam longint unsigned MM_MULT =
      ((longint'(SOUND_MM_S) << 32) + longint'(CLK_HZ) / 2) / longint'(CLK_HZ);

  logic        rf_q, us_q;
  logic        rf_rise, us_rise;
  logic [31:0] count;
  logic [31:0] captured;
  logic        capture_q;
  logic [63:0] dist_prod;

  assign rf_rise   = rf_pulse & ~rf_q;
  assign us_rise   = ultra_pulse & ~us_q;
  assign dist_prod = 64'(captured) * MM_MULT;

  always_ff @(posedge clk) begin
    meas_valid <= 1'b0;
    timeout    <= 1'b0;
    capture_q  <= 1'b0;
    if (rst) begin
      rf_q     <= 1'b0;
      us_q     <= 1'b0;
      busy     <= 1'b0;
      count    <= '0;
      captured <= '0;
      meas     <= '0;
    end else begin
      rf_q <= rf_pulse;
      us_q <= ultra_pulse;
      if (rf_rise) begin
        busy  <= 1'b1;
        count <= 32'd1;
      end else if (busy) begin
        if (us_rise) begin
          busy      <= 1'b0;
          captured  <= count;
          capture_q <= 1'b1;
        end else if (count >= MAX_CYCLES) begin
          busy    <= 1'b0;
          timeout <= 1'b1;
        end else begin
          count <= count + 32'd1;
        end
      end
      if (capture_q) begin
        meas.tof_cycles <= captured;
        meas.dist_mm    <= (dist_prod[63:48] != '0) ? 16'hFFFF : dist_prod[47:32];
        meas_valid      <= 1'b1;
      end
    end
  end

  a_one_result: assert property (@(posedge clk) disable iff (rst) !(meas_valid && timeout));

endmodule
