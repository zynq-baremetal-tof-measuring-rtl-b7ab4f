// fir_bpf: 101-tap FIR band-pass filter (35-45 kHz at 1 MHz sampling) that removes the DC
// offset of the unipolar ADC samples and keeps the 40 kHz ultrasonic carrier.
//
// The filter uses one multiplier. The 101 most recent samples sit in a delay line; when a new
// sample arrives (s_axis_data_tvalid while s_axis_data_tready) it is shifted in and the filter
// walks through the 51 distinct coefficients of its symmetric impulse response, one per
// clock: it adds the two samples that share a coefficient (x[i] + x[100-i]; the centre tap
// x[50] alone), multiplies the sum by the coefficient and accumulates. The result is ready
// FIR_HALF + 1 = 52 clock edges after the accepting edge, when m_axis_data_tvalid is high for
// one cycle; the filter accepts no new sample in between (s_axis_data_tready low). At a
// 100 MHz clock and 1 MHz sample rate that leaves about half of every sample period idle.
//
// Number formats: Din is the unsigned 12-bit ADC code, taken as a non-negative signed value.
// The coefficients carry 19 fractional bits and have unit gain at 40 kHz (see tof_pkg), so the
// accumulator holds the output in ADC units with 19 fractional bits. Dout32 is that value with
// 16 fractional bits, Dout the integer part saturated to 14 bits signed.
//
// From the document: band edges, sampling rate, window and order (Table 1), the port names
// Din[11:0], s_axis_data_tvalid, Dout[13:0], Dout32[31:0] and m_axis_data_tvalid (Figs. 4, 7),
// and a single DSP multiplier for the filter (Fig. 7 lists one DSP48 for the whole FPGA part).
// The symmetric serial structure, the tready handshake and the number formats are this
// design's choice. Reset (synchronous, active high) clears the delay line.
module fir_bpf
  import tof_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         s_axis_data_tvalid,
  output logic                         s_axis_data_tready,
  input  logic [ADC_W-1:0]             din,
  output logic                         m_axis_data_tvalid,
  output logic signed [FIR_WIDE_W-1:0] dout32,
  output logic signed [FIR_OUT_W-1:0]  dout
);

  localparam int unsigned X_W   = ADC_W + 1;                 // signed sample
  localparam int unsigned PRE_W = X_W + 1;                   // pre-adder output
  localparam int unsigned ACC_W = PRE_W + COEF_W + $clog2(FIR_HALF);
  localparam int unsigned IDX_W = $clog2(FIR_HALF);
  localparam int unsigned TAP_W = $clog2(FIR_TAPS);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_OUT} state_t;
  state_t state;

  logic signed [X_W-1:0]   xline [FIR_TAPS];
  logic [IDX_W-1:0]        idx;
  logic signed [ACC_W-1:0] acc;
  logic signed [PRE_W-1:0] pre;
  logic signed [ACC_W-1:0] prod;

  assign s_axis_data_tready = (state == S_IDLE);

  // Pre-adder and multiplier for the current coefficient index.
  always_comb begin
    if (idx == IDX_W'(FIR_HALF - 1))
      pre = PRE_W'(xline[FIR_HALF - 1]);
    else
      pre = PRE_W'(xline[TAP_W'(idx)]) + PRE_W'(xline[FIR_TAPS - 1 - 32'(idx)]);
    prod = ACC_W'(pre) * ACC_W'(BPF_COEF[idx]);
  end

  // Output scaling with saturation.
  localparam int unsigned DROP_W = COEF_FRAC - WIDE_FRAC;
  logic signed [ACC_W-1:0] y_int;
  logic signed [FIR_OUT_W-1:0] y_sat;
  always_comb begin
    y_int = acc >>> COEF_FRAC;
    if (y_int > ACC_W'(2**(FIR_OUT_W-1) - 1))
      y_sat = {1'b0, {(FIR_OUT_W-1){1'b1}}};
    else if (y_int < -ACC_W'(2**(FIR_OUT_W-1)))
      y_sat = {1'b1, {(FIR_OUT_W-1){1'b0}}};
    else
      y_sat = y_int[FIR_OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    m_axis_data_tvalid <= 1'b0;
    if (rst) begin
      state  <= S_IDLE;
      idx    <= '0;
      acc    <= '0;
      dout32 <= '0;
      dout   <= '0;
      for (int i = 0; i < FIR_TAPS; i++) xline[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (s_axis_data_tvalid) begin
          xline[0] <= X_W'(din);
          for (int i = 1; i < FIR_TAPS; i++) xline[i] <= xline[i-1];
          idx   <= '0;
          acc   <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          acc <= acc + prod;
          if (idx == IDX_W'(FIR_HALF - 1)) state <= S_OUT;
          else                             idx   <= idx + 1'b1;
        end
        S_OUT: begin
          dout32             <= FIR_WIDE_W'(acc >>> DROP_W);
          dout               <= y_sat;
          m_axis_data_tvalid <= 1'b1;
          state              <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
