// kalman_filter: first-order (scalar) Kalman filter that smooths the rectified ultrasonic
// signal into its envelope.
//
// State model: the envelope is a constant disturbed by process noise of variance Q, and each
// rectified sample z is the envelope plus measurement noise of variance R. For every sample
//   predict:  P' = P + Q
//   gain:     K  = P' / (P' + R)
//   update:   x  = x + K * (z - x),   P = (1 - K) * P'
// The output is x rounded to an integer. Because K depends on P only, it settles after a few
// hundred samples at the steady-state gain (for R = 2500, Q = 1: P' about 51, K about 0.02),
// so after start-up the filter acts as a first-order low-pass with a time constant of about
// 50 samples.
//
// Number formats: x and P carry 16 fractional bits (x unsigned Q14.16, P unsigned Q16.16);
// K is an unsigned 16-bit fraction computed by a restoring divider, one quotient bit per
// clock. x_valid rises 19 clocks after the edge that accepts z_valid (1 predict, 16 divide,
// 1 update, 1 output); z_valid pulses that arrive while busy are dropped (z_ready low).
//
// From the document: a first-order Kalman filter with R = 2500 and Q = 1 fed by the 14-bit
// rectifier output (gpio_io_i[13:0]) and giving a 13-bit envelope (Kalman[12:0]), Table 1 and
// Figs. 4-5. The document runs this filter as software on a processor core in about 0.5 us per
// sample; here it is logic. Fixed-point formats, the initial P (= R) and x (= 0) and the
// handshake are this design's choice. Reset is synchronous and active high.
module kalman_filter
  import tof_pkg::*;
#(
  parameter int unsigned R  = 2500,   // measurement noise covariance, in LSB^2
  parameter int unsigned Q  = 1,      // process noise covariance, in LSB^2
  parameter int unsigned P0 = 2500    // initial error covariance, in LSB^2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              z_valid,
  output logic              z_ready,
  input  logic [ABS_W-1:0]  z,
  output logic              x_valid,
  output logic [ENV_W-1:0]  x_out,
  output logic [15:0]       gain         // current K, 16 fractional bits (observation only)
);

  localparam int unsigned FRAC = 16;
  localparam int unsigned P_W  = 32;                 // Q16.16
  localparam int unsigned X_W  = ABS_W + FRAC;       // Q14.16
  localparam int unsigned D_W  = P_W + 2;            // divider width

  typedef enum logic [2:0] {S_IDLE, S_PRED, S_DIV, S_UPD, S_OUT} state_t;
  state_t state;

  logic [P_W-1:0]   p;        // error covariance
  logic [P_W-1:0]   p_pred;
  logic [X_W-1:0]   x;        // estimate
  logic [ABS_W-1:0] z_q;
  logic [D_W-1:0]   den;
  logic [D_W-1:0]   rem;
  logic [FRAC-1:0]  k;
  logic [4:0]       bit_cnt;

  assign z_ready = (state == S_IDLE);
  assign gain    = k;

  // Divider step: shift the remainder, subtract the denominator when it fits.
  logic [D_W-1:0] rem_sh;
  logic           fits;
  always_comb begin
    rem_sh = {rem[D_W-2:0], 1'b0};
    fits   = (rem_sh >= den);
  end

  // Update terms.
  logic signed [X_W:0]         innov;     // z - x, Q.16
  logic signed [X_W+FRAC+1:0]  corr;      // K * (z - x), Q.32
  logic [X_W:0]                x_next;
  logic [P_W+FRAC:0]           p_prod;
  logic [X_W-FRAC:0]           x_round;
  always_comb begin
    innov   = $signed({1'b0, z_q, {FRAC{1'b0}}}) - $signed({1'b0, x});
    corr    = $signed({1'b0, k}) * innov;
    x_next  = (X_W+1)'($signed({1'b0, x}) + $signed(corr >>> FRAC));
    p_prod  = (P_W+FRAC+1)'(p_pred) * (P_W+FRAC+1)'((17'd1 << FRAC) - {1'b0, k});
    x_round = (X_W-FRAC+1)'((x + (X_W)'(1 << (FRAC-1))) >> FRAC);
  end

  always_ff @(posedge clk) begin
    x_valid <= 1'b0;
    if (rst) begin
      state   <= S_IDLE;
      p       <= P_W'(P0) << FRAC;
      p_pred  <= '0;
      x       <= '0;
      z_q     <= '0;
      den     <= '0;
      rem     <= '0;
      k       <= '0;
      bit_cnt <= '0;
      x_out   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (z_valid) begin
          z_q   <= z;
          state <= S_PRED;
        end
        S_PRED: begin
          p_pred  <= p + (P_W'(Q) << FRAC);
          den     <= D_W'(p + (P_W'(Q) << FRAC)) + (D_W'(R) << FRAC);
          rem     <= D_W'(p + (P_W'(Q) << FRAC));
          bit_cnt <= '0;
          state   <= S_DIV;
        end
        S_DIV: begin
          // p_pred < den, so the quotient is a pure fraction: FRAC bits of it.
          rem     <= fits ? rem_sh - den : rem_sh;
          k       <= {k[FRAC-2:0], fits};
          bit_cnt <= bit_cnt + 5'd1;
          if (bit_cnt == 5'(FRAC - 1)) state <= S_UPD;
        end
        S_UPD: begin
          // The estimate stays between 0 and the largest input, so x_next fits X_W bits.
          x     <= x_next[X_W-1:0];
          p     <= P_W'(p_prod >> FRAC);
          state <= S_OUT;
        end
        S_OUT: begin
          x_out   <= (x_round > (X_W-FRAC+1)'(2**ENV_W - 1)) ? '1 : x_round[ENV_W-1:0];
          x_valid <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
