// kalman_skew: discrete linear Kalman filter for the clock skew.
//
// The skew S is modelled as a random walk S_k = S_(k-1) + V_k observed as
// S*_k = S_k + W_k, with process-noise variance Q and measurement-noise
// variance R.  One update per sync interval runs the document's recursion:
//   prediction  S^-_k = S^_(k-1)          P^-_k = P_(k-1) + Q
//   correction  K_k = P^-_k / (P^-_k + R)
//               S^_k = S^-_k + K_k (S*_k - S^-_k)
//               P_k  = (1 - K_k) P^-_k
// The gain is found by a restoring fractional divider, one quotient bit per
// cycle.  Because the gain converges to a constant, the filter can instead
// use a precomputed gain (fixed_gain = 1, gain k_fix_i), which leaves one
// subtraction, one multiplication and one addition, as the document notes.
//
// Number formats (this design's choice): skews are signed SW-bit values
// (the caller fixes their fraction bits); P, Q and R are unsigned PW-bit
// values in any consistent unit; the gain is unsigned with KW fraction bits
// (1.0 = 2^KW).  P^- saturates instead of wrapping.
//
// Timing: start with a measurement begins an update; busy_o is high while it
// runs and done_o pulses when s_hat_o, p_o and k_o are updated: 2 cycles
// after start with the fixed gain (or R = 0), KW + 2 with the computed gain.  init loads the
// estimate and the error variance (s_init_i, p_init_i) when idle.
module kalman_skew #(
  parameter int unsigned SW = 48,   // skew width
  parameter int unsigned PW = 32,   // variance width
  parameter int unsigned KW = 16    // gain fraction bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic signed [SW-1:0] s_init_i,
  input  logic        [PW-1:0] p_init_i,
  input  logic                 start,
  input  logic signed [SW-1:0] meas_i,
  input  logic        [PW-1:0] q_i,
  input  logic        [PW-1:0] r_i,
  input  logic                 fixed_gain,
  input  logic        [KW:0]   k_fix_i,
  output logic signed [SW-1:0] s_hat_o,
  output logic        [PW-1:0] p_o,
  output logic        [KW:0]   k_o,
  output logic                 busy_o,
  output logic                 done_o
);

  typedef enum logic [1:0] {K_IDLE, K_DIV, K_UPD} kstate_e;
  kstate_e state;

  logic        [PW-1:0]  p_pred;       // P^-
  logic        [PW:0]    den;          // P^- + R
  logic        [PW+1:0]  rem;          // divider remainder
  logic        [KW:0]    quo;          // gain being built
  logic        [KW:0]    quo_next;
  logic        [$clog2(KW+1)-1:0] bitn;
  logic signed [SW-1:0]  meas_q;

  logic        [PW:0]    p_sum;
  logic        [PW+1:0]  rem2;
  logic signed [SW:0]    innov;
  logic signed [SW+KW+1:0] corr;
  logic        [PW+KW:0] p_new;

  assign p_sum = {1'b0, p_o} + {1'b0, q_i};
  assign rem2  = rem << 1;
  assign innov = (SW+1)'(meas_q) - (SW+1)'(s_hat_o);

  always_comb begin
    quo_next = quo;
    if (rem2 >= (PW+2)'(den)) quo_next[bitn-1] = 1'b1;
    corr  = (SW+KW+2)'(innov) * $signed({1'b0, k_o});
    p_new = (PW+KW+1)'((KW+1)'(1 << KW) - k_o) * (PW+KW+1)'(p_pred);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= K_IDLE;
      s_hat_o <= '0;
      p_o     <= '0;
      k_o     <= '0;
      p_pred  <= '0;
      den     <= '0;
      rem     <= '0;
      quo     <= '0;
      bitn    <= '0;
      meas_q  <= '0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        K_IDLE: begin
          if (init) begin
            s_hat_o <= s_init_i;
            p_o     <= p_init_i;
          end else if (start) begin
            // prediction: S^- = S^ (held in s_hat_o), P^- = P + Q
            meas_q <= meas_i;
            p_pred <= p_sum[PW] ? '1 : p_sum[PW-1:0];
            den    <= (p_sum[PW] ? {1'b0, {PW{1'b1}}} : p_sum) + {1'b0, r_i};
            rem    <= (PW+2)'(p_sum[PW] ? {1'b0, {PW{1'b1}}} : p_sum);
            quo    <= '0;
            bitn   <= ($clog2(KW+1))'(KW);
            if (fixed_gain) begin
              k_o   <= k_fix_i;
              state <= K_UPD;
            end else if (r_i == '0) begin
              k_o   <= (KW+1)'(1 << KW);        // R = 0: K = 1
              state <= K_UPD;
            end else begin
              state <= K_DIV;
            end
          end
        end
        K_DIV: begin
          // fractional long division, quotient bit bitn-1 per cycle
          rem  <= (rem2 >= (PW+2)'(den)) ? rem2 - (PW+2)'(den) : rem2;
          quo  <= quo_next;
          bitn <= bitn - 1'b1;
          if (bitn == 1) begin
            k_o   <= quo_next;
            state <= K_UPD;
          end
        end
        K_UPD: begin
          // correction
          s_hat_o <= SW'(s_hat_o + SW'(corr >>> KW));
          p_o     <= PW'(p_new >> KW);
          done_o  <= 1'b1;
          state   <= K_IDLE;
        end
        default: state <= K_IDLE;
      endcase
    end
  end

  assign busy_o = (state != K_IDLE);

endmodule
