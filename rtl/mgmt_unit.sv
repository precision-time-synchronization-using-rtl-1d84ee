// mgmt_unit: management unit that turns one IEEE 1588 exchange into clock
// corrections.
//
// After the host has gathered T1..T4 of a Sync / Delay_Req exchange it
// pulses start.  The unit then
//   1. computes offset and path delay (offset_calc, equations 3 and 4);
//   2. steps the FCRTC by -offset so the slave time matches the master;
//   3. forms the measured skew of the last interval,
//        S*_k = offset_k + S^_(k-1),
//      i.e. the residual drift seen despite the compensation that was active
//      plus the drift that compensation removed;
//   4. runs the Kalman filter (kalman_skew, equations 9 to 13);
//   5. converts the new estimate into an FCRTC addend (skew_to_addend,
//      equation 18) and writes it.
// The first exchange after reset, and any exchange whose |offset| exceeds
// STEP_LIMIT ticks, only steps the clock and restarts the filter with
// P = p_init_i, keeping the estimate S^ (zero after reset) so that it still
// matches the compensation the FCRTC applies: such an offset says nothing
// about the skew.
//
// The offset/step/filter/compensation chain is the document's; the skew
// measurement of step 3, the STEP_LIMIT restart and the handshake are this
// design's choices.  Timing: busy_o rises the cycle after start and done_o
// pulses when the addend is written (about KW + 8 cycles).
module mgmt_unit #(
  parameter longint unsigned F_OSC_HZ        = 44_000_000,
  parameter int unsigned     SYNC_INTERVAL_S = 1,
  parameter int unsigned     P_W             = 64,  // clock counter width
  parameter int unsigned     R_W             = 32,  // addend width
  parameter int unsigned     Q_W             = 32,  // accumulator width
  parameter int unsigned     SW              = 48,  // skew width
  parameter int unsigned     SF              = 8,   // skew fraction bits
  parameter int unsigned     PW              = 32,  // Kalman variance width
  parameter int unsigned     KW              = 16,  // Kalman gain fraction bits
  parameter longint unsigned STEP_LIMIT      = 44_000  // 1 ms at 44 MHz
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic        [P_W-1:0] t1,
  input  logic        [P_W-1:0] t2,
  input  logic        [P_W-1:0] t3,
  input  logic        [P_W-1:0] t4,
  input  logic        [PW-1:0]  q_i,
  input  logic        [PW-1:0]  r_i,
  input  logic        [PW-1:0]  p_init_i,
  input  logic                  fixed_gain,
  input  logic        [KW:0]    k_fix_i,
  // to the FCRTC
  output logic                  step_en,
  output logic signed [P_W-1:0] step_o,
  output logic                  addend_we,
  output logic signed [R_W-1:0] addend_o,
  // status
  output logic signed [P_W-1:0] offset_o,
  output logic signed [P_W-1:0] delay_o,
  output logic signed [SW-1:0]  skew_o,
  output logic signed [SW-1:0]  meas_o,
  output logic        [KW:0]    gain_o,
  output logic        [PW-1:0]  var_o,
  output logic                  locked_o,
  output logic        [15:0]    relocks_o,
  output logic                  busy_o,
  output logic                  done_o
);

  typedef enum logic [2:0] {M_IDLE, M_OFS, M_KF, M_ADD, M_DONE} mstate_e;
  mstate_e state;

  logic                 oc_done;
  logic                 kf_init, kf_start, kf_busy, kf_done;
  logic signed [SW-1:0] meas;
  logic                 sa_valid;
  logic signed [R_W-1:0] sa_addend;
  logic        [P_W-1:0] abs_off;

  offset_calc #(.W(P_W)) u_ofs (
    .clk, .rst_n, .start(start && state == M_IDLE), .t1, .t2, .t3, .t4,
    .offset_o, .delay_o, .done_o(oc_done)
  );

  kalman_skew #(.SW(SW), .PW(PW), .KW(KW)) u_kf (
    .clk, .rst_n, .init(kf_init), .s_init_i(skew_o), .p_init_i,
    .start(kf_start), .meas_i(meas), .q_i, .r_i, .fixed_gain, .k_fix_i,
    .s_hat_o(skew_o), .p_o(var_o), .k_o(gain_o), .busy_o(kf_busy), .done_o(kf_done)
  );

  skew_to_addend #(.F_OSC_HZ(F_OSC_HZ), .SYNC_INTERVAL_S(SYNC_INTERVAL_S),
                   .SW(SW), .SF(SF), .Q_W(Q_W), .R_W(R_W)) u_s2a (
    .clk, .rst_n, .start(kf_done), .skew_i(skew_o), .addend_o(sa_addend), .valid_o(sa_valid)
  );

  assign abs_off = offset_o[P_W-1] ? P_W'(-offset_o) : P_W'(offset_o);
  assign meas    = SW'(offset_o <<< SF) + skew_o;      // S*_k
  assign step_o  = -offset_o;
  assign busy_o  = (state != M_IDLE);
  assign addend_o = sa_addend;
  assign addend_we = sa_valid;

  always_comb begin
    step_en  = 1'b0;
    kf_init  = 1'b0;
    kf_start = 1'b0;
    if (state == M_OFS && oc_done) begin
      step_en = 1'b1;
      if (!locked_o || abs_off > P_W'(STEP_LIMIT)) kf_init  = 1'b1;
      else                                          kf_start = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      locked_o  <= 1'b0;
      relocks_o <= '0;
      meas_o    <= '0;
      done_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        M_IDLE: if (start) state <= M_OFS;
        M_OFS: if (oc_done) begin
          if (kf_init) begin
            locked_o  <= 1'b1;
            relocks_o <= relocks_o + 16'd1;
            state     <= M_DONE;
          end else begin
            meas_o <= meas;
            state  <= M_KF;
          end
        end
        M_KF:   if (kf_done) state <= M_ADD;
        M_ADD:  if (sa_valid) state <= M_DONE;
        M_DONE: begin
          done_o <= 1'b1;
          state  <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // the filter never runs while the unit is idle
  a_kf_idle: assert property (@(posedge clk) disable iff (!rst_n)
                              kf_busy |-> state == M_KF);

endmodule
