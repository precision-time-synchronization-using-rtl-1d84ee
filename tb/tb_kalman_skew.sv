// tb_kalman_skew: checks the Kalman recursion step by step.
//
// After every update the block's gain, estimate and error variance are
// compared with the recursion evaluated in floating point from the block's
// previous state: K = (P+Q)/(P+Q+R), S = S + K(S* - S), P = (1-K)(P+Q).
// Measurements are a constant skew plus uniform noise; the test also checks
// that the estimate converges, that the gain settles, the fixed-gain mode,
// the R = 0 case and the latencies (KW+2 and 2 cycles).
// The reference is the document's equations 9 to 13 in floating point.
module tb_kalman_skew;
  localparam int KW = 16;
  logic clk = 0, rst_n = 0;
  logic init = 0, start = 0, fixed_gain = 0;
  logic signed [47:0] s_init_i = '0, meas_i = '0, s_hat_o;
  logic [31:0] p_init_i = '0, q_i = 32'd16, r_i = 32'd4096, p_o;
  logic [KW:0] k_fix_i = 17'd4096, k_o;
  logic busy_o, done_o;
  int checks = 0, failures = 0;

  kalman_skew dut (.*);
  always #5 clk = !clk;

  task automatic upd(input longint signed m, input int exp_lat);
    real p, s, k, sr, pr;
    int lat;
    p = real'(p_o); s = real'(s_hat_o);
    meas_i = 48'(m);
    start = 1;
    @(posedge clk); #1 start = 0;
    lat = 1;
    while (!done_o && lat < 100) begin @(posedge clk); #1 lat++; end
    checks++;
    if (lat != exp_lat) begin failures++; $display("FAIL latency %0d expected %0d", lat, exp_lat); end
    if (fixed_gain) k = real'(k_fix_i) / 65536.0;
    else if (r_i == 0) k = 1.0;
    else k = (p + real'(q_i)) / (p + real'(q_i) + real'(r_i));
    // the estimate and the variance follow from the gain actually used
    sr = s + (real'(k_o) / 65536.0) * (real'(m) - s);
    pr = (1.0 - real'(k_o) / 65536.0) * (p + real'(q_i));
    checks++;
    if (real'(k_o) > k * 65536.0 + 1.0 || real'(k_o) < k * 65536.0 - 1.0) begin
      failures++; $display("FAIL gain %0d expected %f", k_o, k * 65536.0);
    end
    checks++;
    if (real'(s_hat_o) > sr + 2.0 + (real'(m) - s) / 30000.0 + 0.0 &&
        real'(s_hat_o) - sr > 2.0 + ((real'(m) > s) ? (real'(m) - s) : (s - real'(m))) / 30000.0) begin
      failures++; $display("FAIL estimate %0d expected %f", s_hat_o, sr);
    end else if (sr - real'(s_hat_o) > 2.0 + ((real'(m) > s) ? (real'(m) - s) : (s - real'(m))) / 30000.0) begin
      failures++; $display("FAIL estimate %0d expected %f", s_hat_o, sr);
    end
    checks++;
    if (real'(p_o) > pr + pr / 30000.0 + 2.0 || real'(p_o) < pr - pr / 30000.0 - 2.0) begin
      failures++; $display("FAIL variance %0d expected %f", p_o, pr);
    end
  endtask

  localparam longint signed TRUE_SKEW = 300 * 256;   // 300 ticks per interval
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // initialise
    p_init_i = 32'd65536; s_init_i = '0;
    init = 1; @(posedge clk); #1 init = 0;
    checks++;
    if (p_o != 65536 || s_hat_o != 0) begin failures++; $display("FAIL init"); end
    // computed gain, noisy constant skew
    for (int i = 0; i < 60; i++)
      upd(TRUE_SKEW + longint'($urandom_range(0, 2048)) - 1024, KW + 2);
    checks++;
    if (s_hat_o > TRUE_SKEW + 512 || s_hat_o < TRUE_SKEW - 512) begin
      failures++; $display("FAIL no convergence: %0d", s_hat_o);
    end
    // steady-state gain about sqrt(Q/R) = 1/16 (Q << R)
    checks++;
    if (k_o < 3000 || k_o > 5000) begin failures++; $display("FAIL steady gain %0d", k_o); end
    // fixed gain mode
    fixed_gain = 1;
    for (int i = 0; i < 20; i++) upd(-TRUE_SKEW + longint'($urandom_range(0, 64)), 2);
    fixed_gain = 0;
    // R = 0: the measurement is taken as it is
    r_i = 0;
    upd(12345, 2);
    checks++;
    if (s_hat_o != 12345) begin failures++; $display("FAIL R=0 estimate %0d", s_hat_o); end
    r_i = 32'd4096;
    // random parameters
    for (int i = 0; i < 100; i++) begin
      q_i = $urandom_range(0, 1 << 20);
      r_i = $urandom_range(1, 1 << 24);
      upd(longint'($signed($urandom)) >>> 4, KW + 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
