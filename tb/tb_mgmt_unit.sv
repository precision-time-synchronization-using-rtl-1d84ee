// tb_mgmt_unit: checks the management unit's sequence on given exchanges.
//
// Feeds T1..T4 for a series of exchanges and checks, independently of the
// block's arithmetic: the clock step is -offset with
// offset = ((T2-T1)-(T4-T3))/2; the first exchange and an exchange with an
// offset beyond STEP_LIMIT only step and restart the filter's variance,
// keeping its estimate (no addend write); later exchanges form S* = offset*256 + S^, update the estimate
// with K = (P+Q)/(P+Q+R) and write addend = -S^ * 2^32 / (44e6 * 256).
// Offset and delay follow the document's equations 3 and 4; the skew
// measurement and restart rule checked here are this design's.
module tb_mgmt_unit;
  logic clk = 0, rst_n = 0, start = 0;
  logic [63:0] t1, t2, t3, t4;
  logic [31:0] q_i = 32'd16, r_i = 32'd4096, p_init_i = 32'd65536;
  logic fixed_gain = 0;
  logic [16:0] k_fix_i = 17'd4096;
  logic step_en, addend_we, locked_o, busy_o, done_o;
  logic signed [63:0] step_o, offset_o, delay_o;
  logic signed [31:0] addend_o;
  logic signed [47:0] skew_o, meas_o;
  logic [16:0] gain_o;
  logic [31:0] var_o;
  logic [15:0] relocks_o;
  int checks = 0, failures = 0;

  mgmt_unit dut (.*);
  always #5 clk = !clk;

  longint signed seen_step;
  int steps_seen, addends_seen;
  logic signed [31:0] seen_addend;
  always @(posedge clk) begin
    if (step_en)   begin seen_step = step_o; steps_seen++; end
    if (addend_we) begin seen_addend = addend_o; addends_seen++; end
  end

  real s_ref, p_ref;   // reference filter state

  task automatic exchange(input longint signed ofs, input bit expect_filter);
    longint unsigned base;
    real k, m, a_ref;
    int cyc;
    base = {$urandom, $urandom} >> 4;
    t1 = base; t2 = base + 1000 + ofs; t3 = t2 + 5000; t4 = t3 + 1000 - ofs;
    steps_seen = 0; addends_seen = 0;
    start = 1; @(posedge clk); #1 start = 0;
    cyc = 0;
    while (!done_o && cyc < 200) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc >= 200) begin failures++; $display("FAIL no done"); end
    checks++;
    if (steps_seen != 1 || seen_step != -ofs) begin
      failures++; $display("FAIL step %0d (%0d) expected %0d", seen_step, steps_seen, -ofs);
    end
    checks++;
    if (offset_o != ofs || delay_o != 1000) begin failures++; $display("FAIL offset/delay"); end
    if (!expect_filter) begin
      p_ref = real'(p_init_i);             // the estimate is kept
      checks++;
      if (addends_seen != 0) begin failures++; $display("FAIL addend written on a restart"); end
    end else begin
      m = real'(ofs) * 256.0 + s_ref;
      if (fixed_gain) k = real'(k_fix_i) / 65536.0;
      else            k = (p_ref + real'(q_i)) / (p_ref + real'(q_i) + real'(r_i));
      s_ref = s_ref + k * (m - s_ref);
      p_ref = (1.0 - k) * (p_ref + real'(q_i));
      a_ref = -(s_ref / 256.0) * 4294967296.0 / 44.0e6;
      checks++;
      if (addends_seen != 1) begin failures++; $display("FAIL addend writes %0d", addends_seen); end
      checks++;
      // fixed-point gain truncation lets the estimate drift by a small fraction
      if (real'(skew_o) > s_ref + 16.0 + s_ref / 1000.0 || real'(skew_o) < s_ref - 16.0 - s_ref / 1000.0) begin
        failures++; $display("FAIL skew %0d expected %f", skew_o, s_ref);
      end
      checks++;
      if (real'(seen_addend) > a_ref + 1000.0 || real'(seen_addend) < a_ref - 1000.0) begin
        failures++; $display("FAIL addend %0d expected %f", seen_addend, a_ref);
      end
    end
  endtask

  initial begin
    t1 = 0; t2 = 0; t3 = 0; t4 = 0;
    steps_seen = 0; addends_seen = 0; seen_step = 0; seen_addend = 0;
    s_ref = 0.0; p_ref = 0.0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (locked_o) begin failures++; $display("FAIL locked after reset"); end
    exchange(64'sd123_456_789, 0);                 // first: step only
    checks++;
    if (!locked_o || relocks_o != 1) begin failures++; $display("FAIL not locked"); end
    for (int i = 0; i < 30; i++) exchange(64'sd300 + longint'($urandom_range(0, 20)) - 10 - (i > 0 ? 300 : 0), 1);
    exchange(-64'sd1_000_000, 0);                  // beyond STEP_LIMIT: restart
    checks++;
    if (relocks_o != 2) begin failures++; $display("FAIL relock count %0d", relocks_o); end
    fixed_gain = 1;
    exchange(64'sd50, 1);
    checks++;
    if (gain_o != k_fix_i) begin failures++; $display("FAIL fixed gain not used"); end
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
