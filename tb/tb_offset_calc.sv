// tb_offset_calc: checks offset and delay against the exchange equations.
//
// Builds exchanges from a known offset and known one-way delays
// (T2 = T1 + d_ms + offset, T4 = T3 + d_sm - offset), including negative
// offsets and values near the top of the 64-bit range, and checks that the
// block returns the offset and the mean delay one cycle after start.
// The expected values come from the document's equations 3 and 4.
module tb_offset_calc;
  logic clk = 0, rst_n = 0, start = 0;
  logic [63:0] t1, t2, t3, t4;
  logic signed [63:0] offset_o, delay_o;
  logic done_o;
  int checks = 0, failures = 0;

  offset_calc dut (.*);
  always #5 clk = !clk;

  task automatic run(input longint unsigned base, input longint signed ofs,
                     input longint signed dms, input longint signed dsm, input longint unsigned gap);
    longint signed exp_ofs, exp_dly;
    t1 = base;
    t2 = base + dms + ofs;
    t3 = t2 + gap;
    t4 = t3 + dsm - ofs;
    exp_ofs = ((dms - dsm) + 2 * ofs) >>> 1;
    exp_dly = (dms + dsm) >>> 1;
    start = 1;
    @(posedge clk); #1 start = 0;
    checks++;
    if (!done_o) begin failures++; $display("FAIL done not set one cycle after start"); end
    checks++;
    if (offset_o !== exp_ofs || delay_o !== exp_dly) begin
      failures++;
      $display("FAIL ofs %0d exp %0d dly %0d exp %0d", offset_o, exp_ofs, delay_o, exp_dly);
    end
    @(posedge clk); #1;
    checks++;
    if (done_o) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    t1 = 0; t2 = 0; t3 = 0; t4 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(64'd1000, 64'sd500, 64'sd30, 64'sd30, 64'd100);
    run(64'd1000, -64'sd12345, 64'sd44, 64'sd44, 64'd7);
    run(64'hFFFF_FFFF_FFFF_0000, 64'sd3, 64'sd10, 64'sd10, 64'd1000);
    run(64'd5_000_000_000, 64'sd0, 64'sd200, 64'sd100, 64'd50);   // asymmetric path
    for (int i = 0; i < 200; i++)
      run({$urandom, $urandom} >> 2, longint'($signed($urandom)) >>> 4,
          longint'($urandom_range(0, 100000)) * 2, 0, longint'($urandom_range(1, 1 << 20)));
    for (int i = 0; i < 200; i++) begin
      longint signed d = longint'($urandom_range(0, 1 << 24));
      run({$urandom, $urandom} >> 2, longint'($signed($urandom)), d, d, longint'($urandom_range(1, 1 << 20)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
