// tb_skew_to_addend: checks the skew-to-addend conversion of equation 18.
//
// For a range of skews (ticks per one-second interval, 8 fraction bits) the
// expected addend -S * 2^32 / 44e6 is computed in floating point and the
// block's result must be within one unit; saturation at both ends and the
// one-cycle latency are checked too.
// The reference is the document's equation 18 with this design's sign
// and scaling.
module tb_skew_to_addend;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [47:0] skew_i;
  logic signed [31:0] addend_o;
  logic valid_o;
  int checks = 0, failures = 0;

  skew_to_addend dut (.*);
  always #5 clk = !clk;

  task automatic conv(input longint signed s_fx);
    real expv;
    longint signed expi;
    skew_i = 48'(s_fx);
    start = 1;
    @(posedge clk); #1 start = 0;
    expv = -(real'(s_fx) / 256.0) * 4294967296.0 / 44.0e6;
    if (expv > 2147483647.0) expv = 2147483647.0;
    if (expv < -2147483648.0) expv = -2147483648.0;
    expi = longint'(expv);
    checks++;
    if (!valid_o) begin failures++; $display("FAIL valid missing"); end
    checks++;
    if (longint'(addend_o) > expi + 1 || longint'(addend_o) < expi - 1) begin
      failures++;
      $display("FAIL skew %0d/256: addend %0d expected %0d", s_fx, addend_o, expi);
    end
  endtask

  initial begin
    skew_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    conv(0);
    conv(256);            // 1 tick per second -> about -97.6
    conv(-256);
    conv(44 * 256);       // 1 ppm
    conv(-4400 * 256);    // -100 ppm
    conv(1);              // finest skew step
    conv(48'sh7FFF_FFFF_FFFF);  // saturates
    conv(-48'sh7FFF_FFFF_FFFF);
    for (int i = 0; i < 500; i++) conv(longint'($signed($urandom)) >>> ($urandom_range(0, 12)));
    @(posedge clk); #1;
    checks++;
    if (valid_o) begin failures++; $display("FAIL valid without start"); end
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
