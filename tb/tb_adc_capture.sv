// tb_adc_capture: reads samples from the ADS1271 model.
//
// The converter model runs from a divided clock and announces each
// conversion with DRDY.  Each sample the block reports must equal the value
// the model produced for that conversion, its timestamp must be the local
// time two or three cycles after DRDY fell (synchroniser delay), and the
// read-out must take 24 SCLK periods of 2*SCLK_DIV cycles.  A second run
// with conversions closer together than a read-out must count missed
// conversions.
// The expectations are those of this design's read-out; the document only
// names the converter.
module tb_adc_capture;
  import ptp_pkg::*;
  logic clk = 0, rst_n = 0, adc_clk = 0;
  ptp_time_t time_i = 64'd0;
  logic drdy_n, dout, sclk, sample_valid_o;
  logic [23:0] sample_o, last_sample;
  ptp_time_t sample_ts_o;
  logic [15:0] missed_o;
  int conv_count;
  int checks = 0, failures = 0;
  int adc_half = 3;
  bit fast = 0;

  adc_capture dut (.*);
  ads1271_model #(.DECIM(32)) u_adc (.clk_in(adc_clk), .sclk, .use_ext(1'b0), .sample_i(24'd0),
                                     .drdy_n, .dout, .conv_count, .last_sample);

  always #5 clk = !clk;
  always @(posedge clk) time_i <= time_i + 1;
  initial forever begin
    repeat (adc_half) @(posedge clk);
    adc_clk = !adc_clk;
  end

  ptp_time_t fall_t;
  int sclk_rises, nsamples;
  always @(negedge drdy_n) begin fall_t = time_i; sclk_rises = 0; end
  always @(posedge sclk) sclk_rises++;

  always @(posedge clk) begin
    if (rst_n && sample_valid_o && !fast) begin
      nsamples++;
      checks++;
      if (sample_o != last_sample) begin
        failures++; $display("FAIL sample %h expected %h", sample_o, last_sample);
      end
      checks++;
      if (sample_ts_o < fall_t + 2 || sample_ts_o > fall_t + 3) begin
        failures++; $display("FAIL timestamp %0d, DRDY fell at %0d", sample_ts_o, fall_t);
      end
      checks++;
      if (sclk_rises != 24) begin failures++; $display("FAIL %0d sclk periods", sclk_rises); end
      checks++;
      if (time_i - sample_ts_o < 48 * 2 || time_i - sample_ts_o > 48 * 2 + 4) begin
        failures++; $display("FAIL read-out took %0d cycles", time_i - sample_ts_o);
      end
    end
  end

  initial begin
    nsamples = 0; sclk_rises = 0; fall_t = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (nsamples == 30);
    checks++;
    if (missed_o != 0) begin failures++; $display("FAIL missed %0d", missed_o); end
    // conversions faster than the read-out
    fast = 1;
    adc_half = 1;
    repeat (3000) @(posedge clk);
    checks++;
    if (missed_o == 0) begin failures++; $display("FAIL no missed conversion counted"); end
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
