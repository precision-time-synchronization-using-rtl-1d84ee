// ads1271_model: behavioural model of the ADS1271 serial output, for tests.
//
// Not synthesizable logic of the design: it stands in for the converter.
// Every DECIM rising edges of clk_in it finishes a conversion: it loads the
// next sample (a counter-based pattern, or the value on sample_i when
// use_ext is set), drives its MSB on dout and pulls drdy_n low.  Each falling
// edge of sclk shifts the next bit onto dout; drdy_n returns high after the
// first sclk rising edge, as in the converter's SPI format.  conv_count
// counts conversions so a test can tell which sample is which.  The real
// part decimates by 512 in high-resolution mode; tests use a smaller DECIM.
// The interface follows the converter's SPI format; the data pattern is
// this testbench's own.
module ads1271_model #(
  parameter int DECIM = 64
) (
  input  logic        clk_in,
  input  logic        sclk,
  input  logic        use_ext,
  input  logic [23:0] sample_i,
  output logic        drdy_n,
  output logic        dout,
  output int          conv_count,
  output logic [23:0] last_sample
);
  int div = 0;
  logic [23:0] sh = '0;
  initial begin drdy_n = 1; dout = 0; conv_count = 0; last_sample = '0; end

  always @(posedge clk_in) begin
    div <= div + 1;
    if (div == DECIM - 1) begin
      div <= 0;
      last_sample = use_ext ? sample_i : 24'(conv_count * 24'h01_2345 + 24'h80_0001);
      sh = last_sample;
      dout = sh[23];
      drdy_n = 0;
      conv_count++;
    end
  end
  always @(posedge sclk) drdy_n = 1;
  always @(negedge sclk) begin
    sh = {sh[22:0], 1'b0};
    dout = sh[23];
  end
endmodule
