// adc_capture: serial read-out of an ADS1271 delta-sigma ADC.
//
// The ADC runs from the divided, time-synchronised clock made by
// trigger_gen and signals each new conversion by pulling DRDY low.  This
// block synchronises DRDY and DOUT into the local clock domain, records the
// local time of the DRDY falling edge as the sample's timestamp, then
// generates 24 SCLK periods (SCLK_DIV local cycles per half period) and
// shifts in the 24-bit two's-complement result, MSB first.  The ADC
// changes DOUT after each falling SCLK edge, so each bit is read at the end
// of the SCLK high phase, a whole SCLK period after it changed, which leaves
// room for the two-flop synchroniser on DOUT.  sample_valid_o pulses with sample_o and sample_ts_o.
//
// The document names the ADS1271 and says that an FPGA controls it and
// packages its samples; the SPI-format read-out follows the converter's
// usual serial interface and is this design's choice, as is the timestamp at
// DRDY.  A new DRDY while a read is in progress is counted in missed_o.
module adc_capture
  import ptp_pkg::*;
#(
  parameter int unsigned SCLK_DIV = 2,   // local cycles per SCLK half period
  parameter int unsigned BITS     = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ptp_time_t         time_i,
  input  logic              drdy_n,     // from the ADC
  input  logic              dout,       // from the ADC
  output logic              sclk,       // to the ADC
  output logic              sample_valid_o,
  output logic [BITS-1:0]   sample_o,
  output ptp_time_t         sample_ts_o,
  output logic [15:0]       missed_o
);

  typedef enum logic [1:0] {A_IDLE, A_LOW, A_HIGH} astate_e;
  astate_e state;

  logic [2:0]  drdy_s;              // synchroniser and edge detect
  logic [1:0]  dout_s;
  logic [$clog2(SCLK_DIV+1)-1:0] div;
  logic [$clog2(BITS+1)-1:0]     nbit;
  logic [BITS-1:0]               shreg;
  logic        drdy_fall;

  assign drdy_fall = drdy_s[2] && !drdy_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drdy_s         <= '1;
      dout_s         <= '0;
      state          <= A_IDLE;
      div            <= '0;
      nbit           <= '0;
      shreg          <= '0;
      sclk           <= 1'b0;
      sample_valid_o <= 1'b0;
      sample_o       <= '0;
      sample_ts_o    <= '0;
      missed_o       <= '0;
    end else begin
      drdy_s         <= {drdy_s[1:0], drdy_n};
      dout_s         <= {dout_s[0], dout};
      sample_valid_o <= 1'b0;
      unique case (state)
        A_IDLE: if (drdy_fall) begin
          sample_ts_o <= time_i;
          nbit        <= '0;
          div         <= '0;
          state       <= A_LOW;
        end
        A_LOW: begin                     // SCLK low half period
          if (drdy_fall) missed_o <= missed_o + 16'd1;
          if (div == ($clog2(SCLK_DIV+1))'(SCLK_DIV - 1)) begin
            div   <= '0;
            sclk  <= 1'b1;
            state <= A_HIGH;
          end else begin
            div <= div + 1'b1;
          end
        end
        A_HIGH: begin                    // SCLK high half period
          if (drdy_fall) missed_o <= missed_o + 16'd1;
          if (div == ($clog2(SCLK_DIV+1))'(SCLK_DIV - 1)) begin
            div   <= '0;
            sclk  <= 1'b0;
            shreg <= {shreg[BITS-2:0], dout_s[1]};   // bit stable since last fall
            if (nbit == ($clog2(BITS+1))'(BITS - 1)) begin
              sample_o       <= {shreg[BITS-2:0], dout_s[1]};
              sample_valid_o <= 1'b1;
              state          <= A_IDLE;
            end else begin
              nbit  <= nbit + 1'b1;
              state <= A_LOW;
            end
          end else begin
            div <= div + 1'b1;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
