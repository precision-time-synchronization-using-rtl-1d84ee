// offset_calc: master/slave offset and mean path delay from one exchange.
//
// Given the four timestamps of a Sync / Delay_Req exchange (T1 Sync sent by
// the master, T2 Sync received by the slave, T3 Delay_Req sent by the slave,
// T4 Delay_Req received by the master) it computes, for a symmetric path,
//   delay  = ((T2 - T1) + (T4 - T3)) / 2
//   offset = ((T2 - T1) - (T4 - T3)) / 2      (slave time minus master time)
// as in the document's equations 3 and 4.  All values are signed ticks.
//
// Timing: start is sampled with the four inputs; offset_o/delay_o are valid
// with done_o one cycle later and held until the next start.  Halving is an
// arithmetic shift (rounds toward minus infinity), a choice of this design.
module offset_calc #(
  parameter int unsigned W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic        [W-1:0] t1,
  input  logic        [W-1:0] t2,
  input  logic        [W-1:0] t3,
  input  logic        [W-1:0] t4,
  output logic signed [W-1:0] offset_o,
  output logic signed [W-1:0] delay_o,
  output logic                done_o
);

  logic signed [W+1:0] d21, d43, diff, total;

  always_comb begin
    d21   = $signed({2'b00, t2}) - $signed({2'b00, t1});
    d43   = $signed({2'b00, t4}) - $signed({2'b00, t3});
    diff  = d21 - d43;
    total = d21 + d43;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset_o <= '0;
      delay_o  <= '0;
      done_o   <= 1'b0;
    end else begin
      done_o <= start;
      if (start) begin
        offset_o <= W'(diff  >>> 1);
        delay_o  <= W'(total >>> 1);
      end
    end
  end

endmodule
