// skew_to_addend: turns a skew estimate into the FCRTC compensation value.
//
// The skew S is the number of ticks the local clock gains on the master in
// one sync interval.  Following the document's equation 18, the fractional
// frequency error is C = S / (f * S_i), with f the oscillator frequency and
// S_i the sync interval in seconds.  The FCRTC addend is the correction
// that cancels it, in units of 2^-Q_W ticks per cycle:
//   addend = -round(S * 2^Q_W / (f * S_i))
// The division by the constant f * S_i is a multiplication by the
// precomputed reciprocal SCALE = round(2^(Q_W+M) / (f * S_i)) followed by a
// shift; the skew carries SF fraction bits.  The result saturates to R_W
// signed bits.  f = 44 MHz, S_i = 1 s, q = r = 32 are the document's values;
// the fixed-point layout (SF, M) is this design's choice.
//
// Timing: addend_o and valid_o follow start by one cycle.
module skew_to_addend #(
  parameter longint unsigned F_OSC_HZ        = 44_000_000,
  parameter int unsigned     SYNC_INTERVAL_S = 1,
  parameter int unsigned     SW              = 48,  // skew width
  parameter int unsigned     SF              = 8,   // skew fraction bits
  parameter int unsigned     Q_W             = 32,  // FCRTC accumulator width
  parameter int unsigned     R_W             = 32,  // FCRTC addend width
  parameter int unsigned     M               = 28   // extra reciprocal bits
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [SW-1:0]  skew_i,
  output logic signed [R_W-1:0] addend_o,
  output logic                  valid_o
);

  localparam longint unsigned CYCLES = F_OSC_HZ * SYNC_INTERVAL_S;
  localparam longint unsigned SCALE  = ((64'd1 << (Q_W + M)) + CYCLES / 2) / CYCLES;
  localparam int unsigned     SCW    = $clog2(SCALE + 1) + 1;  // signed width
  localparam int unsigned     PRW    = SW + SCW;
  localparam int unsigned     SH     = SF + M;

  logic signed [PRW-1:0] prod, rounded;
  logic signed [PRW-1:0] amax, amin;

  always_comb begin
    prod    = PRW'(skew_i) * $signed(SCW'(SCALE));
    rounded = -((prod + $signed(PRW'(64'd1 << (SH - 1)))) >>> SH);
    amax    = PRW'({1'b0, {(R_W-1){1'b1}}});
    amin    = -amax - $signed(PRW'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addend_o <= '0;
      valid_o  <= 1'b0;
    end else begin
      valid_o <= start;
      if (start) begin
        if      (rounded > amax) addend_o <= R_W'(amax);
        else if (rounded < amin) addend_o <= R_W'(amin);
        else                     addend_o <= R_W'(rounded);
      end
    end
  end

endmodule
