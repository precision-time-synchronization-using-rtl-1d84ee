// fcrtc: frequency compensated real-time clock.
//
// A P_W-bit clock counter, a Q_W-bit accumulator acting as a fine frequency
// divider and an R_W-bit addend register, all clocked by the local crystal
// oscillator.  Every cycle the addend is added to the accumulator; the clock
// counter advances by one tick per cycle plus the accumulator's carry.  The
// addend is a signed compensation value in units of 2^-Q_W ticks per cycle:
// a positive addend makes the clock run fast, a negative one makes it skip a
// tick whenever the accumulator borrows.  With Q_W = 32 the frequency can be
// trimmed in steps of 2.3e-10, finer than the 1e-9 the design calls for.
//
// Widths p = 64, q = 32, r = 32 and the 44 MHz oscillator (22.73 ns tick)
// follow the document.  Reading the addend as a signed correction around a
// nominal increment of one tick (rather than a raw increment that must
// overflow every cycle) is this design's choice.
//
// Interface: addend_we loads addend_i (takes effect the next cycle);
// step_en adds the signed step_i to the counter (offset correction);
// set_en loads set_i (time set).  set_en wins over step_en.  time_o is the
// registered counter value; addend_o the current addend.
module fcrtc #(
  parameter int unsigned P_W = 64,             // clock counter width
  parameter int unsigned Q_W = 32,             // accumulator width
  parameter int unsigned R_W = 32,             // addend register width
  parameter logic signed [R_W-1:0] ADDEND_INIT = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  addend_we,
  input  logic signed [R_W-1:0] addend_i,
  input  logic                  step_en,
  input  logic signed [P_W-1:0] step_i,
  input  logic                  set_en,
  input  logic        [P_W-1:0] set_i,
  output logic        [P_W-1:0] time_o,
  output logic signed [R_W-1:0] addend_o
);

  initial assert (R_W <= Q_W) else $error("fcrtc: addend wider than accumulator");

  logic [Q_W-1:0] acc;
  logic [Q_W:0]   sum;         // accumulator plus addend, with carry
  logic [P_W-1:0] inc;         // 0, 1 or 2 ticks this cycle
  logic [Q_W-1:0] addend_ext;

  assign addend_ext = Q_W'(addend_o);  // sign-extended addend
  assign sum        = {1'b0, acc} + {1'b0, addend_ext};

  always_comb begin
    if (!addend_o[R_W-1]) inc = sum[Q_W] ? P_W'(2) : P_W'(1);  // carry: extra tick
    else                  inc = sum[Q_W] ? P_W'(1) : P_W'(0);  // borrow: skip tick
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      time_o   <= '0;
      addend_o <= ADDEND_INIT;
    end else begin
      acc <= sum[Q_W-1:0];
      if (addend_we) addend_o <= addend_i;
      if (set_en)       time_o <= set_i;
      else if (step_en) time_o <= time_o + inc + P_W'(step_i);
      else              time_o <= time_o + inc;
    end
  end

endmodule
