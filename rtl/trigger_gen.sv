// trigger_gen: programmable trigger and divided clock from the local time.
//
// Produces a square wave whose edges sit on the synchronised time scale:
// rising edges at start_i + 2k*half_i and falling edges at
// start_i + (2k+1)*half_i (k = 0, 1, ...), in ticks.  pulse_o marks each
// rising edge for one cycle.  Because the edges are derived from the
// disciplined clock and not from the raw oscillator, nodes that share the
// master's time sample in step.  The same module, with start 0 and half a
// second as half period, gives the pulse-per-second output.
//
// The document says the local clock output is programmably divided to drive
// the ADC and that the trigger is programmable; the edge schedule, the
// start time and the handling of clock steps are this design's choices.
// After the clock is stepped, the edge schedule is moved by whole half
// periods, one per cycle, until it is again within one half period of the
// time, so the phase on the time grid is kept; the pin holds its level
// meanwhile (no burst of edges) and takes the scheduled level afterwards.
//
// half_i must be at least 2: the clock may advance two ticks in one cycle,
// and with a shorter half period an edge could be passed over.
//
// Timing: edges appear on out_o one cycle after time_i reaches them.
// Clearing enable_i drives the output low and re-arms at start_i.
module trigger_gen
  import ptp_pkg::*;
#(
  parameter int unsigned HW = 32       // half-period width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable_i,
  input  ptp_time_t     time_i,
  input  ptp_time_t     start_i,
  input  logic [HW-1:0] half_i,
  output logic          out_o,
  output logic          pulse_o,
  output logic [31:0]   edges_o,     // rising edges produced
  output logic [31:0]   resync_o     // half periods skipped after clock steps
);

  ptp_time_t          next;
  logic signed [63:0] lag;           // time_i - next
  logic               level;         // schedule level, also during catch-up

  assign lag = $signed(time_i - next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next     <= '0;
      level    <= 1'b0;
      out_o    <= 1'b0;
      pulse_o  <= 1'b0;
      edges_o  <= '0;
      resync_o <= '0;
    end else begin
      pulse_o <= 1'b0;
      if (!enable_i) begin
        next  <= start_i;
        level <= 1'b0;
        out_o <= 1'b0;
      end else if (lag >= $signed(64'(half_i))) begin
        // clock stepped forward: skip an edge, keep the phase, hold the pin
        next     <= next + 64'(half_i);
        level    <= !level;
        resync_o <= resync_o + 32'd1;
      end else if (lag < -$signed(64'(half_i)) && next != start_i) begin
        // clock stepped backward past the previous edge
        next     <= next - 64'(half_i);
        level    <= !level;
        resync_o <= resync_o + 32'd1;
      end else if (lag >= 0) begin
        // regular edge
        next    <= next + 64'(half_i);
        level   <= !level;
        out_o   <= !level;
        pulse_o <= !level;
        if (!level) edges_o <= edges_o + 32'd1;
      end else begin
        out_o <= level;             // rejoin the schedule after a catch-up
      end
    end
  end

  a_half: assert property (@(posedge clk) disable iff (!rst_n) enable_i |-> half_i >= 2);

endmodule
