// tb_trigger_gen: checks the edge schedule of the programmable trigger.
//
// The local time advances by 0, 1 or 2 ticks per cycle (as the FCRTC does)
// and now and then jumps forward or back (offset corrections).  Away from
// jumps the output must equal the level the schedule gives for the time of
// the last clock edge: low before the start time, then high in even and low
// in odd half periods counted from the start.  pulse_o must mark exactly
// the rising edges.  After a jump the output must rejoin the schedule
// within a bounded number of cycles.
// The edge schedule under test is this design's reading of the
// document's programmable divider.
module tb_trigger_gen;
  import ptp_pkg::*;
  logic clk = 0, rst_n = 0, enable_i = 0;
  ptp_time_t time_i = 64'd5000, start_i = 64'd6000;
  logic [31:0] half_i = 32'd37;
  logic out_o, pulse_o;
  logic [31:0] edges_o, resync_o;
  int checks = 0, failures = 0;

  trigger_gen dut (.*);
  always #5 clk = !clk;

  function automatic logic level(input ptp_time_t t);
    if (t < start_i) return 1'b0;
    return (((t - start_i) / 64'(half_i)) % 2) == 0;
  endfunction

  ptp_time_t prev_t;
  logic prev_out;
  int quiet;          // cycles since the last jump or reprogramming
  int rises, jumps;

  initial begin
    prev_t = time_i; prev_out = 0; quiet = 0; rises = 0; jumps = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int seg = 0; seg < 4; seg++) begin
      enable_i = 0;
      half_i = (seg == 3) ? 32'd2 : 32'($urandom_range(2, 60));
      start_i = time_i + 64'($urandom_range(0, 300));
      @(posedge clk); #1;
      enable_i = 1; quiet = 0;
      for (int i = 0; i < 6000; i++) begin
        prev_t = time_i;
        prev_out = out_o;
        if ($urandom_range(0, 999) == 0 && seg != 3) begin
          if ($urandom_range(0, 1)) time_i = time_i + 64'($urandom_range(1, 2000));
          else time_i = time_i - 64'($urandom_range(1, 400));
          quiet = 0; jumps++;
        end else begin
          time_i = time_i + 64'($urandom_range(0, 2));
        end
        @(posedge clk); #1;
        quiet++;
        if (quiet > 2 + 2000 / int'(half_i) + 2 && enable_i) begin
          checks++;
          if (out_o != level(time_i)) begin
            failures++;
            if (failures < 10) $display("FAIL out %0d at time %0d (start %0d half %0d)", out_o, time_i, start_i, half_i);
          end
          checks++;
          if (pulse_o != (out_o && !prev_out)) begin failures++; $display("FAIL pulse"); end
          if (pulse_o) rises++;
        end
      end
    end
    checks++;
    if (rises < 100 || jumps == 0 || resync_o == 0 || edges_o < 32'(rises)) begin
      failures++; $display("FAIL coverage rises %0d jumps %0d resync %0d", rises, jumps, resync_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
