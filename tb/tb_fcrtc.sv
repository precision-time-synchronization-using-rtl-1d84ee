// tb_fcrtc: self-checking test of the frequency compensated clock.
//
// A reference model (64-bit time plus 32-bit accumulator, computed with
// plain integer arithmetic) runs beside the block.  The test checks the
// nominal rate (one tick per cycle with a zero addend), fast and slow rates
// over long spans (addend +1/4 and -1/4 tick per cycle give exactly 1.25
// and 0.75 ticks per cycle), random addends, offset steps and time sets,
// comparing the clock every cycle.
// The reference model is the document's accumulator clock with this
// design's signed-addend reading.
module tb_fcrtc;
  logic clk = 0, rst_n = 0;
  logic addend_we = 0, step_en = 0, set_en = 0;
  logic signed [31:0] addend_i = '0;
  logic signed [63:0] step_i = '0;
  logic [63:0] set_i = '0, time_o;
  logic signed [31:0] addend_o;
  int checks = 0, failures = 0;

  fcrtc dut (.*);

  always #5 clk = !clk;

  // reference model
  longint unsigned ref_time;
  longint unsigned ref_acc;
  longint signed   ref_add;

  task automatic ref_step(input bit we, input longint signed a, input bit st,
                          input longint signed s, input bit se, input longint unsigned sv);
    longint signed inc;
    longint unsigned sum;
    sum = ref_acc + longint'(unsigned'(32'(ref_add)));
    if (ref_add >= 0) inc = (sum >> 32) ? 2 : 1;
    else              inc = (sum >> 32) ? 1 : 0;
    ref_acc = sum & 64'hFFFF_FFFF;
    if (se)      ref_time = sv;
    else if (st) ref_time = ref_time + inc + s;
    else         ref_time = ref_time + inc;
    if (we) ref_add = a;
  endtask

  task automatic cyc(input bit we = 0, input int a = 0, input bit st = 0,
                     input longint s = 0, input bit se = 0, input longint unsigned sv = 0);
    addend_we = we; addend_i = a; step_en = st; step_i = s; set_en = se; set_i = sv;
    @(posedge clk);
    ref_step(we, a, st, s, se, sv);
    #1;
    addend_we = 0; step_en = 0; set_en = 0;
    checks++;
    if (time_o !== ref_time) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t time %0d expected %0d", $time, time_o, ref_time);
    end
  endtask

  longint unsigned t0;
  initial begin
    ref_time = 0; ref_acc = 0; ref_add = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // nominal rate
    t0 = time_o;
    repeat (100) cyc();
    checks++; if (time_o - t0 != 100) begin failures++; $display("FAIL nominal rate"); end
    // fast: +1/4 tick per cycle
    cyc(1, 32'sh4000_0000);
    t0 = time_o;
    repeat (400) cyc();
    checks++; if (time_o - t0 != 500) begin failures++; $display("FAIL fast rate %0d", time_o - t0); end
    // slow: -1/4 tick per cycle
    cyc(1, -32'sh4000_0000);
    t0 = time_o;
    repeat (400) cyc();
    checks++; if (time_o - t0 != 300) begin failures++; $display("FAIL slow rate %0d", time_o - t0); end
    // random addends, steps and sets
    for (int i = 0; i < 3000; i++) begin
      int r = int'($urandom_range(0, 99));
      if (r < 5)       cyc(1, int'($urandom));
      else if (r < 8)  cyc(0, 0, 1, longint'($signed(32'($urandom))));
      else if (r < 9)  cyc(0, 0, 0, 0, 1, {$urandom, $urandom});
      else if (r < 10) cyc(1, -int'($urandom_range(0, 1000)), 1, -5, 0, 0);
      else             cyc();
    end
    // addend read-back
    cyc(1, 32'sh1234_5678);
    checks++; if (addend_o !== 32'sh1234_5678) begin failures++; $display("FAIL addend readback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
