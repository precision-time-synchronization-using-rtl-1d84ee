// tb_sample_packer: checks the packet layout of uploaded samples.
//
// Sends random 24-bit samples with timestamps at random spacing and drains
// the queue at random.  The words read must form packets of a header
// {A5, N, sequence}, the first sample's time (low, high) and N sign-extended
// samples, with consecutive sequence numbers.  A second phase stops reading
// until the queue overflows and checks the overflow flag.
// The packet layout under test is this design's own.
module tb_sample_packer;
  import ptp_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, sample_valid_i = 0, pop_i = 0, clr_ovf = 0;
  logic [23:0] sample_i = '0;
  ptp_time_t sample_ts_i = '0;
  logic [31:0] word_o;
  logic avail_o, overflow_o;
  logic [6:0] count_o;
  logic [15:0] packets_o;
  int checks = 0, failures = 0;

  sample_packer dut (.*);
  always #5 clk = !clk;

  logic [31:0] expq[$];
  int sent = 0;
  bit draining = 1;

  // producer: model of the expected word stream
  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      repeat ($urandom_range(5, 12)) @(posedge clk);
      #1;
      sample_valid_i = 1;
      sample_i = 24'($urandom);
      sample_ts_i = {$urandom, $urandom};
      if (i % N == 0) begin
        expq.push_back({8'hA5, 8'(N), 16'(i / N)});
        expq.push_back(sample_ts_i[31:0]);
        expq.push_back(sample_ts_i[63:32]);
      end
      expq.push_back(32'($signed(sample_i)));
      sent++;
      @(posedge clk); #1 sample_valid_i = 0;
    end
  end

  // consumer
  int got = 0;
  always @(posedge clk) begin
    #1;
    pop_i = 0;
    if (rst_n && draining && avail_o && $urandom_range(0, 3) == 0) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL word with nothing expected"); end
      else begin
        logic [31:0] e;
        e = expq.pop_front();
        if (word_o != e) begin failures++; $display("FAIL word %h expected %h", word_o, e); end
      end
      got++;
      pop_i = 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (sent == 200);
    repeat (200) @(posedge clk);
    checks++;
    if (expq.size() != 0 || packets_o != 16'(200 / N)) begin
      failures++; $display("FAIL left %0d words, %0d packets", expq.size(), packets_o);
    end
    checks++;
    if (overflow_o) begin failures++; $display("FAIL overflow while drained"); end
    // stop draining until the queue overflows
    draining = 0;
    for (int i = 0; i < 80; i++) begin
      @(posedge clk); #2 sample_valid_i = 1; sample_i = 24'(i);
      @(posedge clk); #2 sample_valid_i = 0;
      repeat (5) @(posedge clk);
    end
    checks++;
    if (!overflow_o || count_o != 7'd64) begin failures++; $display("FAIL overflow %0d count %0d", overflow_o, count_o); end
    @(posedge clk); #2 clr_ovf = 1; @(posedge clk); #2 clr_ovf = 0;
    checks++;
    if (overflow_o) begin failures++; $display("FAIL overflow not cleared"); end
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
