// tb_ptp_detector: checks PTP event recognition and SFD timestamping.
//
// Sends MII frames (nibble enables at irregular spacing, as when a 25 MHz
// MII clock is seen from the 44 MHz local clock): PTP event and general
// messages over Ethernet and over UDP, near misses (wrong UDP port, wrong
// IP protocol, IPv4 options) and unrelated frames.  For every frame the
// expected report is known from what was sent: only event messages are
// reported, with their messageType, sequenceId and the local time in the
// cycle that carried the SFD's second nibble.
// Message formats follow IEEE 1588-2008; the SFD timestamp point is this
// design's choice.
module tb_ptp_detector;
  import ptp_pkg::*;
  import mii_tb_pkg::*;

  logic clk = 0, rst_n = 0, nib_ce = 0, dv = 0;
  logic [3:0] d = '0;
  ptp_time_t time_i = 64'd1000;
  logic sof_o, evt_valid;
  ts_entry_t evt_o;
  logic [31:0] frame_o, ptp_o;
  int checks = 0, failures = 0;

  ptp_detector dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) time_i <= time_i + 1;

  ts_entry_t got[$];
  always @(posedge clk) if (evt_valid) got.push_back(evt_o);

  task automatic nibble(input logic [3:0] n, input logic v, ref ptp_time_t t_at);
    dv = v; d = n; nib_ce = 1;
    t_at = time_i;
    @(posedge clk); #1;
    nib_ce = 0;
    repeat ($urandom_range(0, 1)) begin @(posedge clk); #1; end
  endtask

  task automatic send(input bytes_t b, output ptp_time_t sfd_t);
    ptp_time_t t;
    for (int i = 0; i < 15; i++) nibble(4'h5, 1, t);
    nibble(4'hD, 1, sfd_t);
    foreach (b[i]) begin
      nibble(b[i][3:0], 1, t);
      nibble(b[i][7:4], 1, t);
    end
    repeat (24) nibble(4'h0, 0, t);       // inter-frame gap
  endtask

  task automatic frame(input bytes_t b, input bit is_evt, input int mt, input int seq);
    ptp_time_t t;
    got.delete();
    send(b, t);
    checks++;
    if (!is_evt) begin
      if (got.size() != 0) begin failures++; $display("FAIL unexpected report for type %0d", mt); end
    end else if (got.size() != 1) begin
      failures++; $display("FAIL %0d reports for event type %0d seq %0d", got.size(), mt, seq);
    end else if (got[0].ts != t || got[0].msg_type != 4'(mt) || got[0].seq_id != 16'(seq)) begin
      failures++;
      $display("FAIL report ts %0d/%0d type %0d/%0d seq %0d/%0d", got[0].ts, t,
               got[0].msg_type, mt, got[0].seq_id, seq);
    end
  endtask

  int nframes;
  initial begin
    nframes = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    frame(l2_ptp(0, 1), 1, 0, 1);                    nframes++;  // Sync
    frame(l2_ptp(1, 2), 1, 1, 2);                    nframes++;  // Delay_Req
    frame(l2_ptp(8, 3), 0, 8, 3);                    nframes++;  // Follow_Up: general
    frame(l2_ptp(9, 4), 0, 9, 4);                    nframes++;  // Delay_Resp: general
    frame(udp_ptp(0, 16'hBEEF), 1, 0, 16'hBEEF);     nframes++;
    frame(udp_ptp(1, 16'h0102), 1, 1, 16'h0102);     nframes++;
    frame(udp_ptp(0, 5, 320), 0, 0, 5);              nframes++;  // general port
    frame(udp_ptp(0, 6, 319, 6), 0, 0, 6);           nframes++;  // TCP
    frame(udp_ptp(0, 7, 319, 17, 8'h46), 0, 0, 7);   nframes++;  // IP options
    frame(other(40), 0, 0, 0);                       nframes++;
    for (int i = 0; i < 60; i++) begin
      int k = $urandom_range(0, 5);
      int mt = $urandom_range(0, 3);
      int sq = $urandom_range(0, 65535);
      case (k)
        0, 1: frame(l2_ptp(mt, sq), 1, mt, sq);
        2, 3: frame(udp_ptp(mt, sq), 1, mt, sq);
        4:    frame(l2_ptp(mt + 8, sq), 0, mt + 8, sq);
        default: frame(other($urandom_range(0, 100)), 0, 0, 0);
      endcase
      nframes++;
    end
    checks++;
    if (frame_o != 32'(nframes)) begin failures++; $display("FAIL frame count %0d of %0d", frame_o, nframes); end
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
