// tb_tsu: checks the timestamp queues.
//
// Random pushes and pops on both queues at once against queue models in the
// testbench: order, contents, fill level, availability, the drop of an
// entry written into a full queue with its sticky overflow flag, and the
// flag's clearing.
// The queue organisation is this design's; the document only names the
// TSU.
module tb_tsu;
  import ptp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, tx_valid = 0, rx_pop = 0, tx_pop = 0, clr_ovf = 0;
  ts_entry_t rx_entry, tx_entry, rx_head, tx_head;
  logic rx_avail, tx_avail, rx_ovf, tx_ovf;
  logic [2:0] rx_count, tx_count;
  int checks = 0, failures = 0;

  tsu dut (.*);
  always #5 clk = !clk;

  ts_entry_t mrx[$], mtx[$];
  bit movf_rx, movf_tx;
  int overflows;

  function automatic ts_entry_t rnd();
    return '{ts: {$urandom, $urandom}, msg_type: 4'($urandom), seq_id: 16'($urandom)};
  endfunction

  initial begin
    rx_entry = '0; tx_entry = '0; movf_rx = 0; movf_tx = 0; overflows = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      // drive
      rx_valid = ($urandom_range(0, 99) < 40); rx_entry = rnd();
      tx_valid = ($urandom_range(0, 99) < 30); tx_entry = rnd();
      rx_pop   = ($urandom_range(0, 99) < (i < 2000 ? 30 : 45));
      tx_pop   = ($urandom_range(0, 99) < (i < 2000 ? 20 : 40));
      clr_ovf  = ($urandom_range(0, 99) < 2);
      // check the visible state before the edge
      checks++;
      if (rx_avail != (mrx.size() > 0) || tx_avail != (mtx.size() > 0) ||
          rx_count != 3'(mrx.size()) || tx_count != 3'(mtx.size())) begin
        failures++; $display("FAIL levels rx %0d/%0d tx %0d/%0d", rx_count, mrx.size(), tx_count, mtx.size());
      end
      if (mrx.size() > 0) begin
        checks++;
        if (rx_head != mrx[0]) begin failures++; $display("FAIL rx head"); end
      end
      if (mtx.size() > 0) begin
        checks++;
        if (tx_head != mtx[0]) begin failures++; $display("FAIL tx head"); end
      end
      checks++;
      if (rx_ovf != movf_rx || tx_ovf != movf_tx) begin failures++; $display("FAIL overflow flags"); end
      @(posedge clk);
      // model
      if (rx_valid && mrx.size() == 4) begin movf_rx = 1; overflows++; end
      else if (clr_ovf) movf_rx = 0;
      if (tx_valid && mtx.size() == 4) begin movf_tx = 1; overflows++; end
      else if (clr_ovf) movf_tx = 0;
      begin
        bit rxw, txw;
        rxw = rx_valid && mrx.size() < 4;
        txw = tx_valid && mtx.size() < 4;
        if (rx_pop && mrx.size() > 0) void'(mrx.pop_front());
        if (tx_pop && mtx.size() > 0) void'(mtx.pop_front());
        if (rxw) mrx.push_back(rx_entry);
        if (txw) mtx.push_back(tx_entry);
      end
      #1;
    end
    checks++;
    if (overflows == 0) begin failures++; $display("FAIL overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
