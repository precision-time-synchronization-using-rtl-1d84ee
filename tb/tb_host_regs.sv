// tb_host_regs: checks the register map and bus timing.
//
// Writes random values to every writable register and reads them back,
// checks that the configuration outputs follow, that CMD and ADDEND writes
// give one-cycle commands, that status inputs appear at their addresses,
// that read data comes one cycle after the read strobe, that the reset
// values are the documented ones, and that TIME_HI returns the high half
// captured when TIME_LO was read.
// The register map under test is this design's own.
module tb_host_regs;
  import ptp_pkg::*;
  logic clk = 0, rst_n = 0, bus_we = 0, bus_re = 0;
  logic [7:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_rvalid;
  ptp_cfg_t cfg_o;
  ptp_cmd_t cmd_o;
  ptp_status_t st_i;
  int checks = 0, failures = 0;

  host_regs dut (.*);
  always #5 clk = !clk;

  int cmd_pulses[7];
  always @(negedge clk) begin
    if (cmd_o.start)     cmd_pulses[0]++;
    if (cmd_o.set_time)  cmd_pulses[1]++;
    if (cmd_o.addend_we) cmd_pulses[2]++;
    if (cmd_o.rx_pop)    cmd_pulses[3]++;
    if (cmd_o.tx_pop)    cmd_pulses[4]++;
    if (cmd_o.adc_pop)   cmd_pulses[5]++;
    if (cmd_o.clr_ovf)   cmd_pulses[6]++;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    bus_we = 1; bus_addr = a; bus_wdata = d;
    @(posedge clk); #1 bus_we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bus_re = 1; bus_addr = a;
    @(posedge clk); #1 bus_re = 0;
    checks++;
    if (!bus_rvalid) begin failures++; $display("FAIL rvalid"); end
    d = bus_rdata;
    @(posedge clk); #1;
    checks++;
    if (bus_rvalid) begin failures++; $display("FAIL rvalid held"); end
  endtask
  task automatic expect_rd(input logic [7:0] a, input logic [31:0] e);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL read %h: %h expected %h", a, d, e); end
  endtask

  logic [7:0] rw_regs[] = '{R_SET_LO, R_SET_HI, R_T1_LO, R_T1_HI, R_T2_LO, R_T2_HI, R_T3_LO, R_T3_HI,
                             R_T4_LO, R_T4_HI, R_KF_Q, R_KF_R, R_KF_P0, R_TRIG_LO, R_TRIG_HI,
                             R_TRIG_HALF, R_PPS_HALF};

  initial begin
    logic [31:0] v, d;
    st_i = '0;
    foreach (cmd_pulses[i]) cmd_pulses[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // reset values
    expect_rd(R_ID, DEVICE_ID);
    expect_rd(R_CTRL, 32'd4);
    expect_rd(R_KF_Q, 32'd16);
    expect_rd(R_KF_R, 32'd4096);
    expect_rd(R_KF_P0, 32'd65536);
    expect_rd(R_KF_KFIX, 32'd4096);
    expect_rd(R_PPS_HALF, 32'd22_000_000);
    expect_rd(R_TRIG_HALF, 32'd2);
    // read/write registers
    for (int r = 0; r < 3; r++)
      foreach (rw_regs[i]) begin
        v = $urandom;
        wr(rw_regs[i], v);
        expect_rd(rw_regs[i], v);
      end
    wr(R_KF_KFIX, 32'hFFFF_FFFF);
    expect_rd(R_KF_KFIX, 32'h0001_FFFF);
    // configuration outputs
    wr(R_T1_LO, 32'h1111_2222); wr(R_T1_HI, 32'h3333_4444);
    wr(R_T4_LO, 32'h5555_6666); wr(R_T4_HI, 32'h7777_8888);
    wr(R_CTRL, 32'd3);
    checks++;
    if (cfg_o.t1 != 64'h3333_4444_1111_2222 || cfg_o.t4 != 64'h7777_8888_5555_6666 ||
        !cfg_o.fixed_gain || !cfg_o.trig_en || cfg_o.pps_en) begin
      failures++; $display("FAIL configuration outputs");
    end
    // commands
    wr(R_CMD, 32'b11_1111);
    wr(R_ADDEND, 32'hFFFF_FF00);
    @(posedge clk); #1;
    checks++;
    foreach (cmd_pulses[i]) if (cmd_pulses[i] != 1) begin failures++; $display("FAIL command %0d pulses %0d", i, cmd_pulses[i]); end
    checks++;
    if (cfg_o.addend != 32'hFFFF_FF00) begin failures++; $display("FAIL addend value"); end
    // status
    st_i.now = 64'h0000_00AB_CDEF_0123;
    st_i.offset = -64'sd5;
    st_i.skew = 48'sh8000_1234_5678;
    st_i.rx_head = '{ts: 64'h1234_5678_9ABC_DEF0, msg_type: 4'h1, seq_id: 16'hBEEF};
    st_i.rx_avail = 1;
    st_i.locked = 1;
    st_i.adc_word = 32'hCAFE_F00D;
    st_i.tx_ptp = 32'd77;
    expect_rd(R_TIME_LO, 32'hCDEF_0123);
    st_i.now = 64'h0000_00AC_0000_0000;              // high half moves on
    expect_rd(R_TIME_HI, 32'h0000_00AB);             // shadow keeps the old one
    expect_rd(R_OFS_LO, 32'hFFFF_FFFB);
    expect_rd(R_OFS_HI, 32'hFFFF_FFFF);
    expect_rd(R_SKEW_LO, 32'h1234_5678);
    expect_rd(R_SKEW_HI, 32'h0000_8000);
    expect_rd(R_RX_TS_LO, 32'h9ABC_DEF0);
    expect_rd(R_RX_TS_HI, 32'h1234_5678);
    expect_rd(R_RX_INFO, 32'h8001_BEEF);
    expect_rd(R_STATUS, 32'h0000_0006);
    expect_rd(R_ADC_WORD, 32'hCAFE_F00D);
    expect_rd(R_TX_PTP, 32'd77);
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
