// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH entries of W bits held in a register array.  A write when full is
// dropped and raises the sticky overflow_o flag (cleared by clr_ovf); a read
// when empty is ignored.  The head entry is always visible on rdata_o
// (show-ahead); rd pops it.  count_o gives the fill level.
// A plain helper of this design; the document describes no queue.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr,
  input  logic [W-1:0]               wdata,
  input  logic                       rd,
  output logic [W-1:0]               rdata_o,
  output logic                       empty_o,
  output logic                       full_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o,
  input  logic                       clr_ovf,
  output logic                       overflow_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty_o = (count_o == '0);
  assign full_o  = (count_o == ($clog2(DEPTH+1))'(DEPTH));
  assign do_wr   = wr && !full_o;
  assign do_rd   = rd && !empty_o;
  assign rdata_o = mem[rp];

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp         <= '0;
      rp         <= '0;
      count_o    <= '0;
      overflow_o <= 1'b0;
    end else begin
      if (do_wr) wp <= nxt(wp);
      if (do_rd) rp <= nxt(rp);
      if (do_wr && !do_rd)      count_o <= count_o + 1'b1;
      else if (do_rd && !do_wr) count_o <= count_o - 1'b1;
      if (wr && full_o)  overflow_o <= 1'b1;
      else if (clr_ovf)  overflow_o <= 1'b0;
    end
  end

endmodule
