// sample_packer: packages timestamped ADC samples for upload to the host.
//
// Samples are grouped into packets of N 32-bit words:
//   word 0      {8'hA5, 8'(N), 16-bit packet sequence number}
//   word 1, 2   local time of the packet's first sample, low then high half
//   word 3..    N samples, sign-extended from BITS to 32 bits
// Since all nodes share the master's time scale, the header time lets the
// host line up packets from different nodes.  Words go into a DEPTH-word
// queue that the host drains through pop_i; a word that finds the queue
// full is dropped and sets the sticky overflow_o.
//
// The document says that an FPGA packages the sample data and uploads it;
// the packet layout and sizes (N = 8 samples, DEPTH = 64) are this design's
// choices.  Timing: the three header words are written in the three cycles
// after a packet's first sample, which is written in the fourth; later
// samples are written the cycle after they arrive.  Samples must be at least
// five cycles apart (an ADC delivers one every few hundred cycles).
module sample_packer
  import ptp_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned BITS  = 24,
  parameter int unsigned DEPTH = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sample_valid_i,
  input  logic [BITS-1:0] sample_i,
  input  ptp_time_t       sample_ts_i,
  input  logic            pop_i,
  input  logic            clr_ovf,
  output logic [31:0]     word_o,
  output logic            avail_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o,
  output logic            overflow_o,
  output logic [15:0]     packets_o
);

  typedef enum logic [2:0] {P_IDLE, P_H0, P_H1, P_H2, P_S} pstate_e;
  pstate_e state;

  logic [$clog2(N+1)-1:0] nsamp;       // samples of the current packet
  logic [15:0]            seq;
  ptp_time_t              ts0;
  logic [BITS-1:0]        held;
  logic                   wr;
  logic [31:0]            wdata;
  logic                   empty;

  always_comb begin
    wr    = 1'b1;
    unique case (state)
      P_H0:    wdata = {8'hA5, 8'(N), seq};
      P_H1:    wdata = ts0[31:0];
      P_H2:    wdata = ts0[63:32];
      P_S:     wdata = 32'($signed(held));
      default: begin wdata = '0; wr = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      nsamp     <= '0;
      seq       <= '0;
      ts0       <= '0;
      held      <= '0;
      packets_o <= '0;
    end else begin
      unique case (state)
        P_IDLE: if (sample_valid_i) begin
          held <= sample_i;
          if (nsamp == '0) begin
            ts0   <= sample_ts_i;
            state <= P_H0;
          end else begin
            state <= P_S;
          end
        end
        P_H0: state <= P_H1;
        P_H1: state <= P_H2;
        P_H2: state <= P_S;
        P_S: begin
          state <= P_IDLE;
          if (nsamp == ($clog2(N+1))'(N - 1)) begin
            nsamp     <= '0;
            seq       <= seq + 16'd1;
            packets_o <= packets_o + 16'd1;
          end else begin
            nsamp <= nsamp + 1'b1;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .wr, .wdata, .rd(pop_i), .rdata_o(word_o), .empty_o(empty),
    .full_o(), .count_o, .clr_ovf, .overflow_o
  );

  assign avail_o = !empty;

  a_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                              sample_valid_i |-> state == P_IDLE);

endmodule
