// frame_controller: the timing logic at the end of the baseband chain. It
// produces one output sample per clock for both antennas, in a fixed frame
// pattern: SILENCE_LEN clocks of zeros (the inter-frame silence), the stored
// preamble symbol (SYM_LEN samples from the preamble RAMs), then N_SYM data
// symbols (N_SYM*SYM_LEN samples) popped from the two FIFOs in lock step, and
// back to silence. The silence equals the frame length, so the FIFOs refill
// while it runs. If a FIFO is empty during the data part the sample is sent
// as zero, nothing is popped, and `underruns` counts it.
// Timing: the preamble RAM and FIFO outputs are registered, so `out_data` is
// valid one clock after the decision; `out_valid` marks it, `frame_start`
// pulses with the first preamble sample on the output.
// The document specifies silence counting, a preamble read just before the
// FIFO data, and strict timing; the counts are derived from its 46 symbols and
// the assumed 2304-sample symbol.
module frame_controller
  import wimax_pkg::*;
#(
  parameter int N_SYM       = 46,
  parameter int SYM         = 2304,
  parameter int SILENCE_LEN = 108288,
  localparam int PAW        = $clog2(SYM)
) (
  input  logic           clk,
  input  logic           rst,
  output logic [1:0]     fifo_rd,
  input  cplx_t          fifo_dout [2],
  input  logic [1:0]     fifo_empty,
  output logic [PAW-1:0] pre_raddr,
  input  cplx_t          pre_rdata [2],
  output logic           out_valid,
  output cplx_t          out_data [2],
  output logic           frame_start,
  output logic           in_data_part,
  output logic [31:0]    underruns,
  output logic [31:0]    frames
);
  typedef enum logic [1:0] {SILENCE, PRE, DATA} st_e;
  typedef enum logic [1:0] {SRC_ZERO, SRC_PRE, SRC_FIFO} src_e;

  st_e         st;
  logic [31:0] cnt;
  src_e        src_q;
  logic        pop;

  assign pop       = (st == DATA) && (fifo_empty == 2'b00);
  assign fifo_rd   = {pop, pop};
  assign pre_raddr = PAW'(cnt);
  assign in_data_part = (st == DATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= SILENCE;
      cnt         <= '0;
      src_q       <= SRC_ZERO;
      out_valid   <= 1'b0;
      frame_start <= 1'b0;
      underruns   <= '0;
      frames      <= '0;
    end else begin
      out_valid   <= 1'b1;
      frame_start <= (st == PRE) && (cnt == 0);
      unique case (st)
        SILENCE: src_q <= SRC_ZERO;
        PRE:     src_q <= SRC_PRE;
        default: src_q <= pop ? SRC_FIFO : SRC_ZERO;
      endcase
      if (st == DATA && !pop) underruns <= underruns + 1;
      cnt <= cnt + 1;
      unique case (st)
        SILENCE: if (cnt == SILENCE_LEN - 1) begin st <= PRE; cnt <= '0; end
        PRE:     if (cnt == SYM - 1)         begin st <= DATA; cnt <= '0; end
        default: if (cnt == N_SYM * SYM - 1) begin
                   st <= SILENCE;
                   cnt <= '0;
                   frames <= frames + 1;
                 end
      endcase
    end
  end

  always_comb begin
    for (int a = 0; a < 2; a++) begin
      unique case (src_q)
        SRC_PRE:  out_data[a] = pre_rdata[a];
        SRC_FIFO: out_data[a] = fifo_dout[a];
        default:  out_data[a] = '0;
      endcase
    end
  end
endmodule
