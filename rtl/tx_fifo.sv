// tx_fifo: the large output FIFO of one transmit antenna. It soaks up OFDM
// symbols (prefix included) as the chain produces them and hands them to the
// frame controller at the DAC rate without a break. Synchronous, one clock:
// `dout` is registered and valid the clock after `rd_en`. `in_ready` is
// burst-level: high while at least a whole symbol (BURST samples, plus a small
// margin for samples still on their way) fits. `level` is the fill count.
// The document asks for a FIFO holding several symbols; the depth of 32768
// samples (14 symbols, enough for the ~10-symbol prefill that the production
// rate needs) is this design's choice.
module tx_fifo
  import wimax_pkg::*;
#(
  parameter int DEPTH = 32768,
  parameter int BURST = 2304,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  cplx_t       din,
  output logic        in_ready,
  input  logic        rd_en,
  output cplx_t       dout,
  output logic        empty,
  output logic        full,
  output logic [AW:0] level
);
  cplx_t         mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign empty    = (level == '0);
  assign full     = (int'(level) == DEPTH);
  assign in_ready = (DEPTH - int'(level)) >= BURST + 4;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
    if (do_rd) dout <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_wr) wptr <= (int'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (int'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      level <= level + ($bits(level))'(do_wr) - ($bits(level))'(do_rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) wr_en |-> !full)
    else $error("FIFO overflow");
endmodule
