// preamble_ram: holds the preamble OFDM symbol of one transmit antenna, time
// samples with the cyclic prefix included (LEN = 2304). The preamble is
// computed off-line and written through the write port by the host; the frame
// controller reads it just ahead of the first data symbol. Simple dual-port
// RAM, registered read (data the clock after raddr). The document specifies
// an off-line computed preamble kept in a RAM; the port set is this design's.
module preamble_ram
  import wimax_pkg::*;
#(
  parameter int LEN = 2304,
  localparam int AW = $clog2(LEN)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_t         wdata,
  input  logic [AW-1:0] raddr,
  output cplx_t         rdata
);
  cplx_t mem [LEN];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
