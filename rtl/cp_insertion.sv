// cp_insertion: memory stage after the iFFT (one per transmit antenna). It
// writes the 2048 iFFT outputs of a symbol at bit-reversed addresses, which
// puts the time samples back in natural order, and once the symbol is
// complete reads it cyclically: the last CP_LEN samples first (the cyclic
// prefix), then all 2048, one sample per clock, 2048+CP_LEN in all.
// `out_ready` is checked once per symbol; output is valid two clocks after a
// read starts. `buf_free` pulses when a bank is released; it returns a credit
// to the iFFT. The prefix length (1/8, 256 samples) is the IEEE 802.16e
// default; the document does not give it.
module cp_insertion
  import wimax_pkg::*;
#(
  parameter int CP = 256
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  in_ready,
  input  logic  out_ready,
  output logic  out_valid,
  output cplx_t out_data,
  output logic  buf_free
);
  localparam int LEN = N_FFT + CP;

  logic [10:0] wcnt, raddr;
  logic [11:0] rcnt;
  logic        reading, rd_last, rd_avail, rd_bank, rd_en_q;

  always_ff @(posedge clk) begin
    if (rst)           wcnt <= '0;
    else if (in_valid) wcnt <= wcnt + 1'b1;
  end

  assign raddr   = (int'(rcnt) < CP) ? 11'(N_FFT - CP + int'(rcnt)) : 11'(int'(rcnt) - CP);
  assign rd_last = reading && (int'(rcnt) == LEN - 1);

  adaptive_memory_block #(.WIDTH(32), .DEPTH(N_FFT)) u_mem (
    .clk, .rst,
    .wr_en(in_valid), .wr_addr(bitrev11(wcnt)), .wr_data(in_data),
    .wr_last(wcnt == 11'd2047), .wr_ready(in_ready),
    .rd_avail, .rd_bank, .rd_en(reading), .rd_addr(raddr), .rd_last,
    .rd_data(out_data), .rd_release(buf_free)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      reading <= 1'b0;
      rcnt    <= '0;
      rd_en_q <= 1'b0;
    end else begin
      rd_en_q <= reading;
      if (!reading) begin
        if (rd_avail && out_ready) begin
          reading <= 1'b1;
          rcnt    <= '0;
        end
      end else if (rd_last) reading <= 1'b0;
      else                  rcnt    <= rcnt + 1'b1;
    end
  end

  assign out_valid = rd_en_q;
endmodule
