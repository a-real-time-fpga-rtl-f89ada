// stbc_encoder: Alamouti space-time block code, matrix A of IEEE 802.16e,
// applied per carrier over two consecutive OFDM symbols. For the pair
// (S_N, S_N+1) that one carrier holds in symbols 2l and 2l+1:
//   antenna 0 sends  S_N   in symbol 2l and -S_N+1* in symbol 2l+1
//   antenna 1 sends  S_N+1 in symbol 2l and  S_N*   in symbol 2l+1
// One pair per clock, one clock of latency; the carrier index travels along.
// Negation saturates (-32768 becomes +32767), this design's choice.
module stbc_encoder
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cpair_t      in_data,
  input  logic [10:0] in_idx,
  output logic        out_valid,
  output cpair_t      ant0,
  output cpair_t      ant1,
  output logic [10:0] out_idx
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      ant0      <= '0;
      ant1      <= '0;
      out_idx   <= '0;
    end else begin
      out_valid <= in_valid;
      out_idx   <= in_idx;
      ant0.even <= in_data.even;
      ant0.odd.re <= neg16(in_data.odd.re);   // -conj(S_N+1)
      ant0.odd.im <= in_data.odd.im;
      ant1.even <= in_data.odd;
      ant1.odd  <= cconj(in_data.even);
    end
  end
endmodule
