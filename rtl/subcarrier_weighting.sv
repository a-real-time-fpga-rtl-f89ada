// subcarrier_weighting: subcarrier randomization. Every used carrier (data or
// pilot) whose randomization bit w_k is 1 is inverted; nulls pass unchanged.
// w_k comes from the IEEE 802.16e pilot-modulation PRBS, generator
// x^11 + x^9 + 1, seeded with all ones and clocked once per carrier from the
// first used carrier (logical 184) to the last (1864), the same sequence in
// every symbol. Because the carriers arrive in iFFT order rather than in
// frequency order, the sequence is precomputed into a 2048-bit mask indexed
// by the logical carrier number. One clock of latency.
// The document states the inversion by the standard's PRBS; the seed, the
// per-symbol restart and the application to data carriers as well as pilots
// are this design's reading.
module subcarrier_weighting
  import wimax_pkg::*;
#(
  parameter logic [10:0] SEED = 11'h7FF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cplx_t       in_data,
  input  logic [10:0] in_pos,
  output logic        out_valid,
  output cplx_t       out_data
);
  function automatic logic [N_FFT-1:0] gen_mask();
    logic [N_FFT-1:0] m;
    logic [10:0] s;
    logic        w;
    m = '0;
    s = SEED;
    for (int p = LEFT_GUARD; p <= LAST_USED; p++) begin
      w    = s[10] ^ s[8];
      m[p] = w;
      s    = {s[9:0], w};
    end
    return m;
  endfunction

  localparam logic [N_FFT-1:0] MASK = gen_mask();

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_data  <= MASK[in_pos] ? cneg(in_data) : in_data;
    end
  end
endmodule
