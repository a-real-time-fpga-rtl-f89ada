// r2sdf_stage: one stage of a radix-2 single-delay-feedback decimation-in-
// frequency inverse FFT. Samples arrive one per advance (`en`); a counter
// splits every 2D samples into a first half, which is parked in a D-deep
// feedback delay line, and a second half. During the second half the stage
// emits (a+b)/2 at once and parks ((a-b)/2) * W^j, W = exp(+j*pi/D), in the
// delay line; those are emitted during the next first half. So the stage
// delays the stream by D advances, plus one for its output register.
// Halving (rounded half to even, so no bias builds up) in every butterfly
// keeps magnitudes from growing, so a 2048-point
// pipeline scales by 1/2048 overall. Each sample carries a `real` flag that
// marks data (as opposed to the zeros used to flush the pipeline).
// OFFSET is how many advances the stage's input lags the pipeline input,
// modulo 2D, so its counter stays aligned with the data. Twiddles are Q1.15,
// computed at elaboration. The whole iFFT architecture is this design's own;
// the document gives only the transform size.
module r2sdf_stage
  import wimax_pkg::*;
#(
  parameter int D      = 1024,
  parameter int OFFSET = 0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  cplx_t x_in,
  input  logic  x_real,
  output cplx_t y_out,
  output logic  y_real
);
  localparam int CW = $clog2(2 * D);
  localparam int PW = (D > 1) ? $clog2(D) : 1;
  localparam real PI = 3.14159265358979323846;

  typedef logic [31:0] tw_arr_t [D];

  function automatic tw_arr_t gen_tw();
    tw_arr_t t;
    for (int j = 0; j < D; j++) begin
      int c, s;
      c = $rtoi($floor(32767.0 * $cos(PI * j / D) + 0.5));
      s = $rtoi($floor(32767.0 * $sin(PI * j / D) + 0.5));
      t[j] = {16'(c), 16'(s)};
    end
    return t;
  endfunction

  localparam tw_arr_t TW = gen_tw();

  function automatic logic signed [15:0] sat16(input logic signed [33:0] v);
    if (v > 34'sd32767)       return 16'sd32767;
    else if (v < -34'sd32768) return -16'sd32768;
    else                      return v[15:0];
  endfunction

  // x/2 rounded half to even, so that the halving adds no bias
  function automatic logic signed [16:0] half_even(input logic signed [16:0] x);
    return (x >>> 1) + $signed({16'b0, x[0] & x[1]});
  endfunction

  logic [32:0]   dl [D];      // {real flag, sample}
  logic [PW-1:0] ptr;
  logic [CW-1:0] cnt;
  logic [32:0]   dl_out, dl_in;
  cplx_t         y_c, a, b, dif;
  logic          y_c_real;
  logic signed [16:0] sr, si, dr, di;
  logic signed [15:0] wr, wi;
  logic signed [33:0] pr, pi_;
  int            j;
  logic          primed;   // every delay-line entry written since reset
  logic          dl_real;

  assign dl_out = dl[ptr];
  assign a      = dl_out[31:0];
  assign dl_real = dl_out[32] & primed;
  assign b      = x_in;

  always_comb begin
    sr  = half_even(17'(a.re) + 17'(b.re));
    si  = half_even(17'(a.im) + 17'(b.im));
    dr  = half_even(17'(a.re) - 17'(b.re));
    di  = half_even(17'(a.im) - 17'(b.im));
    j   = int'(cnt) % D;
    wr  = TW[j][31:16];
    wi  = TW[j][15:0];
    pr  = 34'(dr) * 34'(wr) - 34'(di) * 34'(wi);
    pi_ = 34'(dr) * 34'(wi) + 34'(di) * 34'(wr);
    dif.re = sat16((pr + 34'sd16384) >>> 15);
    dif.im = sat16((pi_ + 34'sd16384) >>> 15);
    if (!cnt[CW-1]) begin
      y_c      = a;
      y_c_real = dl_real;
      dl_in    = {x_real, x_in};
    end else begin
      y_c.re   = sr[15:0];
      y_c.im   = si[15:0];
      y_c_real = dl_real | x_real;
      dl_in    = {dl_real | x_real, (D > 1) ? dif : cplx_t'({dr[15:0], di[15:0]})};
    end
  end

  always_ff @(posedge clk) begin
    if (en) dl[ptr] <= dl_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr    <= '0;
      cnt    <= CW'((2 * D - (OFFSET % (2 * D))) % (2 * D));
      y_out  <= '0;
      y_real <= 1'b0;
      primed <= 1'b0;
    end else if (en) begin
      ptr    <= (D > 1) ? ((int'(ptr) == D - 1) ? '0 : ptr + 1'b1) : '0;
      if (int'(ptr) == D - 1) primed <= 1'b1;
      cnt    <= cnt + 1'b1;
      y_out  <= y_c;
      y_real <= y_c_real;
    end
  end
endmodule
