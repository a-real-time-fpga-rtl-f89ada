// interp_fir_x2: interpolate-by-two low-pass FIR for one real stream (I or Q
// of one antenna; the transmitter has four). It runs on the 2x clock
// (44.8 MHz) and takes a new input sample whenever `in_valid` is high, which
// the transmitter raises every second clock. The 76-tap symmetric filter is
// split into its two polyphase halves: right after an input, output phase 0
// is sum h[2i]*x[n-i]; on the next clock phase 1 is sum h[2i+1]*x[n-i]
// (i = 0..37). Because h is symmetric, phase 1 uses phase 0's taps reversed.
// One output per clock, registered (valid one clock after its phase).
// Coefficients: Kaiser-windowed sinc, cutoff at a quarter of the output rate
// (11.2 MHz), beta 7.86 (80 dB), gain 2 to make up for the zero stuffing,
// quantized to COEF_W bits with 16 fractional bits, computed at elaboration.
// The full-precision result is brought to 28 bits (`dout_full`, 12 fractional
// bits) and `dout` keeps bits [TRUNC+13:TRUNC] of it with saturation, taken
// from the wider sum, so it stays correct where the 28-bit word would wrap
// (steps close to full scale overshoot by about 9 %).
// From the document: x2 interpolation, 76 symmetric taps, 80 dB, 28-bit
// result truncated to 14 bits. The window design, the fixed point and the
// plain multiply-accumulate form (instead of distributed arithmetic) are this
// design's.
module interp_fir_x2 #(
  parameter int NTAPS  = 76,
  parameter int COEF_W = 18,
  parameter int TRUNC  = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic signed [15:0] din,
  output logic signed [27:0] dout_full,
  output logic signed [13:0] dout
);
  localparam int  NPH  = NTAPS / 2;
  localparam real PI   = 3.14159265358979323846;
  localparam real BETA = 7.857;

  typedef logic signed [COEF_W-1:0] coef_arr_t [NTAPS];

  function automatic real bessel_i0(input real x);
    real sum, term;
    sum  = 1.0;
    term = 1.0;
    for (int k = 1; k < 40; k++) begin
      term = term * (x / (2.0 * k)) * (x / (2.0 * k));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic coef_arr_t gen_coef();
    coef_arr_t h;
    real m, arg, sinc, w, r;
    for (int n = 0; n < NTAPS; n++) begin
      m    = n - (NTAPS - 1) / 2.0;
      arg  = 0.5 * m;
      sinc = (arg == 0.0) ? 1.0 : $sin(PI * arg) / (PI * arg);
      r    = 2.0 * n / (NTAPS - 1) - 1.0;
      w    = bessel_i0(BETA * $sqrt(1.0 - r * r)) / bessel_i0(BETA);
      h[n] = COEF_W'($rtoi($floor(sinc * w * 65536.0 + 0.5)));
    end
    return h;
  endfunction

  localparam coef_arr_t H = gen_coef();

  logic signed [15:0] x [NPH];
  logic               phase;
  logic signed [41:0] acc;
  logic signed [41:0] acc_sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NPH; i++) x[i] <= '0;
      phase <= 1'b0;
    end else if (in_valid) begin
      x[0] <= din;
      for (int i = 1; i < NPH; i++) x[i] <= x[i-1];
      phase <= 1'b0;
    end else begin
      phase <= 1'b1;
    end
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < NPH; i++)
      acc += 42'(x[i]) * 42'(H[2 * i + int'(phase)]);
    acc_sh = acc >>> 4;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout_full <= '0;
      dout      <= '0;
    end else begin
      dout_full <= acc_sh[27:0];
      if ((acc_sh >>> TRUNC) > 42'sd8191)       dout <= 14'sd8191;
      else if ((acc_sh >>> TRUNC) < -42'sd8192) dout <= -14'sd8192;
      else                                      dout <= 14'(acc_sh >>> TRUNC);
    end
  end
endmodule
