// tb_interp_fir_x2: the coefficients are designed a second time here (76-tap
// Kaiser-windowed sinc, beta 7.857, cutoff a quarter of the output rate, gain
// 2, 16 fractional bits) and checked for symmetry. The filter is fed one input
// every second clock; every output clock is compared exactly with the
// zero-stuffed convolution y[n] = sum h[t] u[n-t] (>> 4, 12 fractional bits)
// for an impulse, a constant (which must also show gain 1 on both output
// phases) and random data; a large constant checks 14-bit saturation.
module tb_interp_fir_x2;
  localparam int NT = 76;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, iv = 0;
  logic signed [15:0] din = 0;
  logic signed [27:0] full;
  logic signed [13:0] dout;
  int checks = 0, failures = 0;
  longint h [NT];
  longint xs [$];

  interp_fir_x2 dut (.clk, .rst, .in_valid(iv), .din, .dout_full(full), .dout);
  always #5 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real i0(real x);
    real s, tm;
    s = 1.0; tm = 1.0;
    for (int k = 1; k < 40; k++) begin tm = tm * (x / (2.0 * k)) * (x / (2.0 * k)); s += tm; end
    return s;
  endfunction

  // expected output n of the zero-stuffed stream, inputs xs[0..]
  function automatic longint yexp(int n);
    longint acc;
    acc = 0;
    for (int t = 0; t < NT; t++)
      if (n - t >= 0 && ((n - t) % 2 == 0) && (n - t) / 2 < xs.size()) acc += h[t] * xs[(n - t) / 2];
    return acc >>> 4;
  endfunction

  int ny;
  task automatic run(int m0, int m1, output longint ylast);
    for (int m = m0; m < m1; m++) begin
      @(negedge clk); iv = 1; din = 16'(xs[m]);
      @(posedge clk); #1;
      if (m > 0) begin
        checks++; if (full !== yexp(2 * m - 1)) begin failures++; $display("odd m=%0d got %0d exp %0d", m, full, yexp(2 * m - 1)); end
      end
      @(negedge clk); iv = 0;
      @(posedge clk); #1;
      checks++; if (full !== yexp(2 * m)) begin failures++; $display("even m=%0d got %0d exp %0d", m, full, yexp(2 * m)); end
      ylast = full;
    end
  endtask

  initial begin
    longint yl, ya, yb;
    for (int n = 0; n < NT; n++) begin
      real m, a, sc, r, w;
      m = n - 37.5; a = 0.5 * m;
      sc = $sin(PI * a) / (PI * a);
      r = 2.0 * n / (NT - 1) - 1.0;
      w = i0(7.857 * $sqrt(1.0 - r * r)) / i0(7.857);
      h[n] = longint'($floor(sc * w * 65536.0 + 0.5));
    end
    for (int n = 0; n < NT; n++) begin
      checks++; if (h[n] !== h[NT - 1 - n]) failures++;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    // impulse, then a constant of 1000, then random data
    xs.push_back(4096);
    for (int m = 1; m < 45; m++) xs.push_back(0);
    for (int m = 0; m < 60; m++) xs.push_back(1000);
    for (int m = 0; m < 400; m++) xs.push_back(longint'($urandom_range(0, 40000)) - 20000);
    run(0, 104, yl);
    // both phases of the constant: gain 1 (12 fractional bits) within 0.2 %
    ya = yexp(2 * 103); yb = yexp(2 * 103 - 1);
    checks++; if (ya < 4087000 || ya > 4105000 || yb < 4087000 || yb > 4105000) failures++;
    run(104, xs.size(), yl);
    // saturation
    for (int m = 0; m < 60; m++) xs.push_back(28000);
    run(xs.size() - 60, xs.size(), yl);
    checks++; if (dout !== 14'sd8191) begin failures++; $display("sat %0d", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
