// tb_ifft_r2sdf: sends four 2048-point symbols, each with 24 random nonzero
// bins of amplitude up to 16384, and compares every output sample with a
// direct inverse DFT (scaled by 1/2048) evaluated in real arithmetic: output
// n of a symbol must be x[bitrev(n)] within 12 LSB. Symbols 0-1 and 2-3 go
// back to back, with a long pause between 1 and 2 so that the pipeline must
// flush by itself; credits are returned one per finished output symbol.
// Also checks the latency (2058 clocks from the edge that takes the first input to the one that shows the first output) and
// that a flush window happened.
module tb_ifft_r2sdf;
  import wimax_pkg::*;
  localparam int N = 2048;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, iv = 0, in_ready, credit = 0, ov, flush;
  cplx_t din, dout;
  int checks = 0, failures = 0, n_out = 0, sym_out = 0, nflush = 0, maxerr = 0;
  longint t_in0 = -1, t_out0 = -1, cyc = 0;
  int kbin [4][24];
  real vre [4][24], vim [4][24];

  ifft_r2sdf dut (.clk, .rst, .in_valid(iv), .in_ready, .in_data(din), .credit_ret(credit),
                  .out_valid(ov), .out_data(dout), .flush_window(flush));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (!rst && flush) nflush++;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic cplx_t spectrum(int s, int k);
    cplx_t c;
    c = '0;
    for (int i = 0; i < 24; i++)
      if (kbin[s][i] == k) begin
        c.re = 16'($rtoi(vre[s][i]));
        c.im = 16'($rtoi(vim[s][i]));
      end
    return c;
  endfunction

  always @(posedge clk) if (!rst) begin
    credit <= 1'b0;
    if (ov) begin
      int m;
      real er, ei;
      if (t_out0 < 0) t_out0 = cyc;
      m = int'(bitrev11(11'(n_out)));
      er = 0.0; ei = 0.0;
      for (int i = 0; i < 24; i++) begin
        real a;
        a = 2.0 * PI * kbin[sym_out][i] * m / N;
        er += ($itor($rtoi(vre[sym_out][i])) * $cos(a) - $itor($rtoi(vim[sym_out][i])) * $sin(a)) / N;
        ei += ($itor($rtoi(vre[sym_out][i])) * $sin(a) + $itor($rtoi(vim[sym_out][i])) * $cos(a)) / N;
      end
      checks++;
      if (rabs($itor(dout.re) - er) > 12.0 || rabs($itor(dout.im) - ei) > 12.0) failures++;
      if (n_out == N - 1) begin
        n_out = 0; sym_out++;
        credit <= 1'b1;
      end else n_out++;
    end
  end

  task automatic send(int s);
    wait (in_ready);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      iv = 1; din = spectrum(s, k);
      if (t_in0 < 0) t_in0 = cyc;
    end
    @(negedge clk); iv = 0;
  endtask

  initial begin
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 24; i++) begin
        kbin[s][i] = (s == 0 && i == 0) ? 0 : $urandom_range(0, N - 1);
        vre[s][i]  = $itor($urandom_range(0, 32768)) - 16384.0;
        vim[s][i]  = $itor($urandom_range(0, 32768)) - 16384.0;
      end
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (20) @(posedge clk);
    // symbols 0 and 1 back to back (no idle clock between them)
    wait (in_ready);
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        iv = 1; din = spectrum(s, k);
        if (t_in0 < 0) t_in0 = cyc;
      end
    @(negedge clk); iv = 0;
    wait (sym_out == 2);
    repeat (100) @(posedge clk);
    send(2);
    send(3);
    wait (sym_out == 4);
    repeat (10) @(posedge clk);
    checks++; if (t_out0 - t_in0 !== 2059) failures++;  // 2058 clocks, counted from the clock before the first input edge
    checks++; if (nflush == 0) failures++;
    $display("latency %0d flush clocks %0d", t_out0 - t_in0, nflush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
