// tb_pilot_insertion: writes one symbol pair of tagged data (even symbol:
// data index, odd symbol: data index + 2000) and checks both 2048-carrier
// symbols in iFFT order. The expected symbol is built by walking the carriers
// in frequency order: guard and DC nulls, pilots at cluster offsets 4/8 (even
// symbol) or 0/12 (odd symbol), and data filled in order between them.
// Also checks 240 pilots per symbol and gap-free 2048-clock symbols.
module tb_pilot_insertion;
  import wimax_pkg::*;
  logic clk = 0, rst = 1, iv = 0, in_ready, out_ready = 1, ov, odd;
  cpair_t din;
  cplx_t dout;
  logic [10:0] pos;
  int checks = 0, failures = 0, f = 0, sym = 0, npilot = 0, run = 0, maxrun = 0;
  cplx_t expv [2][2048];

  pilot_insertion dut (.clk, .rst, .in_valid(iv), .in_data(din), .in_ready, .out_ready,
                       .out_valid(ov), .out_data(dout), .out_pos(pos), .out_odd(odd));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++) begin
      int q;
      q = 0;
      for (int c = 0; c < 2048; c++) expv[t][c] = '0;
      for (int cl = 0; cl < 120; cl++)
        for (int r = 0; r < 14; r++) begin
          int u, c;
          u = cl * 14 + r;
          c = 184 + u + ((u >= 840) ? 1 : 0);
          if ((t == 0 && (r == 4 || r == 8)) || (t == 1 && (r == 0 || r == 12)))
            expv[t][c] = '{re: 16'sd30893, im: 16'sd0};
          else begin
            expv[t][c] = '{re: 16'(q + 2000 * t), im: 16'sd1};
            q++;
          end
        end
    end
  end

  always @(posedge clk) if (!rst) begin
    if (ov) begin
      int c;
      c = f ^ 1024;
      checks++;
      if (int'(pos) !== c || odd !== 1'(sym) || dout !== expv[sym][c]) begin failures++; if (failures < 4) $display("sym %0d c %0d got %0d %0d exp %0d %0d", sym, c, dout.re, dout.im, expv[sym][c].re, expv[sym][c].im); end
      if (dout.re == 16'sd30893) npilot++;
      run++; if (run > maxrun) maxrun = run;
      if (f == 2047) begin
        f = 0; sym++;
        checks++; if (npilot !== 240) failures++;
        npilot = 0;
      end else f++;
    end else run = 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int p = 0; p < 1440; p++) begin
      @(negedge clk);
      iv = 1;
      din.even = '{re: 16'(p), im: 16'sd1};
      din.odd  = '{re: 16'(p + 2000), im: 16'sd1};
    end
    @(negedge clk); iv = 0;
    wait (sym == 2);
    checks++; if (maxrun < 2048) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
