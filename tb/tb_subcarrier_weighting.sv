// tb_subcarrier_weighting: runs its own x^11+x^9+1 generator (all-ones seed,
// stepped once per carrier from 184 to 1864, kept as a bit queue rather than a
// shift register) and checks that exactly the carriers with w_k = 1 come out
// inverted, for carriers presented in random order, one clock later.
module tb_subcarrier_weighting;
  import wimax_pkg::*;
  logic clk = 0, rst = 1, iv = 0, ov;
  cplx_t din, dout;
  logic [10:0] pos;
  int checks = 0, failures = 0, ninv = 0;
  bit w [2048];

  subcarrier_weighting dut (.clk, .rst, .in_valid(iv), .in_data(din), .in_pos(pos),
                            .out_valid(ov), .out_data(dout));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit hist [$];
    // generator history: 11 seed ones, then b[n] = b[n-11] ^ b[n-9]
    for (int i = 0; i < 11; i++) hist.push_back(1'b1);
    for (int c = 184; c <= 1864; c++) begin
      int n;
      n = hist.size();
      hist.push_back(hist[n - 11] ^ hist[n - 9]);
      w[c] = hist[n];
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 6000; i++) begin
      int c;
      cplx_t x;
      c = (i < 2048) ? i : $urandom_range(0, 2047);
      x.re = 16'($urandom_range(0, 40000) - 20000);
      x.im = 16'($urandom_range(0, 40000) - 20000);
      @(negedge clk);
      iv = 1; pos = 11'(c); din = x;
      @(negedge clk);
      iv = 0;
      checks++;
      if (!ov) failures++;
      if (w[c]) begin
        ninv++;
        if (dout.re !== -x.re || dout.im !== -x.im) failures++;
      end else if (dout !== x) failures++;
    end
    checks++; if (ninv < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
