// tb_pusc_permutation: writes two symbol pairs whose values are their logical
// data index and checks that read position q holds the logical index whose
// permuted address is q, using the testbench's own evaluation of the PUSC
// formula, with 1440 consecutive outputs per pair.
module tb_pusc_permutation;
  import wimax_pkg::*;
  logic clk = 0, rst = 1, iv = 0, in_ready, out_ready = 1, ov;
  cpair_t din, dout;
  logic [10:0] ii, oi;
  int checks = 0, failures = 0, q = 0, pairs = 0;
  int inv [1440];
  int pb12 [12] = '{6, 9, 4, 8, 10, 11, 5, 2, 7, 3, 1, 0};
  int pb8 [8] = '{7, 4, 0, 2, 1, 5, 3, 6};
  int nsub [6] = '{12, 8, 12, 8, 12, 8};

  pusc_permutation dut (.clk, .rst, .in_valid(iv), .in_data(din), .in_idx(ii), .in_ready,
                        .out_ready, .out_valid(ov), .out_data(dout), .out_idx(oi));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int j0 = 0, b0 = 0;
    for (int g = 0; g < 6; g++) begin
      for (int s = 0; s < nsub[g]; s++)
        for (int k = 0; k < 24; k++) begin
          int n, a;
          n = (k + 13 * s) % 24;
          a = b0 + nsub[g] * n + ((nsub[g] == 12) ? pb12[(s + n) % 12] : pb8[(s + n) % 8]);
          inv[a] = (j0 + s) * 24 + k;
        end
      j0 += nsub[g];
      b0 += 24 * nsub[g];
    end
  end

  always @(posedge clk) if (!rst && ov) begin
    checks++;
    if (int'(oi) !== q || int'(dout.even.re) !== inv[q] || int'(dout.odd.im) !== inv[q] + 2000 ||
        int'(dout.even.im) !== pairs) failures++;
    if (q == 1439) begin q = 0; pairs++; end else q++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      checks++; if (!in_ready) failures++;
      for (int p = 0; p < 1440; p++) begin
        @(negedge clk);
        iv = 1; ii = 11'(p);
        din.even.re = 16'(p); din.even.im = 16'(k);
        din.odd.re = 16'(k); din.odd.im = 16'(p + 2000);
      end
      @(negedge clk); iv = 0;
    end
    wait (pairs == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
