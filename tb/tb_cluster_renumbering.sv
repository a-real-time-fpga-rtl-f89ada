// tb_cluster_renumbering: writes a symbol pair whose values are their logical
// data index and checks that physical position 12P+d reads logical cluster
// RENUM[P] (the standard's renumbering sequence, listed here a second time),
// carrier d; also that the table is a permutation of 0..119.
module tb_cluster_renumbering;
  import wimax_pkg::*;
  logic clk = 0, rst = 1, iv = 0, in_ready, ov;
  cpair_t din, dout;
  logic [10:0] oi;
  int checks = 0, failures = 0, q = 0, pairs = 0;
  int renum [120] = '{
    6, 108, 37, 81, 31, 100, 42, 116, 32, 107, 30, 93, 54, 78, 10, 75, 50, 111,
    58, 106, 23, 105, 16, 117, 39, 95, 7, 115, 25, 119, 53, 71, 22, 98, 28, 79,
    17, 63, 27, 72, 29, 86, 5, 101, 49, 104, 9, 68, 1, 73, 36, 74, 43, 62, 20,
    84, 52, 64, 34, 60, 66, 48, 97, 21, 91, 40, 102, 56, 92, 47, 90, 33, 114,
    18, 70, 15, 110, 51, 118, 46, 83, 45, 76, 57, 99, 35, 67, 55, 85, 59, 113,
    11, 82, 38, 88, 19, 77, 3, 87, 12, 89, 26, 65, 41, 109, 44, 69, 8, 61, 13,
    96, 14, 103, 2, 80, 24, 112, 4, 94, 0};

  cluster_renumbering dut (.clk, .rst, .in_valid(iv), .in_data(din), .in_ready,
                           .out_ready(1'b1), .out_valid(ov), .out_data(dout), .out_idx(oi));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst && ov) begin
    checks++;
    if (int'(oi) !== q || int'(dout.even.re) !== renum[q / 12] * 12 + q % 12 ||
        int'(dout.odd.re) !== renum[q / 12] * 12 + q % 12 + 3000) failures++;
    if (q == 1439) begin q = 0; pairs++; end else q++;
  end

  initial begin
    bit seen [120];
    foreach (renum[i]) begin
      checks++;
      if (seen[renum[i]]) failures++;
      seen[renum[i]] = 1;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int p = 0; p < 1440; p++) begin
      @(negedge clk);
      iv = 1;
      din.even = '{re: 16'(p), im: 16'sd0};
      din.odd  = '{re: 16'(p + 3000), im: 16'sd0};
    end
    @(negedge clk); iv = 0;
    wait (pairs == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
