// tb_stbc_encoder: random carrier pairs; checks the Alamouti matrix-A outputs
// (antenna 0: S0, -S1*; antenna 1: S1, S0*) one clock later, index carried.
module tb_stbc_encoder;
  import wimax_pkg::*;
  logic clk = 0, rst = 1, iv = 0, ov;
  cpair_t din, a0, a1;
  logic [10:0] ii, oi;
  int checks = 0, failures = 0;

  stbc_encoder dut (.clk, .rst, .in_valid(iv), .in_data(din), .in_idx(ii),
                    .out_valid(ov), .ant0(a0), .ant1(a1), .out_idx(oi));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cpair_t d;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      d.even.re = 16'($urandom_range(0, 60000) - 30000);
      d.even.im = 16'($urandom_range(0, 60000) - 30000);
      d.odd.re  = 16'($urandom_range(0, 60000) - 30000);
      d.odd.im  = 16'($urandom_range(0, 60000) - 30000);
      din = d; iv = 1; ii = 11'(n);
      @(negedge clk);
      iv = 0;
      checks++;
      if (!ov || oi !== 11'(n)) failures++;
      checks++;
      if (a0.even.re !== d.even.re || a0.even.im !== d.even.im ||
          a0.odd.re !== -d.odd.re || a0.odd.im !== d.odd.im ||
          a1.even.re !== d.odd.re || a1.even.im !== d.odd.im ||
          a1.odd.re !== d.even.re || a1.odd.im !== -d.even.im) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
