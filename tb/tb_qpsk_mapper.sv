// tb_qpsk_mapper: random serial bits in, checks that every second bit yields
// one symbol, one clock later, with I from the first bit and Q from the
// second (0 -> +16384, 1 -> -16384).
module tb_qpsk_mapper;
  import wimax_pkg::*;
  logic clk = 0, rst = 1, bv = 0, bi = 0, sv;
  cplx_t s;
  int checks = 0, failures = 0, nsym = 0;
  bit q [$];

  qpsk_mapper dut (.clk, .rst, .clr(1'b0), .bit_valid(bv), .bit_i(bi), .sym_valid(sv), .sym(s));
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && sv) begin
    bit b0, b1;
    b0 = q.pop_front(); b1 = q.pop_front();
    checks++;
    if (s.re !== (b0 ? -16'sd16384 : 16'sd16384) || s.im !== (b1 ? -16'sd16384 : 16'sd16384)) failures++;
    nsym++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      bv = ($urandom % 4) !== 0;
      bi = $urandom;
      if (bv) q.push_back(bi);
    end
    @(negedge clk); bv = 0;
    repeat (4) @(posedge clk);
    checks++; if (q.size() > 1) failures++;
    checks++; if (nsym < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
