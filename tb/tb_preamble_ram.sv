// tb_preamble_ram: writes random samples to all 2304 words, then reads them
// back in random order, data the clock after the address.
module tb_preamble_ram;
  import wimax_pkg::*;
  logic clk = 0, we = 0;
  logic [11:0] wa, ra;
  cplx_t wd, rd;
  cplx_t model [2304];
  int checks = 0, failures = 0;

  preamble_ram dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 2304; a++) begin
      @(negedge clk);
      we = 1; wa = 12'(a); wd = cplx_t'($urandom); model[a] = wd;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 5000; n++) begin
      int a;
      a = $urandom_range(0, 2303);
      ra = 12'(a);
      @(negedge clk);
      checks++; if (rd !== model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
