// tb_cp_insertion: feeds three symbols in bit-reversed order (sample n of the
// input carries time index bitrev(n)) and checks that each comes out as
// 2304 consecutive samples: time indices 1792..2047 (the prefix), then
// 0..2047. Also checks that out_ready holds a symbol back and that each
// released bank gives one buf_free pulse.
module tb_cp_insertion;
  import wimax_pkg::*;
  logic clk = 0, rst = 1, iv = 0, in_ready, out_ready = 0, ov, bfree;
  cplx_t din, dout;
  int checks = 0, failures = 0, i = 0, sym = 0, nfree = 0, run = 0, maxrun = 0;

  cp_insertion dut (.clk, .rst, .in_valid(iv), .in_data(din), .in_ready, .out_ready,
                    .out_valid(ov), .out_data(dout), .buf_free(bfree));
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && bfree) nfree++;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (ov) begin
      int e;
      e = (i < 256) ? 1792 + i : i - 256;
      checks++;
      if (int'(dout.re) !== e || int'(dout.im) !== sym) failures++;
      run++; if (run > maxrun) maxrun = run;
      if (i == 2303) begin i = 0; sym++; end else i++;
    end else run = 0;
  end

  task automatic send(int s);
    for (int n = 0; n < 2048; n++) begin
      @(negedge clk);
      iv = 1;
      din.re = 16'(bitrev11(11'(n)));
      din.im = 16'(s);
    end
    @(negedge clk); iv = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    send(0);
    send(1);
    repeat (50) @(posedge clk);
    checks++; if (sym !== 0 || in_ready) failures++;   // held by out_ready, both banks full
    out_ready = 1;
    wait (sym == 1);
    send(2);
    wait (sym == 3);
    repeat (5) @(posedge clk);
    checks++; if (nfree !== 3) failures++;
    checks++; if (maxrun < 2304) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
