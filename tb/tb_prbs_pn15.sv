// tb_prbs_pn15: checks the PN15 generator against the properties of the
// x^15+x^14+1 m-sequence, worked out without the generator's register:
// the first 15 bits are the all-ones seed, every later bit is the XOR of the
// bits 14 and 15 places back, the period is 32767 with 16384 ones, and a
// load restarts the sequence.
module tb_prbs_pn15;
  logic clk = 0, rst = 1, en = 0, load = 0, b;
  int checks = 0, failures = 0;
  bit seq [70000];
  int ones;

  prbs_pn15 dut (.clk, .rst, .en, .load, .bit_o(b));
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    en  <= 1;
    for (int n = 0; n < 70000; n++) begin
      @(negedge clk);
      seq[n] = b;
    end
    for (int n = 0; n < 15; n++) begin
      checks++;
      if (seq[n] !== 1'b1) failures++;
    end
    for (int n = 15; n < 70000; n++) begin
      checks++;
      if (seq[n] !== (seq[n-14] ^ seq[n-15])) failures++;
    end
    ones = 0;
    for (int n = 0; n < 32767; n++) ones += seq[n];
    checks++; if (ones !== 16384) failures++;
    for (int n = 0; n < 1000; n++) begin
      checks++;
      if (seq[n] !== seq[n + 32767]) failures++;
    end
    // the sequence is not shorter than 32767: no repeat of the first 15 bits
    // (15 ones) earlier than that
    for (int p = 1; p < 32767; p += 97) begin
      bit same = 1;
      for (int n = 0; n < 15; n++) if (seq[p+n] !== 1'b1) same = 0;
      checks++; if (same) failures++;
    end
    // restart with load, holding en low
    @(negedge clk); en = 0; load = 1;
    @(negedge clk); load = 0; en = 1;
    for (int n = 0; n < 40; n++) begin
      checks++;
      if (b !== seq[n]) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
