// tb_tx_fifo: random pushes and pops against a queue model on a small FIFO
// (depth 64, burst 16): data order, one-clock read latency, level, empty and
// full flags, and the burst-level in_ready (room for 16 + 4).
module tb_tx_fifo;
  import wimax_pkg::*;
  logic clk = 0, rst = 1, we = 0, re = 0, in_ready, empty, full;
  cplx_t din, dout;
  logic [6:0] level;
  int checks = 0, failures = 0, nfull = 0;
  cplx_t q [$];
  cplx_t expect_q;
  bit pend = 0;

  tx_fifo #(.DEPTH(64), .BURST(16)) dut (.clk, .rst, .wr_en(we), .din, .in_ready,
    .rd_en(re), .dout, .empty, .full, .level);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 20000; n++) begin
      int phase;
      @(negedge clk);
      if (pend) begin
        checks++; if (dout !== expect_q) failures++;
        pend = 0;
      end
      checks++;
      if (int'(level) !== q.size() || empty !== (q.size() == 0) || full !== (q.size() == 64) ||
          in_ready !== (64 - q.size() >= 20)) failures++;
      if (full) nfull++;
      phase = (n / 1000) % 3;    // fill-heavy, drain-heavy, balanced
      we = (q.size() < 64) && ($urandom % 4 < (phase == 0 ? 3 : phase == 1 ? 1 : 2));
      re = ($urandom % 4 < (phase == 1 ? 3 : phase == 0 ? 1 : 2));
      din = cplx_t'($urandom);
      if (re && q.size() > 0) begin
        expect_q = q.pop_front();
        pend = 1;
      end
      if (we) q.push_back(din);
    end
    checks++; if (nfull == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
