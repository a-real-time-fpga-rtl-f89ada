// tb_subchannelization: streams three symbol pairs (each QPSK symbol tagged
// with its stream number) and checks that carrier p of the even symbol holds
// stream symbol 48*(p/24) + p mod 24 and the odd symbol that plus 24, that a
// pair comes out as 1440 consecutive clocks, that the writer is held off when
// both banks are full, and the read latency of two clocks.
module tb_subchannelization;
  import wimax_pkg::*;
  logic clk = 0, rst = 1, iv = 0, in_ready, out_ready = 0, ov;
  cplx_t din;
  cpair_t dout;
  logic [10:0] oi;
  int checks = 0, failures = 0, pair_out = 0, p = 0, run = 0, maxrun = 0;
  int t_start, t_first;

  subchannelization dut (.clk, .rst, .in_valid(iv), .in_data(din), .in_ready,
                         .out_ready, .out_valid(ov), .out_data(dout), .out_idx(oi));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (ov) begin
      int n0;
      n0 = 48 * (p / 24) + p % 24;
      checks++;
      if (int'(oi) !== p || dout.even.re !== 16'(n0) || dout.odd.re !== 16'(n0 + 24) ||
          dout.even.im !== 16'(pair_out) || dout.odd.im !== 16'(pair_out)) failures++;
      run++;
      if (run > maxrun) maxrun = run;
      if (p == 1439) begin p = 0; pair_out++; end else p++;
    end else run = 0;
  end

  task automatic send_pair(int k);
    for (int n = 0; n < 2880; n++) begin
      @(negedge clk);
      iv = 1; din.re = 16'(n); din.im = 16'(k);
      @(negedge clk);
      iv = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    send_pair(0);
    @(negedge clk);
    checks++; if (!in_ready) failures++;
    send_pair(1);
    @(negedge clk);
    checks++; if (in_ready) failures++;       // both banks full
    out_ready = 1; t_start = $time;
    wait (ov); t_first = $time;
    checks++; if ((t_first - t_start) / 10 > 3) failures++;
    wait (pair_out == 1);
    @(negedge clk);
    checks++; if (!in_ready) failures++;
    send_pair(2);
    wait (pair_out == 3);
    repeat (3) @(posedge clk);
    checks++; if (maxrun < 1440) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
