// tb_adaptive_memory_block: fills both banks at scrambled addresses, checks
// the ready/available flags (writer blocked when both banks are full, reader
// sees a bank only once it is complete), reads every bank back in address
// order against a model, and checks the release pulse and the one-clock read
// latency.
module tb_adaptive_memory_block;
  localparam int D = 40;
  logic clk = 0, rst = 1;
  logic we = 0, wl = 0, wr_ready, rd_avail, rd_bank, re = 0, rl = 0, rel;
  logic [5:0] wa, ra;
  logic [15:0] wd, rd;
  int checks = 0, failures = 0, nrel = 0;
  logic [15:0] model [2][D];

  adaptive_memory_block #(.WIDTH(16), .DEPTH(D)) dut (
    .clk, .rst, .wr_en(we), .wr_addr(wa), .wr_data(wd), .wr_last(wl), .wr_ready,
    .rd_avail, .rd_bank, .rd_en(re), .rd_addr(ra), .rd_last(rl), .rd_data(rd), .rd_release(rel));
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && rel) nrel++;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic fill(int b);
    for (int i = 0; i < D; i++) begin
      int a;
      a = (i * 7 + 3) % D;
      @(negedge clk);
      checks++; if (!wr_ready) failures++;
      checks++; if (i > 0 && rd_avail && b == 0) failures++;
      we = 1; wa = 6'(a); wd = 16'($urandom); wl = (i == D - 1);
      model[b][a] = wd;
    end
    @(negedge clk); we = 0; wl = 0;
  endtask

  task automatic drain(int b);
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      re = 1; ra = 6'(i); rl = (i == D - 1);
      @(posedge clk); #1;
      checks++; if (rd !== model[b][i]) failures++;
    end
    @(negedge clk); re = 0; rl = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    checks++; if (rd_avail || !wr_ready) failures++;
    fill(0);
    checks++; if (!rd_avail || !wr_ready) failures++;
    fill(1);
    checks++; if (!rd_avail || wr_ready) failures++;   // both full: writer blocked
    drain(0);
    @(negedge clk);
    checks++; if (!wr_ready || !rd_avail || nrel !== 1) failures++;
    drain(1);
    @(negedge clk);
    checks++; if (rd_avail || nrel !== 2) failures++;
    fill(0);
    drain(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
