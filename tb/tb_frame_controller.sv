// tb_frame_controller: small frame (2 symbols of 8 samples, 20 clocks of
// silence) with FIFOs and preamble RAMs modelled in the testbench. Checks the
// exact output sequence over three frames: silence zeros, preamble words
// 0..7, then the FIFO samples in order, antenna 1 in step with antenna 0;
// the frame_start pulse position and period; and, with the FIFO running dry
// in the third frame, zero output and the underrun count.
module tb_frame_controller;
  import wimax_pkg::*;
  localparam int NS = 2, SY = 8, SIL = 20, FR = SIL + SY + NS * SY;
  logic clk = 0, rst = 1;
  logic [1:0] fifo_rd, fifo_empty;
  cplx_t fifo_dout [2], pre_rdata [2], od [2];
  logic [2:0] pre_raddr;
  logic ov, fs, indata;
  logic [31:0] underruns, frames;
  int checks = 0, failures = 0, fifo_cnt = 0, fifo_avail = 0, t = 0, nfs = 0, popped = 0;

  frame_controller #(.N_SYM(NS), .SYM(SY), .SILENCE_LEN(SIL)) dut (
    .clk, .rst, .fifo_rd, .fifo_dout, .fifo_empty, .pre_raddr, .pre_rdata,
    .out_valid(ov), .out_data(od), .frame_start(fs), .in_data_part(indata),
    .underruns, .frames);
  always #5 clk = ~clk;

  assign fifo_empty = (fifo_avail == 0) ? 2'b11 : 2'b00;

  // FIFO and RAM models with registered outputs
  always @(posedge clk) begin
    pre_rdata[0] <= '{re: 16'(100 + int'(pre_raddr)), im: 16'sd0};
    pre_rdata[1] <= '{re: 16'(200 + int'(pre_raddr)), im: 16'sd0};
    if (fifo_rd[0]) begin
      fifo_dout[0] <= '{re: 16'(1000 + fifo_cnt), im: 16'sd0};
      fifo_dout[1] <= '{re: 16'(3000 + fifo_cnt), im: 16'sd0};
      fifo_cnt <= fifo_cnt + 1;
      fifo_avail <= fifo_avail - 1;
    end
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected output at output clock t (t = 0 is the first clock after reset)
  always @(posedge clk) if (!rst) begin
    if (t > 0) begin
      int ph, e0, e1;
      ph = (t - 1) % FR;
      if (ph < SIL) begin e0 = 0; e1 = 0; end
      else if (ph < SIL + SY) begin e0 = 100 + ph - SIL; e1 = 200 + ph - SIL; end
      else if (popped < fifo_cnt) begin e0 = 1000 + popped; e1 = 3000 + popped; popped++; end
      else begin e0 = 0; e1 = 0; end
      checks++;
      if (!ov || int'(od[0].re) !== e0 || int'(od[1].re) !== e1) failures++;
      checks++;
      if (fs !== (ph == SIL)) failures++;
    end
    t <= t + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    fifo_avail = 2 * NS * SY;       // two frames' worth
    rst <= 0;
    repeat (3 * FR + 2) @(posedge clk);
    #1;
    checks++; if (frames !== 3) failures++;
    checks++; if (underruns !== NS * SY) failures++;   // third frame had nothing
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
