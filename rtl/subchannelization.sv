// subchannelization: the first memory stage. It spreads the QPSK stream over
// two consecutive OFDM symbols in an interleaved way: symbols 0..23 of the
// stream go to carriers 0..23 of symbol 2l, 24..47 to carriers 0..23 of symbol
// 2l+1, 48..71 to carriers 24..47 of symbol 2l, and so on, so that each
// subchannel of 24 carriers spans a two-symbol slot. After 2880 inputs the
// pair is complete and is read out carrier by carrier, both symbols at once
// (one carrier per clock), which is what the space-time coder needs.
// Storage is two adaptive memory blocks, one per symbol of the pair, each
// with two banks so the next pair is written while this one is read.
// Handshake: `in_ready` and `out_ready` are burst-level. A source starts a
// 2880-symbol burst only while in_ready is high; this stage starts a
// 1440-carrier read burst only while out_ready is high and then runs it to the
// end at one carrier per clock. Output is valid two clocks after the read
// burst starts. The interleaving follows the document; the storage scheme is
// this design's.
module subchannelization
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        in_ready,
  input  logic        out_ready,
  output logic        out_valid,
  output cpair_t      out_data,
  output logic [10:0] out_idx
);
  localparam int AW = $clog2(N_DATA);

  // write side: stream counter split into (group of 24, symbol select, base)
  logic [4:0]    c24;
  logic          sel;
  logic [AW-1:0] base;
  logic [1:0]    wr_ready_s, rd_avail_s, rd_bank_s, rel_s;
  logic [31:0]   rd_data_s [2];

  // read side
  logic          reading;
  logic [AW-1:0] raddr;
  logic          rd_en, rd_last;
  logic          rd_en_q;
  logic [AW-1:0] raddr_q;

  wire wr_last_even = in_valid && !sel && (int'(base) + int'(c24) == N_DATA - 1);
  wire wr_last_odd  = in_valid &&  sel && (int'(base) + int'(c24) == N_DATA - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      c24  <= '0;
      sel  <= 1'b0;
      base <= '0;
    end else if (in_valid) begin
      if (c24 == 5'd23) begin
        c24 <= '0;
        sel <= !sel;
        if (sel) base <= (int'(base) + 24 == N_DATA) ? '0 : base + AW'(24);
      end else begin
        c24 <= c24 + 5'd1;
      end
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_sym
    adaptive_memory_block #(.WIDTH(32), .DEPTH(N_DATA)) u_mem (
      .clk, .rst,
      .wr_en     (in_valid && (sel == 1'(b))),
      .wr_addr   (base + AW'(c24)),
      .wr_data   (in_data),
      .wr_last   (b == 0 ? wr_last_even : wr_last_odd),
      .wr_ready  (wr_ready_s[b]),
      .rd_avail  (rd_avail_s[b]),
      .rd_bank   (rd_bank_s[b]),
      .rd_en     (rd_en),
      .rd_addr   (raddr),
      .rd_last   (rd_last),
      .rd_data   (rd_data_s[b]),
      .rd_release(rel_s[b])
    );
  end

  assign in_ready = &wr_ready_s;
  assign rd_en    = reading;
  assign rd_last  = reading && (int'(raddr) == N_DATA - 1);

  // After a burst, wait until its last words have reached the next stage
  // before looking at that stage's ready again (it may be about to fill up).
  logic [2:0] cool;
  always_ff @(posedge clk) begin
    if (rst)          cool <= '0;
    else if (rd_last) cool <= 3'd4;
    else if (cool != '0) cool <= cool - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reading <= 1'b0;
      raddr   <= '0;
      rd_en_q <= 1'b0;
      raddr_q <= '0;
    end else begin
      rd_en_q <= rd_en;
      raddr_q <= raddr;
      if (!reading) begin
        if (&rd_avail_s && out_ready && cool == '0) begin
          reading <= 1'b1;
          raddr   <= '0;
        end
      end else if (rd_last) begin
        reading <= 1'b0;
      end else begin
        raddr <= raddr + 1'b1;
      end
    end
  end

  assign out_valid     = rd_en_q;
  assign out_data.even = rd_data_s[0];
  assign out_data.odd  = rd_data_s[1];
  assign out_idx       = 11'(raddr_q);
endmodule
