// pusc_permutation: memory stage that applies the PUSC subcarrier permutation
// (one per transmit antenna). Each incoming carrier pair (the two symbols of a
// slot column, as the space-time coder delivers them) comes with its logical
// data index; pusc_perm_index turns that into the data-carrier address inside
// the major group's clusters, and the pair is written there, so the reordering
// costs no clock. When all 1440 carriers of the pair are written, the bank is
// read out in address order, one pair per clock, with the read data index.
// Handshake as in all memory stages: `in_ready` / `out_ready` are checked at
// burst start only; output is valid two clocks after a read burst starts.
// The write-side permutation follows the document; banking is this design's.
module pusc_permutation
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cpair_t      in_data,
  input  logic [10:0] in_idx,
  output logic        in_ready,
  input  logic        out_ready,
  output logic        out_valid,
  output cpair_t      out_data,
  output logic [10:0] out_idx
);
  logic [10:0] waddr, wcnt, raddr, raddr_q;
  logic        rd_avail, rd_bank, rel, reading, rd_last, rd_en_q;

  pusc_perm_index u_idx (.idx(in_idx), .addr(waddr));

  always_ff @(posedge clk) begin
    if (rst)           wcnt <= '0;
    else if (in_valid) wcnt <= (int'(wcnt) == N_DATA - 1) ? '0 : wcnt + 1'b1;
  end

  assign rd_last = reading && (int'(raddr) == N_DATA - 1);

  adaptive_memory_block #(.WIDTH(64), .DEPTH(N_DATA)) u_mem (
    .clk, .rst,
    .wr_en(in_valid), .wr_addr(waddr), .wr_data(in_data),
    .wr_last(int'(wcnt) == N_DATA - 1), .wr_ready(in_ready),
    .rd_avail, .rd_bank, .rd_en(reading), .rd_addr(raddr), .rd_last,
    .rd_data(out_data), .rd_release(rel)
  );

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
      rd_en_q <= reading;
      raddr_q <= raddr;
      if (!reading) begin
        if (rd_avail && out_ready && cool == '0) begin
          reading <= 1'b1;
          raddr   <= '0;
        end
      end else if (rd_last) reading <= 1'b0;
      else                  raddr   <= raddr + 1'b1;
    end
  end

  assign out_valid = rd_en_q;
  assign out_idx   = raddr_q;
endmodule
