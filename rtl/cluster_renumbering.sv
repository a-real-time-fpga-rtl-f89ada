// cluster_renumbering: memory stage that performs the PUSC clustering step
// (one per transmit antenna). Data arrives in logical order: logical cluster
// L holds data carriers 12L .. 12L+11. Physical cluster P (its position in
// frequency) must carry logical cluster RENUM[P]; so the stage writes the
// 1440 carrier pairs of a symbol pair in arrival order and, once the bank is
// full, reads physical data index i = 12P + d from address 12*RENUM[P] + d.
// RENUM is the 120-entry renumbering sequence of the IEEE 802.16e 2048-FFT
// downlink PUSC zone; the document only says a predefined renumbering
// sequence is used, so the table is taken from the standard.
// Handshake and timing as in pusc_permutation.
module cluster_renumbering
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cpair_t      in_data,
  output logic        in_ready,
  input  logic        out_ready,
  output logic        out_valid,
  output cpair_t      out_data,
  output logic [10:0] out_idx
);
  localparam int RENUM [120] = '{
    6, 108, 37, 81, 31, 100, 42, 116, 32, 107, 30, 93, 54, 78, 10, 75, 50, 111,
    58, 106, 23, 105, 16, 117, 39, 95, 7, 115, 25, 119, 53, 71, 22, 98, 28, 79,
    17, 63, 27, 72, 29, 86, 5, 101, 49, 104, 9, 68, 1, 73, 36, 74, 43, 62, 20,
    84, 52, 64, 34, 60, 66, 48, 97, 21, 91, 40, 102, 56, 92, 47, 90, 33, 114,
    18, 70, 15, 110, 51, 118, 46, 83, 45, 76, 57, 99, 35, 67, 55, 85, 59, 113,
    11, 82, 38, 88, 19, 77, 3, 87, 12, 89, 26, 65, 41, 109, 44, 69, 8, 61, 13,
    96, 14, 103, 2, 80, 24, 112, 4, 94, 0};

  logic [10:0] wcnt, ridx, ridx_q, raddr;
  logic [6:0]  pcl;   // physical cluster being read
  logic [3:0]  dof;   // data carrier within it
  logic        rd_avail, rd_bank, rel, reading, rd_last, rd_en_q;

  always_ff @(posedge clk) begin
    if (rst)           wcnt <= '0;
    else if (in_valid) wcnt <= (int'(wcnt) == N_DATA - 1) ? '0 : wcnt + 1'b1;
  end

  assign raddr   = 11'(RENUM[pcl] * 12 + int'(dof));
  assign rd_last = reading && (int'(ridx) == N_DATA - 1);

  adaptive_memory_block #(.WIDTH(64), .DEPTH(N_DATA)) u_mem (
    .clk, .rst,
    .wr_en(in_valid), .wr_addr(wcnt), .wr_data(in_data),
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
      ridx    <= '0;
      pcl     <= '0;
      dof     <= '0;
      rd_en_q <= 1'b0;
      ridx_q  <= '0;
    end else begin
      rd_en_q <= reading;
      ridx_q  <= ridx;
      if (!reading) begin
        if (rd_avail && out_ready && cool == '0) begin
          reading <= 1'b1;
          ridx    <= '0;
          pcl     <= '0;
          dof     <= '0;
        end
      end else if (rd_last) reading <= 1'b0;
      else begin
        ridx <= ridx + 1'b1;
        if (dof == 4'd11) begin
          dof <= '0;
          pcl <= pcl + 1'b1;
        end else dof <= dof + 1'b1;
      end
    end
  end

  assign out_valid = rd_en_q;
  assign out_idx   = ridx_q;
endmodule
