// pilot_insertion: memory stage that builds the full 2048-carrier OFDM symbols
// (one per transmit antenna). It stores the 1440 data-carrier pairs of a
// symbol pair in physical order and reads them out twice, once per symbol,
// one carrier per clock, inserting on the fly:
//   guard nulls  logical carriers 0..183 and 1865..2047
//   DC null      logical carrier 1024
//   pilots       in each 14-carrier cluster at offsets 4 and 8 in the even
//                symbol of the pair and 0 and 12 in the odd one, value
//                +PILOT_AMP (4/3 of the data magnitude; the sign is set later
//                by the weighting stage)
// Carriers are read in iFFT order, starting at DC (iFFT bin f carries logical
// carrier f XOR 1024), so the following iFFT gets its natural input order.
// Each output carries its logical carrier number `out_pos`.
// Handshake: `out_ready` is checked before each symbol (2048 clocks) and the
// symbol is then read without gaps; output is valid two clocks after a symbol
// read starts. DC position, pilot count and the read-side insertion follow
// the document; pilot offsets and amplitude follow IEEE 802.16e.
module pilot_insertion
  import wimax_pkg::*;
#(
  parameter int PILOT_AMP = 30893
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cpair_t      in_data,
  output logic        in_ready,
  input  logic        out_ready,
  output logic        out_valid,
  output cplx_t       out_data,
  output logic [10:0] out_pos,
  output logic        out_odd
);
  typedef enum logic [1:0] {K_NULL, K_PILOT, K_DATA} kind_e;

  logic [10:0] wcnt, f, pos, raddr, dcount;
  logic        sym_t, reading, rd_last, rd_avail, rd_bank, rel;
  kind_e       kind, kind_q;
  logic        rd_en_q, t_q;
  logic [10:0] pos_q;
  cpair_t      rd_data;
  int          u, r, c, d;

  always_ff @(posedge clk) begin
    if (rst)           wcnt <= '0;
    else if (in_valid) wcnt <= (int'(wcnt) == N_DATA - 1) ? '0 : wcnt + 1'b1;
  end

  // carrier classification of the carrier being read
  always_comb begin
    pos   = f ^ 11'd1024;
    kind  = K_NULL;
    raddr = '0;
    u = 0; r = 0; c = 0; d = 0;
    if (int'(pos) >= LEFT_GUARD && int'(pos) <= LAST_USED && int'(pos) != DC_POS) begin
      u = int'(pos) - LEFT_GUARD - ((int'(pos) > DC_POS) ? 1 : 0);
      c = u / CLUSTER_LEN;
      r = u % CLUSTER_LEN;
      if (!sym_t) begin
        if (r == 4 || r == 8) kind = K_PILOT;
        else begin
          kind = K_DATA;
          d = (r < 4) ? r : (r < 8) ? r - 1 : r - 2;
        end
      end else begin
        if (r == 0 || r == 12) kind = K_PILOT;
        else begin
          kind = K_DATA;
          d = (r < 12) ? r - 1 : r - 2;
        end
      end
      raddr = 11'(c * 12 + d);
    end
  end

  assign rd_last = reading && sym_t && (f == 11'd2047);

  adaptive_memory_block #(.WIDTH(64), .DEPTH(N_DATA)) u_mem (
    .clk, .rst,
    .wr_en(in_valid), .wr_addr(wcnt), .wr_data(in_data),
    .wr_last(int'(wcnt) == N_DATA - 1), .wr_ready(in_ready),
    .rd_avail, .rd_bank, .rd_en(reading), .rd_addr(raddr), .rd_last,
    .rd_data(rd_data), .rd_release(rel)
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
      f       <= '0;
      sym_t   <= 1'b0;
      rd_en_q <= 1'b0;
      kind_q  <= K_NULL;
      pos_q   <= '0;
      t_q     <= 1'b0;
      dcount  <= '0;
    end else begin
      rd_en_q <= reading;
      kind_q  <= kind;
      pos_q   <= pos;
      t_q     <= sym_t;
      if (!reading) begin
        if (rd_avail && out_ready && cool == '0) begin
          reading <= 1'b1;
          f       <= '0;
        end
      end else if (f == 11'd2047) begin
        reading <= 1'b0;          // re-check out_ready before the next symbol
        sym_t   <= !sym_t;
        f       <= '0;
        dcount  <= dcount + 1'b1;
      end else begin
        f <= f + 1'b1;
      end
    end
  end

  assign out_valid = rd_en_q;
  assign out_pos   = pos_q;
  assign out_odd   = t_q;
  always_comb begin
    case (kind_q)
      K_DATA:  out_data = t_q ? rd_data.odd : rd_data.even;
      K_PILOT: out_data = '{re: 16'(PILOT_AMP), im: 16'sd0};
      default: out_data = '0;
    endcase
  end
endmodule
