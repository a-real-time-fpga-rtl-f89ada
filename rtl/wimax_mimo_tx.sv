// wimax_mimo_tx: real-time 2x2 MIMO-OFDM mobile WiMAX (IEEE 802.16e, 20 MHz,
// 2048-point PUSC downlink) transmitter baseband, from the bit source to the
// four 14-bit DAC streams.
// Chain: PN15 bits (one per clock) -> QPSK -> subchannelization (interleave
// over a symbol pair) -> Alamouti matrix-A coding -> per antenna: PUSC
// permutation -> cluster renumbering -> pilot/DC/guard insertion (read in
// iFFT order) -> carrier weighting -> 2048-point iFFT -> cyclic prefix ->
// output FIFO -> frame controller (silence, preamble, 46 data symbols) ->
// per I and Q: x2 interpolating FIR on the 2x clock -> DAC port.
// Every reordering step is a memory stage built on a two-bank adaptive
// memory block; stages hand data on in whole bursts under burst-level ready
// signals, so a full downstream stage stalls everything upstream of it,
// down to the bit source.
// Clocks: clk_bb is the baseband clock (22.4 MHz: one sample per clock at the
// frame controller), clk_dac is twice it (44.8 MHz) and edge-aligned with it;
// rst is synchronous and must be held for a few clk_bb cycles.
// The preamble RAMs are loaded by the host through pre_we/pre_ant/pre_addr/
// pre_data; the DACs, gain amplifiers and RF stages are outside and connect
// to dac_i/dac_q.
module wimax_mimo_tx
  import wimax_pkg::*;
#(
  parameter int FIFO_DEPTH  = 32768,
  parameter int SILENCE_LEN = 108288,
  parameter int N_SYM       = 46
) (
  input  logic               clk_bb,
  input  logic               clk_dac,
  input  logic               rst,
  // preamble load port (host)
  input  logic               pre_we,
  input  logic               pre_ant,
  input  logic [11:0]        pre_addr,
  input  cplx_t              pre_data,
  // baseband output (clk_bb), before interpolation
  output logic               bb_valid,
  output cplx_t              bb_data [2],
  output logic               frame_start,
  output logic               in_data_part,
  output logic [31:0]        underruns,
  output logic [31:0]        frames,
  // status, one clock each time the event happens
  output logic               src_stall,     // bit source waits for a free bank
  output logic [1:0]         ifft_flush,    // iFFT runs a flush window
  output logic [1:0]         fifo_stall,    // CP stage waits for FIFO room
  // DAC data (clk_dac)
  output logic signed [13:0] dac_i [2],
  output logic signed [13:0] dac_q [2]
);
  // ---------------- bit source control ----------------
  logic        src_active, prbs_bit, prbs_load;
  logic [12:0] bit_cnt;
  logic [4:0]  pair_cnt;
  logic [1:0]  src_cool;
  logic        sym_valid;
  cplx_t       sym;
  logic        sc_in_ready;

  always_ff @(posedge clk_bb) begin
    if (rst) begin
      src_active <= 1'b0;
      bit_cnt    <= '0;
      pair_cnt   <= '0;
      prbs_load  <= 1'b0;
      src_cool   <= '0;
    end else begin
      prbs_load <= 1'b0;
      if (src_cool != '0) src_cool <= src_cool - 1'b1;
      if (!src_active) begin
        if (sc_in_ready && src_cool == '0) begin
          src_active <= 1'b1;
          bit_cnt    <= '0;
        end
      end else if (int'(bit_cnt) == 2 * 2 * N_DATA - 1) begin
        src_active <= 1'b0;
        src_cool   <= 2'd3;   // let the last symbol land before re-checking ready
        if (int'(pair_cnt) == N_SYM / 2 - 1) begin
          pair_cnt  <= '0;
          prbs_load <= 1'b1;   // every frame carries the same sequence
        end else begin
          pair_cnt <= pair_cnt + 1'b1;
        end
      end else begin
        bit_cnt <= bit_cnt + 1'b1;
      end
    end
  end

  assign src_stall = !src_active && !sc_in_ready && src_cool == '0;

  prbs_pn15 u_prbs (.clk(clk_bb), .rst, .en(src_active), .load(prbs_load), .bit_o(prbs_bit));

  qpsk_mapper u_map (
    .clk(clk_bb), .rst, .clr(1'b0),
    .bit_valid(src_active), .bit_i(prbs_bit),
    .sym_valid, .sym
  );

  // ---------------- subchannelization and STBC ----------------
  logic        sc_valid;
  cpair_t      sc_data;
  logic [10:0] sc_idx;
  logic [1:0]  perm_in_ready;
  logic        st_valid;
  cpair_t      st_ant [2];
  logic [10:0] st_idx;

  subchannelization u_subch (
    .clk(clk_bb), .rst,
    .in_valid(sym_valid), .in_data(sym), .in_ready(sc_in_ready),
    .out_ready(&perm_in_ready),
    .out_valid(sc_valid), .out_data(sc_data), .out_idx(sc_idx)
  );

  stbc_encoder u_stbc (
    .clk(clk_bb), .rst,
    .in_valid(sc_valid), .in_data(sc_data), .in_idx(sc_idx),
    .out_valid(st_valid), .ant0(st_ant[0]), .ant1(st_ant[1]), .out_idx(st_idx)
  );

  // ---------------- per-antenna chains ----------------
  cplx_t      fifo_dout [2];
  logic [1:0] fifo_empty, fifo_rd;
  cplx_t      pre_rdata [2];
  logic [11:0] pre_raddr;

  for (genvar a = 0; a < 2; a++) begin : g_ant
    logic        pm_valid, cl_in_ready, cl_valid, pi_in_ready, pi_valid, pi_odd;
    cpair_t      pm_data, cl_data;
    logic [10:0] pm_idx, cl_idx, pi_pos;
    cplx_t       pi_data, wt_data, ff_data, cp_data;
    logic        wt_valid, ff_in_ready, ff_valid, cp_in_ready, cp_valid, cp_free;
    logic        fifo_in_ready, fifo_full;
    logic [$clog2(FIFO_DEPTH):0] fifo_level;

    pusc_permutation u_perm (
      .clk(clk_bb), .rst,
      .in_valid(st_valid), .in_data(st_ant[a]), .in_idx(st_idx), .in_ready(perm_in_ready[a]),
      .out_ready(cl_in_ready), .out_valid(pm_valid), .out_data(pm_data), .out_idx(pm_idx)
    );

    cluster_renumbering u_clus (
      .clk(clk_bb), .rst,
      .in_valid(pm_valid), .in_data(pm_data), .in_ready(cl_in_ready),
      .out_ready(pi_in_ready), .out_valid(cl_valid), .out_data(cl_data), .out_idx(cl_idx)
    );

    pilot_insertion u_pilot (
      .clk(clk_bb), .rst,
      .in_valid(cl_valid), .in_data(cl_data), .in_ready(pi_in_ready),
      .out_ready(ff_in_ready), .out_valid(pi_valid), .out_data(pi_data),
      .out_pos(pi_pos), .out_odd(pi_odd)
    );

    subcarrier_weighting u_wt (
      .clk(clk_bb), .rst,
      .in_valid(pi_valid), .in_data(pi_data), .in_pos(pi_pos),
      .out_valid(wt_valid), .out_data(wt_data)
    );

    ifft_r2sdf u_ifft (
      .clk(clk_bb), .rst,
      .in_valid(wt_valid), .in_ready(ff_in_ready), .in_data(wt_data),
      .credit_ret(cp_free),
      .out_valid(ff_valid), .out_data(ff_data), .flush_window(ifft_flush[a])
    );

    cp_insertion u_cp (
      .clk(clk_bb), .rst,
      .in_valid(ff_valid), .in_data(ff_data), .in_ready(cp_in_ready),
      .out_ready(fifo_in_ready), .out_valid(cp_valid), .out_data(cp_data), .buf_free(cp_free)
    );

    tx_fifo #(.DEPTH(FIFO_DEPTH), .BURST(SYM_LEN)) u_fifo (
      .clk(clk_bb), .rst,
      .wr_en(cp_valid), .din(cp_data), .in_ready(fifo_in_ready),
      .rd_en(fifo_rd[a]), .dout(fifo_dout[a]), .empty(fifo_empty[a]),
      .full(fifo_full), .level(fifo_level)
    );

    preamble_ram #(.LEN(SYM_LEN)) u_pre (
      .clk(clk_bb),
      .we(pre_we && (pre_ant == 1'(a))), .waddr(pre_addr), .wdata(pre_data),
      .raddr(pre_raddr), .rdata(pre_rdata[a])
    );

    assign fifo_stall[a] = u_cp.rd_avail && !u_cp.reading && !fifo_in_ready;
  end

  frame_controller #(.N_SYM(N_SYM), .SYM(SYM_LEN), .SILENCE_LEN(SILENCE_LEN)) u_frame (
    .clk(clk_bb), .rst,
    .fifo_rd, .fifo_dout, .fifo_empty,
    .pre_raddr, .pre_rdata,
    .out_valid(bb_valid), .out_data(bb_data),
    .frame_start, .in_data_part, .underruns, .frames
  );

  // ---------------- x2 interpolation on clk_dac ----------------
  // clk_bb data is stable for two clk_dac cycles; a toggle flag marks each new
  // baseband sample, and the clk_dac side takes the sample on the clock after
  // the toggle changes (mid-way through the clk_bb period).
  logic  bb_tgl, tgl_seen, dac_take;
  cplx_t bb_hold [2];

  always_ff @(posedge clk_bb) begin
    if (rst) begin
      bb_tgl  <= 1'b0;
      bb_hold <= '{default: '0};
    end else begin
      bb_tgl  <= !bb_tgl;
      bb_hold <= bb_data;
    end
  end

  always_ff @(posedge clk_dac) begin
    if (rst) tgl_seen <= 1'b0;
    else     tgl_seen <= bb_tgl;
  end

  assign dac_take = (tgl_seen != bb_tgl);

  for (genvar a = 0; a < 2; a++) begin : g_fir
    logic signed [27:0] full_i, full_q;
    interp_fir_x2 u_fir_i (.clk(clk_dac), .rst, .in_valid(dac_take), .din(bb_hold[a].re),
                           .dout_full(full_i), .dout(dac_i[a]));
    interp_fir_x2 u_fir_q (.clk(clk_dac), .rst, .in_valid(dac_take), .din(bb_hold[a].im),
                           .dout_full(full_q), .dout(dac_q[a]));
  end
endmodule
