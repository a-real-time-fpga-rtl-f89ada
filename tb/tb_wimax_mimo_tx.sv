// tb_wimax_mimo_tx: end-to-end test of the whole transmitter at its default
// sizes (2048-point symbols, 46 data symbols per frame, full silence).
// The testbench loads both preamble RAMs, runs the first two complete frames
// and checks them against its own model of the chain: PN15 bits -> QPSK ->
// two-symbol interleave -> Alamouti -> PUSC permutation (evaluated from the
// formula) -> cluster renumbering -> pilots/DC/guards -> randomization, which
// gives the expected value of every carrier of every symbol. Checks:
//  * silence: exactly SILENCE_LEN zero samples on both antennas before the
//    first frame and again between the two frames;
//  * preamble: the loaded words, in order;
//  * data: for every one of the 46 x 2 symbols the cyclic prefix equals the
//    last 256 samples, and a DFT of the 2048-sample body matches the expected
//    carriers (all 2048 carriers for the first two symbols of each antenna,
//    32 random ones otherwise) within 2 % of the QPSK amplitude; both frames
//    carry the same bits, since the PN15 generator restarts every frame;
//  * the bit source: every burst is one symbol pair, 5760 bits on
//    consecutive clocks (one bit per clock);
//  * the DAC streams: each output equals the interpolation of the baseband
//    stream by the 76-tap filter (designed here a second time);
//  * mechanisms: the bit source stalled on a full stage, the FIFOs filled up and held the CP stage back, the iFFT ran
//    flush windows, and no underrun occurred.
module tb_wimax_mimo_tx;
  import wimax_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int SIL = 108288;
  localparam int A = 16384;

  logic clk_bb = 0, clk_dac = 0, rst = 1;
  logic pre_we = 0, pre_ant = 0;
  logic [11:0] pre_addr = 0;
  cplx_t pre_data = '0;
  logic bb_valid, frame_start, in_data_part, src_stall;
  cplx_t bb_data [2];
  logic [31:0] underruns, frames;
  logic [1:0] ifft_flush, fifo_stall;
  logic signed [13:0] dac_i [2], dac_q [2];

  wimax_mimo_tx dut (.*);

  always #5 clk_dac = ~clk_dac;
  initial begin
    #5;
    forever begin clk_bb = 1; #10; clk_bb = 0; #10; end
  end

  int checks = 0, failures = 0;
  int n_src_stall = 0, n_flush = 0, n_fifo_stall = 0, n_frame = 0;
  int n_sil = 0;

  initial begin
    #20000000;   // 1 M baseband clocks
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- reference model ----------------
  bit    prbs [132480];
  bit    wmask [2048];
  int    invperm [1440];
  int    renum [120] = '{
    6, 108, 37, 81, 31, 100, 42, 116, 32, 107, 30, 93, 54, 78, 10, 75, 50, 111,
    58, 106, 23, 105, 16, 117, 39, 95, 7, 115, 25, 119, 53, 71, 22, 98, 28, 79,
    17, 63, 27, 72, 29, 86, 5, 101, 49, 104, 9, 68, 1, 73, 36, 74, 43, 62, 20,
    84, 52, 64, 34, 60, 66, 48, 97, 21, 91, 40, 102, 56, 92, 47, 90, 33, 114,
    18, 70, 15, 110, 51, 118, 46, 83, 45, 76, 57, 99, 35, 67, 55, 85, 59, 113,
    11, 82, 38, 88, 19, 77, 3, 87, 12, 89, 26, 65, 41, 109, 44, 69, 8, 61, 13,
    96, 14, 103, 2, 80, 24, 112, 4, 94, 0};

  function automatic void build_model();
    int pb12 [12] = '{6, 9, 4, 8, 10, 11, 5, 2, 7, 3, 1, 0};
    int pb8 [8] = '{7, 4, 0, 2, 1, 5, 3, 6};
    int nsub [6] = '{12, 8, 12, 8, 12, 8};
    int j0, b0;
    bit hist [$];
    for (int n = 0; n < 132480; n++) prbs[n] = (n < 15) ? 1'b1 : prbs[n-14] ^ prbs[n-15];
    for (int i = 0; i < 11; i++) hist.push_back(1'b1);
    for (int c = 0; c < 2048; c++) wmask[c] = 0;
    for (int c = 184; c <= 1864; c++) begin
      int n;
      n = hist.size();
      hist.push_back(hist[n - 11] ^ hist[n - 9]);
      wmask[c] = hist[n];
    end
    j0 = 0; b0 = 0;
    for (int g = 0; g < 6; g++) begin
      for (int s = 0; s < nsub[g]; s++)
        for (int k = 0; k < 24; k++) begin
          int nk, ad;
          nk = (k + 13 * s) % 24;
          ad = b0 + nsub[g] * nk + ((nsub[g] == 12) ? pb12[(s + nk) % 12] : pb8[(s + nk) % 8]);
          invperm[ad] = (j0 + s) * 24 + k;
        end
      j0 += nsub[g];
      b0 += 24 * nsub[g];
    end
  endfunction

  function automatic void qpsk(int n, output real re, output real im);
    re = prbs[2 * n] ? -A : A;
    im = prbs[2 * n + 1] ? -A : A;
  endfunction

  // expected value of logical carrier c in frame symbol m, antenna a
  function automatic void carrier(int m, int a, int c, output real re, output real im);
    int u, cl, r, d, t, pr, qd, la, p, ne;
    real s0r, s0i, s1r, s1i, sg;
    re = 0; im = 0;
    if (c < 184 || c > 1864 || c == 1024) return;
    t = m % 2; pr = m / 2;
    sg = wmask[c] ? -1.0 : 1.0;
    u = c - 184 - ((c > 1024) ? 1 : 0);
    cl = u / 14; r = u % 14;
    if ((t == 0 && (r == 4 || r == 8)) || (t == 1 && (r == 0 || r == 12))) begin
      re = sg * 30893.0;
      return;
    end
    d = (t == 0) ? ((r < 4) ? r : (r < 8) ? r - 1 : r - 2) : ((r < 12) ? r - 1 : r - 2);
    qd = cl * 12 + d;
    la = renum[qd / 12] * 12 + qd % 12;
    p = invperm[la];
    ne = pr * 2880 + 48 * (p / 24) + p % 24;
    qpsk(ne, s0r, s0i);
    qpsk(ne + 24, s1r, s1i);
    if (a == 0) begin
      if (t == 0) begin re = s0r; im = s0i; end
      else        begin re = -s1r; im = s1i; end
    end else begin
      if (t == 0) begin re = s1r; im = s1i; end
      else        begin re = s0r; im = -s0i; end
    end
    re = re * sg; im = im * sg;
  endfunction

  // ---------------- capture and checks ----------------
  cplx_t cap [2][2304];
  int    pos_in_frame = -1;
  real   maxerr = 0;

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic void check_symbol(int m, int a, bit all_bins);
    int nb;
    // cyclic prefix
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (cap[a][i] !== cap[a][2048 + i]) failures++;
    end
    nb = all_bins ? 2048 : 32;
    for (int b = 0; b < nb; b++) begin
      int f, c;
      real yr, yi, er, ei, e;
      f = all_bins ? b : $urandom_range(0, 2047);
      c = f ^ 1024;
      yr = 0; yi = 0;
      for (int n = 0; n < 2048; n++) begin
        real ang, xr, xi;
        ang = -2.0 * PI * f * n / 2048.0;
        xr = $itor(cap[a][256 + n].re); xi = $itor(cap[a][256 + n].im);
        yr += xr * $cos(ang) - xi * $sin(ang);
        yi += xr * $sin(ang) + xi * $cos(ang);
      end
      carrier(m, a, c, er, ei);
      e = rabs(yr - er) + rabs(yi - ei);
      if (e > maxerr) maxerr = e;
      checks++;
      if (e > 0.02 * A * 2) begin
        failures++;
        if (failures < 6) $display("frame symbol %0d ant %0d carrier %0d: got %f %f, expected %f %f",
                                   m, a, c, yr, yi, er, ei);
      end
    end
  endfunction

  // source rate: one bit per clock, each burst one symbol pair (5760 bits)
  int src_run = 0, n_bursts = 0;
  always @(posedge clk_bb) if (!rst) begin
    if (dut.src_active) src_run++;
    else if (src_run != 0) begin
      n_bursts++;
      checks++;
      if (src_run !== 5760) begin
        failures++;
        $display("source burst of %0d bits", src_run);
      end
      src_run = 0;
    end
  end

  always @(posedge clk_bb) begin
    if (!rst) begin
      if (src_stall) n_src_stall++;
      if (ifft_flush !== 0) n_flush++;
      if (fifo_stall !== 0) n_fifo_stall++;
      if (frame_start) begin
        n_frame++;
        pos_in_frame = 0;
        checks++;
        if (n_sil !== SIL) begin
          failures++;
          $display("silence before frame %0d lasted %0d samples", n_frame, n_sil);
        end
        n_sil = 0;
      end
      if (bb_valid && (n_frame == 0 || pos_in_frame >= 47 * 2304)) begin
        n_sil++;
        checks++;
        if (bb_data[0] !== '0 || bb_data[1] !== '0) failures++;
      end
      if (pos_in_frame >= 0 && pos_in_frame < 47 * 2304) begin
        int sy, k;
        sy = pos_in_frame / 2304; k = pos_in_frame % 2304;
        if (sy == 0) begin
          checks++;
          if (bb_data[0] !== cplx_t'({16'(1000 + k), 16'(-k)}) ||
              bb_data[1] !== cplx_t'({16'(5000 + k), 16'(k)})) failures++;
        end else begin
          cap[0][k] = bb_data[0];
          cap[1][k] = bb_data[1];
          if (k == 2303) begin
            check_symbol(sy - 1, 0, n_frame == 1 && sy <= 2);
            check_symbol(sy - 1, 1, n_frame == 1 && sy <= 2);
          end
        end
      end
      if (pos_in_frame >= 0) pos_in_frame++;
    end
  end
  // DAC streams: the filter input is the baseband stream delayed by the
  // holding register; find the alignment once, then check every output
  longint hq [76];
  logic signed [15:0] bbi [$];
  int dac_checks = 0, dac_off = -1;

  function automatic real i0(real x);
    real s, tm;
    s = 1.0; tm = 1.0;
    for (int k = 1; k < 40; k++) begin tm = tm * (x / (2.0 * k)) * (x / (2.0 * k)); s += tm; end
    return s;
  endfunction

  function automatic logic signed [13:0] dac_model(int n);
    // output n of the zero-stuffed stream built from bbi
    longint acc;
    acc = 0;
    for (int t = 0; t < 76; t++)
      if (n - t >= 0 && (n - t) % 2 == 0 && (n - t) / 2 < bbi.size()) acc += hq[t] * bbi[(n - t) / 2];
    acc = acc >>> 16;
    if (acc > 8191) return 14'sd8191;
    if (acc < -8192) return -14'sd8192;
    return 14'(acc);
  endfunction

  logic signed [13:0] dac_hist [$];
  always @(posedge clk_bb) if (!rst && n_frame == 1 && pos_in_frame < 4000) bbi.push_back(bb_data[0].re);
  always @(posedge clk_dac) if (!rst && n_frame == 1 && pos_in_frame < 4000) dac_hist.push_back(dac_i[0]);

  task automatic check_dac();
    // find the offset o so that dac_hist[o + n] == model(n) over a window
    for (int o = 0; o < 12 && dac_off < 0; o++) begin
      bit ok;
      ok = 1;
      for (int n = 4700; n < 4800; n++) if (dac_hist[o + n] !== dac_model(n)) ok = 0;
      if (ok) dac_off = o;
    end
    checks++;
    if (dac_off < 0) failures++;
    else
      for (int n = 100; n < 7000; n++) begin
        checks++;
        dac_checks++;
        if (dac_hist[dac_off + n] !== dac_model(n)) failures++;
      end
  endtask

  initial begin
    build_model();
    for (int n = 0; n < 76; n++) begin
      real mm, aa, sc, r, w;
      mm = n - 37.5; aa = 0.5 * mm;
      sc = $sin(PI * aa) / (PI * aa);
      r = 2.0 * n / 75.0 - 1.0;
      w = i0(7.857 * $sqrt(1.0 - r * r)) / i0(7.857);
      hq[n] = longint'($floor(sc * w * 65536.0 + 0.5));
    end
    repeat (4) @(posedge clk_bb);
    rst <= 0;
    // load the preambles while the first silence runs
    for (int a = 0; a < 2; a++)
      for (int k = 0; k < 2304; k++) begin
        @(negedge clk_bb);
        pre_we = 1; pre_ant = 1'(a); pre_addr = 12'(k);
        pre_data = (a == 0) ? cplx_t'({16'(1000 + k), 16'(-k)}) : cplx_t'({16'(5000 + k), 16'(k)});
      end
    @(negedge clk_bb); pre_we = 0;
    wait (n_frame == 1 && pos_in_frame == 4100);
    check_dac();
    wait (n_frame == 2 && pos_in_frame == 47 * 2304);
    repeat (10) @(posedge clk_bb);
    checks++; if (frames !== 2) failures++;
    checks++; if (underruns !== 0) failures++;
    checks++; if (n_src_stall == 0) failures++;
    checks++; if (n_bursts < 46) failures++;   // at least two frames' worth of pairs
    checks++; if (n_fifo_stall == 0) failures++;
    checks++; if (n_flush == 0) failures++;
    $display("clocks: source stalled %0d; FIFO full %0d; flush %0d; underruns %0d; max carrier error %f; DAC checks %0d",
             n_src_stall, n_fifo_stall, n_flush, underruns, maxerr, dac_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
