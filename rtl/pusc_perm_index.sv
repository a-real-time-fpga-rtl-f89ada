// pusc_perm_index: the permutation-formula unit of the PUSC permutation stage.
// Combinational. The input is a logical data index idx = 24*j + k (subchannel
// j = 0..59, carrier k = 0..23 of the subchannel). The 60 subchannels form six
// major groups of 12, 8, 12, 8, 12 and 8 subchannels. For subchannel s of a
// major group with N subchannels:
//   n_k  = (k + 13 s) mod 24
//   addr = MG_base + N * n_k + permbase_N[(s + n_k) mod N]
// where MG_base is the first data carrier of the group (0, 288, 480, 768, 960,
// 1248). The formula and the 8/12 group sizes follow the document; the two
// permbase masks are those of the IEEE 802.16e 2048-FFT downlink, which the
// document does not print, with cell ID 0.
module pusc_perm_index (
  input  logic [10:0] idx,
  output logic [10:0] addr
);
  localparam int PB12 [12] = '{6, 9, 4, 8, 10, 11, 5, 2, 7, 3, 1, 0};
  localparam int PB8  [8]  = '{7, 4, 0, 2, 1, 5, 3, 6};

  int j, k, s, n, mgbase, nk, pb;

  always_comb begin
    j = int'(idx) / 24;
    k = int'(idx) % 24;
    if (j < 12)      begin s = j;      n = 12; mgbase = 0;    end
    else if (j < 20) begin s = j - 12; n = 8;  mgbase = 288;  end
    else if (j < 32) begin s = j - 20; n = 12; mgbase = 480;  end
    else if (j < 40) begin s = j - 32; n = 8;  mgbase = 768;  end
    else if (j < 52) begin s = j - 40; n = 12; mgbase = 960;  end
    else             begin s = j - 52; n = 8;  mgbase = 1248; end
    nk = (k + 13 * s) % 24;
    pb = (n == 12) ? PB12[(s + nk) % 12] : PB8[(s + nk) % 8];
    addr = 11'(mgbase + n * nk + pb);
  end
endmodule
