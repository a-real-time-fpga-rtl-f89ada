// tb_pusc_perm_index: the permutation must be a bijection of 0..1439 that
// keeps every subchannel inside its major group's carrier range, must match
// hand-evaluated points of the formula, and must equal, for every index, the
// formula evaluated here group by group:
//   carrier = group base + N*n_k + permbase[(s + n_k) mod N], n_k = (k + 13 s) mod 24.
module tb_pusc_perm_index;
  logic [10:0] idx, addr;
  int checks = 0, failures = 0;
  bit seen [1440];
  int lo [6] = '{0, 288, 480, 768, 960, 1248};
  int hi [6] = '{288, 480, 768, 960, 1248, 1440};
  int sub_lo [6] = '{0, 12, 20, 32, 40, 52};

  pusc_perm_index dut (.idx, .addr);

  int pb12 [12] = '{6, 9, 4, 8, 10, 11, 5, 2, 7, 3, 1, 0};
  int pb8 [8] = '{7, 4, 0, 2, 1, 5, 3, 6};
  int expect_addr [1440];

  function automatic void build_ref();
    int j0, b0, n;
    j0 = 0; b0 = 0;
    for (int g = 0; g < 6; g++) begin
      n = (g % 2 == 0) ? 12 : 8;
      for (int s = 0; s < n; s++)
        for (int k = 0; k < 24; k++) begin
          int nk;
          nk = (k + 13 * s) % 24;
          expect_addr[(j0 + s) * 24 + k] = b0 + n * nk + ((n == 12) ? pb12[(s + nk) % 12] : pb8[(s + nk) % 8]);
        end
      j0 += n;
      b0 += 24 * n;
    end
  endfunction

  function automatic int mg_of(int j);
    for (int g = 5; g >= 0; g--) if (j >= sub_lo[g]) return g;
    return 0;
  endfunction

  initial begin
    build_ref();
    for (int p = 0; p < 1440; p++) begin
      idx = 11'(p); #1;
      checks++;
      if (int'(addr) !== expect_addr[p]) failures++;
      checks++;
      if (addr >= 1440 || seen[addr]) failures++;
      else seen[addr] = 1;
      checks++;
      if (int'(addr) < lo[mg_of(p / 24)] || int'(addr) >= hi[mg_of(p / 24)]) failures++;
    end
    // hand-evaluated: (s=0,k=0) -> 12*0 + pb12[0]=6 ; (s=1,k=0) -> n=13,
    // pb12[14 mod 12 = 2]=4 -> 160 ; subchannel 12 (MG1, s=0), k=1 -> n=1,
    // 288 + 8*1 + pb8[1]=4 -> 300 ; subchannel 59 (MG5, s=7), k=23 ->
    // n=(23+91) mod 24=18, pb8[(7+18) mod 8=1]=4 -> 1248+144+4=1396
    idx = 11'd0;    #1; checks++; if (addr !== 11'd6)    failures++;
    idx = 11'd24;   #1; checks++; if (addr !== 11'd160)  failures++;
    idx = 11'd289;  #1; checks++; if (addr !== 11'd300)  failures++;
    idx = 11'd1439; #1; checks++; if (addr !== 11'd1396) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
