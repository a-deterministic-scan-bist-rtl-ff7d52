// sbist_td_default.svh - default (stand-in) test set, included inside the
// modules that carry a TEST_SET parameter.  It uses their M, N, CHAINS and
// SEED parameters: bit b of pattern i is bit (b mod 32) of
// sbist_pkg::td_word(SEED, i, b div 32).  TEST_SET[i][j*N + c] is the value
// of cell c of scan chain j for pattern i (state S_(i+1)).
  typedef logic [CHAINS*N-1:0] td_set_t [M];

  function automatic td_set_t td_default();
    td_set_t set;
    for (int i = 0; i < M; i++) begin
      logic [CHAINS*N+31:0] pat;
      for (int w = 0; w < (CHAINS * N + 31) / 32; w++)
        pat[w*32 +: 32] = sbist_pkg::td_word(SEED, i, w);
      set[i] = pat[CHAINS*N-1:0];
    end
    return set;
  endfunction
