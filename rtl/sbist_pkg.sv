// sbist_pkg - shared definitions of the deterministic scan-BIST.
//
// Holds the BIST controller's state encoding, the default feedback
// polynomial used by the pseudorandom pattern source and the response
// compactor, a width helper, and the generator of the built-in stand-in
// test set.
//
// The architecture hard-wires a precomputed deterministic test set T_D
// (m patterns of n bits, produced by an ATPG tool for the circuit under
// test) into the bit generation logic.  No particular test set is part of
// this RTL, so the default T_D is a fixed pseudo-random stand-in produced
// by td_default() (sbist_td_default.svh): bit c of pattern i is bit (c mod 32) of
// td_word(seed, i, c div 32), a 32-bit integer hash (multiply / xor-shift
// rounds, constants below).  A real test set is supplied by overriding the
// TEST_SET parameter of scan_bist_top.  Layout: TEST_SET[i][c] is the
// value that scan cell c must hold when pattern i (state S_(i+1)) is
// applied; cell 0 is next to scan-in, cell N-1 drives scan-out.
package sbist_pkg;

  // Width of a counter that counts 0 .. mod-1 (at least one bit).
  function automatic int cnt_width(int mod);
    return (mod > 1) ? $clog2(mod) : 1;
  endfunction

  // x^32 + x^22 + x^2 + x + 1 (primitive); bit 32 implied.
  localparam logic [31:0] POLY32 = 32'h0040_0007;

  // BIST controller phases.
  typedef enum logic [2:0] {
    BIST_IDLE    = 3'd0,  // waiting for start, scan cells in functional mode
    BIST_SHIFT   = 3'd1,  // n scan cycles: load next pattern, unload last response
    BIST_CAPTURE = 3'd2,  // one functional clock: CUT response into the chain
    BIST_FLUSH   = 3'd3,  // n scan cycles: unload the last response
    BIST_DONE    = 3'd4   // signature valid
  } bist_state_e;

  // 32-bit word of the stand-in test set.
  function automatic logic [31:0] td_word(int unsigned seed, int unsigned pat, int unsigned word);
    logic [31:0] x;
    x = seed ^ (pat * 32'h9E37_79B1) ^ (word * 32'h85EB_CA77);
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12);
    x = x * 32'h297A_2D39;
    x = x ^ (x >> 15);
    return x;
  endfunction

  // Single bit of the stand-in test set (pattern pat, scan cell pos).
  function automatic logic td_bit(int unsigned seed, int unsigned pat, int unsigned pos);
    logic [31:0] w;
    w = td_word(seed, pat, pos / 32);
    return w[pos % 32];
  endfunction

endpackage
