// bgl - bit generation logic of the deterministic scan-BIST.
//
// A purely combinational function of the pattern-FSM state (which pattern
// t_i of the test set T_D is being loaded) and the position counter value
// (which scan cycle of that pattern it is).  Its output is the bit to shift
// into the scan chain on this cycle, so the whole test set is hard-wired
// into logic and nothing is stored in a memory.
//
// Bit order: the chain shifts from cell 0 towards cell N-1, so the bit
// shifted in at position p ends in cell N-1-p after N shifts.  The BGL
// therefore returns TEST_SET[state][N-1-pos], where TEST_SET[i][c] is the
// value cell c must hold for pattern i.  The default TEST_SET is the
// stand-in of td_default() (sbist_td_default.svh); override it with the
// ATPG test set of the circuit under test.  Synthesis turns the constant table into the
// two-level logic the architecture relies on.
//
// Multiple scan chains: with CHAINS > 1 every pattern holds CHAINS*N bits,
// TEST_SET[i][j*N + c] being cell c of chain j, and bit_out[j] feeds chain
// j; all chains are loaded in parallel in the same N cycles.
//
// Interface: state in 0..M-1, pos in 0..N-1, bit_out combinational.
// A state outside 0..M-1 (impossible when driven by the pattern counter)
// returns 0.
module bgl #(
  parameter int          M    = 94,
  parameter int          N    = 611,
  parameter int          CHAINS = 1,
  parameter int unsigned SEED = 1,
  parameter logic [CHAINS*N-1:0] TEST_SET [M] = td_default(),
  localparam int WM = sbist_pkg::cnt_width(M),
  localparam int WN = sbist_pkg::cnt_width(N)
) (
  input  logic [WM-1:0] state,
  input  logic [WN-1:0] pos,
  output logic [CHAINS-1:0] bit_out
);

  `include "sbist_td_default.svh"

  always_comb begin
    bit_out = '0;
    if (32'(state) < M && 32'(pos) < N)
      for (int j = 0; j < CHAINS; j++)
        bit_out[j] = TEST_SET[state][j*N + N - 1 - 32'(pos)];
  end

endmodule
