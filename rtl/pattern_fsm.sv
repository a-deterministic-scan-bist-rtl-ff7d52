// pattern_fsm - the pattern-delivery FSM (pattern counter merged with BGL).
//
// A Mealy machine with M states S_1..S_M, one per test pattern.  The state
// is held by a modulo-M pattern counter (state code i-1 for S_i), the
// output is produced by the bit generation logic from the state and the
// position counter value supplied from outside.  The machine stays in a
// state while the N bits of its pattern are shifted in; on 'advance'
// (given by the controller on the capture cycle after those N cycles) it
// moves to the next state, and from S_M back to S_1, so the patterns form
// a cycle.  The states are applied in natural order 1,2,..,M; a synthesis
// tool may re-encode them freely since pattern order does not affect fault
// coverage.
//
// Interface: clear forces S_1; advance moves to the next state; pos is the
// position counter; bit_out is the scan-in bit for (state, pos), one per
// scan chain (CHAINS, default 1); at_last
// is 1 in S_M.  Timing: bit_out is combinational from pos and state.
module pattern_fsm #(
  parameter int          M    = 94,
  parameter int          N    = 611,
  parameter int          CHAINS = 1,
  parameter int unsigned SEED = 1,
  parameter logic [CHAINS*N-1:0] TEST_SET [M] = td_default(),
  localparam int WM = sbist_pkg::cnt_width(M),
  localparam int WN = sbist_pkg::cnt_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          advance,
  input  logic [WN-1:0] pos,
  output logic [WM-1:0] state,
  output logic [CHAINS-1:0] bit_out,
  output logic          at_last
);

  `include "sbist_td_default.svh"

  mod_counter #(.MOD(M)) u_pattern_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (clear),
    .en     (advance),
    .count  (state),
    .at_max (at_last)
  );

  bgl #(.M(M), .N(N), .CHAINS(CHAINS), .SEED(SEED), .TEST_SET(TEST_SET)) u_bgl (
    .state   (state),
    .pos     (pos),
    .bit_out (bit_out)
  );

endmodule
