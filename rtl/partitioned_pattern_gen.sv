// partitioned_pattern_gen - deterministic pattern source with a
// partitioned test set.
//
// When T_D holds many patterns a single FSM becomes expensive, so T_D is
// split into K groups of about M/K patterns.  Each group gets its own
// pattern_fsm (pattern counter + BGL); all of them are fed by the one
// shared modulo-N position counter, and a K:1 multiplexer passes the bit
// of the active group to the scan chain.  With K = 1 this is exactly the
// single-FSM architecture.
//
// Group sizes: the first K-1 groups hold MG = ceil(M/K) patterns and the
// last one the rest (M - (K-1)*MG, which must be at least 1).  The group
// select of the multiplexer comes from a modulo-K group counter that
// steps when the active group finishes its last pattern; only the active
// group's FSM advances.  The global pattern index is group*MG + local
// state.  The group counter and the uneven last group are choices of this
// design.
//
// Interface: clear returns to pattern 0 of group 0; advance steps to the
// next pattern (wrapping from pattern M-1 to 0); pos is the position
// counter; bit_out holds the scan-in bit of each of the CHAINS chains;
// pattern is the global index; group
// is the multiplexer select; at_last is 1 while pattern M-1 is active.
module partitioned_pattern_gen #(
  parameter int          M    = 94,
  parameter int          N    = 611,
  parameter int          CHAINS = 1,
  parameter int          K    = 1,
  parameter int unsigned SEED = 1,
  parameter logic [CHAINS*N-1:0] TEST_SET [M] = td_default(),
  localparam int WM = sbist_pkg::cnt_width(M),
  localparam int WN = sbist_pkg::cnt_width(N),
  localparam int WK = sbist_pkg::cnt_width(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          advance,
  input  logic [WN-1:0] pos,
  output logic [CHAINS-1:0] bit_out,
  output logic [WM-1:0] pattern,
  output logic [WK-1:0] group,
  output logic          at_last
);

  `include "sbist_td_default.svh"

  localparam int MG    = (M + K - 1) / K;
  localparam int MLAST = M - (K - 1) * MG;

  initial begin
    assert (K >= 1 && MLAST >= 1)
      else $fatal(1, "partitioned_pattern_gen: M=%0d cannot be split into K=%0d groups", M, K);
  end

  logic [CHAINS-1:0] sub_bit [K];
  logic [K-1:0]  sub_last;
  logic [WM-1:0] sub_state [K];
  logic          group_last;

  for (genvar g = 0; g < K; g++) begin : g_part
    localparam int MSUB = (g == K - 1) ? MLAST : MG;
    localparam int WS   = sbist_pkg::cnt_width(MSUB);
    logic [WS-1:0] st;

    pattern_fsm #(
      .M        (MSUB),
      .N        (N),
      .CHAINS   (CHAINS),
      .SEED     (SEED),
      .TEST_SET (TEST_SET[g*MG +: MSUB])
    ) u_fsm (
      .clk     (clk),
      .rst_n   (rst_n),
      .clear   (clear),
      .advance (advance && (32'(group) == g)),
      .pos     (pos),
      .state   (st),
      .bit_out (sub_bit[g]),
      .at_last (sub_last[g])
    );

    assign sub_state[g] = WM'(st);
  end

  // Group counter: selects the active BIST sub-circuit.
  mod_counter #(.MOD(K)) u_group_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (clear),
    .en     (advance && sub_last[group]),
    .count  (group),
    .at_max (group_last)
  );

  // K:1 multiplexer and global pattern index.
  always_comb begin
    bit_out = sub_bit[group];
    pattern = WM'(32'(group) * MG + 32'(sub_state[group]));
  end

  assign at_last = group_last && sub_last[group];

endmodule
