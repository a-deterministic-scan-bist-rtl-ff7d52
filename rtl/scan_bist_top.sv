// scan_bist_top - autonomous deterministic scan-BIST for field testing.
//
// Applies a small precomputed test set T_D (M patterns for one scan chain
// of N cells) to a full-scan circuit under test and compresses the
// responses into a signature, with no pattern storage: the patterns are
// hard-wired into the bit generation logic of a Mealy FSM whose state is
// the pattern counter and whose input is the BIST controller's position
// counter.  Optional features, all from the same architecture:
//   * K > 1 splits T_D into K sub-FSMs selected by a K:1 multiplexer
//     (partitioned architecture for large test sets);
//   * mixed_mode = 1 first applies NUM_PR pseudorandom patterns from an
//     LFSR through a 2:1 multiplexer, then the deterministic ones.
//
// Multiple scan chains (CHAINS > 1, default 1): the BGL gives one bit per
// chain and all chains of N cells load in parallel; chain j's cells are
// cut_q/cut_d[j*N +: N] and TEST_SET[i][j*N + c]; the signature register
// becomes a CHAINS-input MISR.  In mixed mode chain j takes LFSR stage
// PRPG_W-1-j*(PRPG_W/CHAINS) (no phase shifter).  The way the chains are
// fed is this design's own.
//
// The circuit under test is outside this module: cut_q drives its scan
// flip-flop outputs (the applied pattern) and cut_d returns the values its
// logic would load into them (the response).  Between sessions the chain
// is in functional mode and simply loads cut_d every clock.
//
// Timing: after start is accepted, each pattern takes N shift cycles and
// one capture cycle: counting the first shift as cycle 1, the last
// deterministic response is captured in cycle P*(N+1), where
// P = M + (mixed_mode ? NUM_PR : 0).  N flush cycles later done rises with
// the final signature.  Comparing the
// signature with the fault-free one is left to the system.
//
// Defaults: N = 611 and M = 94 (the s15850 full-scan benchmark with its
// compact test set), K = 1, NUM_PR = 2^20 (the "typically 1M" pseudorandom
// patterns of mixed mode).  The 32-bit LFSR and signature register, and
// the stand-in TEST_SET, are this design's choices.
module scan_bist_top #(
  parameter int          N      = 611,
  parameter int          M      = 94,
  parameter int          CHAINS = 1,
  parameter int          K      = 1,
  parameter int          NUM_PR = 1048576,
  parameter int          SIG_W  = 32,
  parameter int          PRPG_W = 32,
  parameter int unsigned SEED   = 1,
  parameter logic [CHAINS*N-1:0] TEST_SET [M] = td_default(),
  localparam int WN = sbist_pkg::cnt_width(N),
  localparam int WM = sbist_pkg::cnt_width(M),
  localparam int WK = sbist_pkg::cnt_width(K),
  localparam int WP = sbist_pkg::cnt_width(NUM_PR)
) (
  input  logic             clk,
  input  logic             rst_n,
  // session control
  input  logic             start,
  input  logic             mixed_mode,
  output logic             busy,
  output logic             done,
  output logic [SIG_W-1:0] signature,
  // circuit under test
  output logic [CHAINS*N-1:0] cut_q,
  input  logic [CHAINS*N-1:0] cut_d,
  output logic             scan_en,
  // observation
  output logic             capture,
  output logic             use_prpg,
  output logic [WN-1:0]    position,
  output logic [WM-1:0]    pattern,
  output logic [WK-1:0]    group,
  output logic [WP-1:0]    pr_count,
  output sbist_pkg::bist_state_e phase
);

  `include "sbist_td_default.svh"

  localparam int STRIDE = PRPG_W / CHAINS;

  initial begin
    assert (CHAINS >= 1 && CHAINS <= PRPG_W && CHAINS <= SIG_W)
      else $fatal(1, "scan_bist_top: CHAINS must be 1..min(PRPG_W, SIG_W)");
  end

  logic pat_clear, pat_advance, det_last;
  logic prpg_load, prpg_en, prpg_bit;
  logic comp_clear, comp_en;
  logic [CHAINS-1:0] det_bits, prpg_bits, scan_in, scan_out;
  logic [PRPG_W-1:0] prpg_state;

  bist_controller #(.N(N), .NUM_PR(NUM_PR)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .mixed_mode  (mixed_mode),
    .det_last    (det_last),
    .pos         (position),
    .pr_count    (pr_count),
    .scan_en     (scan_en),
    .capture     (capture),
    .use_prpg    (use_prpg),
    .pat_clear   (pat_clear),
    .pat_advance (pat_advance),
    .prpg_load   (prpg_load),
    .prpg_en     (prpg_en),
    .comp_clear  (comp_clear),
    .comp_en     (comp_en),
    .busy        (busy),
    .done        (done),
    .phase       (phase)
  );

  partitioned_pattern_gen #(
    .M(M), .N(N), .CHAINS(CHAINS), .K(K), .SEED(SEED), .TEST_SET(TEST_SET)
  ) u_det (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (pat_clear),
    .advance (pat_advance),
    .pos     (position),
    .bit_out (det_bits),
    .pattern (pattern),
    .group   (group),
    .at_last (det_last)
  );

  lfsr_prpg #(.WIDTH(PRPG_W)) u_prpg (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (prpg_load),
    .en      (prpg_en),
    .bit_out (prpg_bit),
    .state   (prpg_state)
  );

  // LFSR bits for the chains: chain 0 takes the output bit (the MSB),
  // chain j the stage j*STRIDE places below it.
  always_comb begin
    prpg_bits[0] = prpg_bit;
    for (int j = 1; j < CHAINS; j++)
      prpg_bits[j] = prpg_state[PRPG_W - 1 - j*STRIDE];
  end

  // 2:1 multiplexer between the LFSR and the bit generation logic.
  assign scan_in = use_prpg ? prpg_bits : det_bits;

  for (genvar j = 0; j < CHAINS; j++) begin : g_chain
    scan_chain #(.N(N)) u_chain (
      .clk      (clk),
      .scan_en  (scan_en),
      .scan_in  (scan_in[j]),
      .d        (cut_d[j*N +: N]),
      .q        (cut_q[j*N +: N]),
      .scan_out (scan_out[j])
    );
  end

  signature_register #(.WIDTH(SIG_W), .NUM_IN(CHAINS)) u_compactor (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (comp_clear),
    .en        (comp_en),
    .din       (scan_out),
    .signature (signature)
  );

endmodule
