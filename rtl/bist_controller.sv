// bist_controller - test-per-scan sequencing of the scan-BIST.
//
// Runs one BIST session after a start pulse.  Each pattern takes N shift
// cycles (scan_en = 1, the position counter walks 0..N-1 and the pattern
// source supplies one bit per cycle while the previous response leaves
// through scan-out into the compactor) followed by one capture cycle
// (scan_en = 0, the circuit's response is loaded into the chain by a
// functional clock, and the pattern FSM steps to its next state).  A
// session of P patterns therefore spends P*(N+1) cycles from the first
// shift to the last capture.  In mixed mode the first NUM_PR patterns come
// from the pseudorandom LFSR (use_prpg = 1) and the deterministic patterns
// follow; otherwise only the deterministic patterns are applied.  After
// the last deterministic capture, N flush cycles shift the final response
// into the compactor (meanwhile the cyclic pattern FSM, back in S_1,
// reloads the first pattern), and done is raised.
//
// The position counter (modulo N) and the pseudorandom pattern counter
// (modulo NUM_PR) live here.  The flush phase, the start/done handshake,
// and gating the compactor off while the chain still holds its pre-test
// contents are this design's choices.
//
// Interface: start is sampled in IDLE or DONE; busy is high from the first
// shift to the end of the flush; done stays high until the next start.
// pat_clear/comp_clear/prpg_load pulse with the accepted start.
module bist_controller #(
  parameter int N      = 611,
  parameter int NUM_PR = 1048576,
  localparam int WN = sbist_pkg::cnt_width(N),
  localparam int WP = sbist_pkg::cnt_width(NUM_PR)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          mixed_mode,
  input  logic          det_last,     // pattern source is at its last pattern
  output logic [WN-1:0] pos,          // position counter
  output logic [WP-1:0] pr_count,     // pseudorandom patterns applied
  output logic          scan_en,
  output logic          capture,
  output logic          use_prpg,     // 2:1 source mux select
  output logic          pat_clear,
  output logic          pat_advance,
  output logic          prpg_load,
  output logic          prpg_en,
  output logic          comp_clear,
  output logic          comp_en,
  output logic          busy,
  output logic          done,
  output sbist_pkg::bist_state_e phase
);
  import sbist_pkg::*;

  bist_state_e state, state_nx;
  logic pr_phase, pr_phase_nx;
  logic first, first_nx;       // chain holds no captured response yet
  logic pos_clear, pos_en, pos_max;
  logic pr_clear, pr_en, pr_max;
  logic accept;

  assign accept = start && (state == BIST_IDLE || state == BIST_DONE);

  mod_counter #(.MOD(N)) u_position_counter (
    .clk(clk), .rst_n(rst_n), .clear(pos_clear), .en(pos_en),
    .count(pos), .at_max(pos_max)
  );

  mod_counter #(.MOD(NUM_PR)) u_pr_counter (
    .clk(clk), .rst_n(rst_n), .clear(pr_clear), .en(pr_en),
    .count(pr_count), .at_max(pr_max)
  );

  always_comb begin
    state_nx    = state;
    pr_phase_nx = pr_phase;
    first_nx    = first;
    pos_clear   = 1'b0;
    pos_en      = 1'b0;
    pr_clear    = 1'b0;
    pr_en       = 1'b0;
    scan_en     = 1'b0;
    capture     = 1'b0;
    pat_clear   = 1'b0;
    pat_advance = 1'b0;
    prpg_load   = 1'b0;
    prpg_en     = 1'b0;
    comp_clear  = 1'b0;
    comp_en     = 1'b0;

    unique case (state)
      BIST_IDLE, BIST_DONE: begin
        if (accept) begin
          state_nx    = BIST_SHIFT;
          pr_phase_nx = mixed_mode;
          first_nx    = 1'b1;
          pos_clear   = 1'b1;
          pr_clear    = 1'b1;
          pat_clear   = 1'b1;
          prpg_load   = 1'b1;
          comp_clear  = 1'b1;
        end
      end
      BIST_SHIFT: begin
        scan_en = 1'b1;
        pos_en  = 1'b1;
        prpg_en = pr_phase;
        comp_en = !first;
        if (pos_max) state_nx = BIST_CAPTURE;
      end
      BIST_CAPTURE: begin
        capture  = 1'b1;
        first_nx = 1'b0;
        if (pr_phase) begin
          pr_en    = 1'b1;
          state_nx = BIST_SHIFT;
          if (pr_max) pr_phase_nx = 1'b0;
        end else begin
          pat_advance = 1'b1;
          state_nx    = det_last ? BIST_FLUSH : BIST_SHIFT;
        end
      end
      BIST_FLUSH: begin
        scan_en = 1'b1;
        pos_en  = 1'b1;
        comp_en = 1'b1;
        if (pos_max) state_nx = BIST_DONE;
      end
      default: state_nx = BIST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= BIST_IDLE;
      pr_phase <= 1'b0;
      first    <= 1'b1;
    end else begin
      state    <= state_nx;
      pr_phase <= pr_phase_nx;
      first    <= first_nx;
    end
  end

  assign use_prpg = pr_phase;
  assign busy     = (state == BIST_SHIFT) || (state == BIST_CAPTURE) || (state == BIST_FLUSH);
  assign done     = (state == BIST_DONE);
  assign phase    = state;

  // Shift and capture never overlap.
  always_ff @(posedge clk) begin
    if (rst_n) a_shift_capture: assert (!(scan_en && capture));
  end

endmodule
