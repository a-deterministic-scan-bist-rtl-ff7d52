// tb_bist_controller - self-checking test of the BIST controller
// (N = 5 scan cells, NUM_PR = 3 pseudorandom patterns).  A pattern
// counter model of M = 4 deterministic patterns answers det_last.  Each
// session is checked cycle by cycle against the expected schedule:
// N shift cycles with the position counter 0..N-1, one capture cycle,
// P*(N+1) cycles to the last capture, N flush cycles, then done; the
// compactor must be off while the first pattern is loaded, and the LFSR
// must drive the chain for exactly the NUM_PR pseudorandom patterns.
module tb_bist_controller;
  import sbist_pkg::*;
  localparam int N = 5, NUM_PR = 3, M = 4;

  logic clk = 0, rst_n = 0, start = 0, mixed_mode = 0, det_last;
  logic [2:0] pos;
  logic [1:0] pr_count;
  logic scan_en, capture, use_prpg, pat_clear, pat_advance, prpg_load, prpg_en;
  logic comp_clear, comp_en, busy, done;
  bist_state_e phase;
  int checks = 0, failures = 0;
  int pat_model = 0;

  bist_controller #(.N(N), .NUM_PR(NUM_PR)) dut (
    .clk, .rst_n, .start, .mixed_mode, .det_last, .pos, .pr_count, .scan_en, .capture,
    .use_prpg, .pat_clear, .pat_advance, .prpg_load, .prpg_en, .comp_clear, .comp_en,
    .busy, .done, .phase);

  assign det_last = (pat_model == M - 1);
  always_ff @(posedge clk) begin
    if (pat_clear)        pat_model <= 0;
    else if (pat_advance) pat_model <= (pat_model + 1) % M;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic session(bit mixed);
    int npr;
    npr = mixed ? NUM_PR : 0;
    @(negedge clk);
    mixed_mode = mixed;
    start = 1;
    #1;
    check(pat_clear && comp_clear && prpg_load, "clear pulses with start");
    @(negedge clk);
    start = 0;
    for (int p = 0; p < npr + M; p++) begin
      for (int k = 0; k < N; k++) begin
        check(phase == BIST_SHIFT && scan_en && !capture && busy, $sformatf("shift p=%0d k=%0d", p, k));
        check(32'(pos) == k, $sformatf("position %0d exp %0d", pos, k));
        check(use_prpg == (p < npr) && prpg_en == (p < npr), "source select");
        check(comp_en == (p != 0), "compactor gating");
        check(!pat_advance, "no advance while shifting");
        @(negedge clk);
      end
      check(phase == BIST_CAPTURE && capture && !scan_en && !comp_en, $sformatf("capture p=%0d", p));
      check(pat_advance == (p >= npr), "advance on deterministic capture");
      check(!mixed || 32'(pr_count) == ((p < npr) ? p : 0), "pr counter");
      @(negedge clk);
    end
    for (int k = 0; k < N; k++) begin
      check(phase == BIST_FLUSH && scan_en && comp_en && !use_prpg && busy, $sformatf("flush %0d", k));
      @(negedge clk);
    end
    check(done && !busy, "done");
    check(pat_model == 0, "pattern FSM back at S_1");
    repeat (3) @(negedge clk);
    check(done && !scan_en, "done holds");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(phase == BIST_IDLE && !busy && !done && !scan_en, "idle after reset");
    session(0);
    session(1);
    session(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
