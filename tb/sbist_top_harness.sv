// sbist_top_harness - end-to-end checker for scan_bist_top, shared by the
// reduced-size and the full-size testbench.
//
// It connects a small combinational circuit under test (each response
// bit is an XOR/AND of three neighbouring scan cells, see cut_fn) and
// runs BIST sessions, comparing against a reference model written
// independently of the RTL: the expected pattern list (NUM_PR LFSR
// patterns in mixed mode, then the M test-set patterns taken from
// sbist_pkg::td_bit), the response of each, the scan-out order and the
// signature polynomial.  Checked: the chain holds the expected pattern on
// every capture cycle, the number of cycles from the first shift to the
// last capture is P*(N+1), and the final signature.  Mechanisms are
// counted (shift and capture cycles, FSM state steps, wrap S_M -> S_1,
// group switches of the partitioned source, pseudorandom patterns, the
// LFSR -> BGL source switch, flush cycles, completed sessions); one that
// never happens counts as a failure.
//
// With CHAINS > 1 the chains load in parallel (chain j from LFSR stage
// 31 - j*(32/CHAINS) in the pseudorandom phase) and their scan-outs feed
// the MISR together, bit j from chain j.
//
// FULL = 1 instantiates scan_bist_top with no parameter override, so that
// its own defaults are exercised; the harness's N, M, K, NUM_PR must then
// equal those defaults.
module sbist_top_harness #(
  parameter bit FULL      = 1'b0,
  parameter int N         = 13,
  parameter int M         = 7,
  parameter int K         = 3,
  parameter int CHAINS    = 1,
  parameter int NUM_PR    = 4,
  parameter bit RUN_MIXED = 1'b1
) (
  output int checks,
  output int failures,
  output bit finished
);
  localparam int W  = CHAINS * N;     // all scan cells
  localparam int STRIDE = 32 / CHAINS;
  localparam int WN = sbist_pkg::cnt_width(N);
  localparam int WM = sbist_pkg::cnt_width(M);
  localparam int WK = sbist_pkg::cnt_width(K);
  localparam int WP = sbist_pkg::cnt_width(NUM_PR);

  logic clk = 0, rst_n = 0, start = 0, mixed_mode = 0;
  logic busy, done, scan_en, capture, use_prpg;
  logic [31:0] signature;
  logic [W-1:0] cut_q, cut_d;
  logic [WN-1:0] position;
  logic [WM-1:0] pattern;
  logic [WK-1:0] group;
  logic [WP-1:0] pr_count;
  sbist_pkg::bist_state_e phase;

  if (FULL) begin : g_full
    scan_bist_top dut (.*);
  end else begin : g_small
    scan_bist_top #(.N(N), .M(M), .CHAINS(CHAINS), .K(K), .NUM_PR(NUM_PR)) dut (.*);
  end

  // circuit under test: r[c] = q[c] ^ (q[c-1] & q[c+1]) ^ (c % 3 == 0),
  // over all W cells of all chains (indices modulo W)
  function automatic logic [W-1:0] cut_fn(logic [W-1:0] q);
    logic [W-1:0] r;
    for (int c = 0; c < W; c++)
      r[c] = q[c] ^ (q[(c + W - 1) % W] & q[(c + 1) % W]) ^ (c % 3 == 0);
    return r;
  endfunction
  assign cut_d = cut_fn(cut_q);

  always #5 clk = ~clk;

  // mechanism counters
  int n_shift, n_capture, n_step, n_wrap, n_group_sw, n_pr, n_switch, n_flush, n_sessions;
  logic [WM-1:0] pattern_q;
  logic [WK-1:0] group_q;
  logic use_prpg_q;
  always_ff @(posedge clk) begin
    pattern_q  <= pattern;
    group_q    <= group;
    use_prpg_q <= use_prpg;
    if (rst_n) begin
      if (phase == sbist_pkg::BIST_SHIFT) n_shift++;
      if (phase == sbist_pkg::BIST_FLUSH) n_flush++;
      if (capture) n_capture++;
      if (capture && use_prpg) n_pr++;
      if (pattern != pattern_q) n_step++;
      if (pattern == 0 && 32'(pattern_q) == M - 1) n_wrap++;
      if (group != group_q) n_group_sw++;
      if (use_prpg_q && !use_prpg) n_switch++;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // one session with the reference model running alongside
  task automatic session(bit mixed);
    int npr, p, cycles, last_capture;
    logic [31:0] lfsr, sig;
    logic [W-1:0] exp_pat, prev_resp;
    logic [CHAINS-1:0] din;
    npr = mixed ? NUM_PR : 0;
    lfsr = 32'hACE1_2468;
    sig = '0;
    @(negedge clk);
    mixed_mode = mixed;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    last_capture = -1;
    for (p = 0; p < npr + M; p++) begin
      // expected pattern: pseudorandom bits enter cell 0 and move up
      if (p < npr) begin
        for (int k = 0; k < N; k++) begin
          for (int j = 0; j < CHAINS; j++) begin
            for (int c = N - 1; c > 0; c--) exp_pat[j*N + c] = exp_pat[j*N + c - 1];
            exp_pat[j*N] = lfsr[31 - j*STRIDE];
          end
          lfsr = {lfsr[30:0], 1'b0} ^ (lfsr[31] ? 32'h0040_0007 : 32'h0);
        end
      end else begin
        for (int c = 0; c < W; c++) exp_pat[c] = sbist_pkg::td_bit(1, p - npr, c);
      end
      // the previous response leaves MSB first while this pattern enters
      if (p > 0)
        for (int k = 0; k < N; k++)
        begin
          for (int j = 0; j < CHAINS; j++) din[j] = prev_resp[j*N + N-1-k];
          sig = {sig[30:0], 1'b0} ^ (sig[31] ? 32'h0040_0007 : 32'h0) ^ 32'(din);
        end
      while (!capture) begin @(negedge clk); cycles++; end
      check(cut_q == exp_pat, $sformatf("pattern %0d in chain at capture", p));
      check(use_prpg == (p < npr), $sformatf("source of pattern %0d", p));
      if (p >= npr) check(32'(pattern) == p - npr, $sformatf("FSM state %0d for pattern %0d", pattern, p - npr));
      prev_resp = cut_fn(exp_pat);
      @(negedge clk); cycles++;
      last_capture = cycles;
    end
    check(last_capture == (npr + M) * (N + 1),
          $sformatf("test length %0d cycles, expected %0d", last_capture, (npr + M) * (N + 1)));
    for (int k = 0; k < N; k++)
    begin
      for (int j = 0; j < CHAINS; j++) din[j] = prev_resp[j*N + N-1-k];
      sig = {sig[30:0], 1'b0} ^ (sig[31] ? 32'h0040_0007 : 32'h0) ^ 32'(din);
    end
    while (!done) begin @(negedge clk); cycles++; end
    check(cycles == (npr + M) * (N + 1) + N, $sformatf("session length %0d", cycles));
    check(signature == sig, $sformatf("signature %h expected %h", signature, sig));
    check(!busy && pattern == 0, "idle in S_1 after session");
    n_sessions++;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    n_shift = 0; n_capture = 0; n_step = 0; n_wrap = 0; n_group_sw = 0;
    n_pr = 0; n_switch = 0; n_flush = 0; n_sessions = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    session(1'b0);
    if (RUN_MIXED) session(1'b1);
    session(1'b0);
    $display("mechanisms: shift=%0d capture=%0d fsm_step=%0d wrap=%0d group_switch=%0d pr_patterns=%0d lfsr_to_bgl=%0d flush=%0d sessions=%0d",
             n_shift, n_capture, n_step, n_wrap, n_group_sw, n_pr, n_switch, n_flush, n_sessions);
    check(n_shift > 0, "shift never happened");
    check(n_capture > 0, "capture never happened");
    check(n_step > 0, "FSM never stepped");
    check(n_wrap > 0, "FSM never wrapped S_M -> S_1");
    check(K == 1 || n_group_sw > 0, "partition group never switched");
    check(!RUN_MIXED || n_pr == NUM_PR, "pseudorandom phase count");
    check(!RUN_MIXED || n_switch > 0, "LFSR -> BGL switch never happened");
    check(n_flush > 0, "flush never happened");
    finished = 1;
  end
endmodule
