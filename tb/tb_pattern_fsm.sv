// tb_pattern_fsm - self-checking test of the pattern-delivery FSM.
// M = 4 patterns of N = 3 bits.  For each state the position counter is
// swept and the scan-in bits compared with the pattern; then the FSM is
// advanced, and the cyclic S_1 -> ... -> S_M -> S_1 order, at_last and
// clear are checked.
module tb_pattern_fsm;
  localparam int M = 4, N = 3;
  localparam logic [N-1:0] TS [M] = '{3'b001, 3'b101, 3'b110, 3'b011};

  logic clk = 0, rst_n = 0, clear = 0, advance = 0;
  logic [1:0] pos, state;
  logic bit_out, at_last;
  int checks = 0, failures = 0;

  pattern_fsm #(.M(M), .N(N), .TEST_SET(TS)) dut (.clk, .rst_n, .clear, .advance, .pos, .state, .bit_out, .at_last);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [N-1:0] pat [M];
    pat[0] = 3'b001; pat[1] = 3'b101; pat[2] = 3'b110; pat[3] = 3'b011;
    pos = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++)
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        check(state == 2'(i), $sformatf("state %0d expected %0d", state, i));
        check(at_last == (i == M - 1), "at_last");
        for (int p = 0; p < N; p++) begin
          pos = 2'(p);
          #1;
          check(bit_out == pat[i][N-1-p], $sformatf("bit i=%0d p=%0d", i, p));
        end
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
    // hold without advance
    @(negedge clk);
    check(state == 0, "wrapped to S_1");
    advance = 1; @(negedge clk); advance = 0;
    repeat (3) @(negedge clk);
    check(state == 1, "hold in S_2");
    clear = 1; @(negedge clk); clear = 0;
    check(state == 0, "clear to S_1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
