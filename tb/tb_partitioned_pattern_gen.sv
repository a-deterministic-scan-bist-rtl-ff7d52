// tb_partitioned_pattern_gen - self-checking test of the partitioned
// pattern source: M = 7 patterns, N = 4 cells, K = 3 groups (3 + 3 + 1).
// Each pattern is swept over all positions and compared with the test
// set; the global pattern index, the group select, the group switches and
// the wrap from the last pattern to the first are checked over two rounds.
module tb_partitioned_pattern_gen;
  localparam int M = 7, N = 4, K = 3;
  localparam logic [N-1:0] TS [M] = '{4'hE, 4'h6, 4'hA, 4'h5, 4'h3, 4'hC, 4'h9};

  logic clk = 0, rst_n = 0, clear = 0, advance = 0;
  logic [1:0] pos, group;
  logic [2:0] pattern;
  logic bit_out, at_last;
  int checks = 0, failures = 0;
  int group_switches = 0;

  partitioned_pattern_gen #(.M(M), .N(N), .K(K), .TEST_SET(TS)) dut (
    .clk, .rst_n, .clear, .advance, .pos, .bit_out, .pattern, .group, .at_last);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [1:0] prev_group;
    pos = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_group = 0;
    for (int round = 0; round < 2; round++)
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        check(pattern == 3'(i), $sformatf("pattern %0d expected %0d", pattern, i));
        check(group == 2'(i / 3), $sformatf("group %0d for pattern %0d", group, i));
        check(at_last == (i == M - 1), "at_last");
        if (group != prev_group) group_switches++;
        prev_group = group;
        for (int p = 0; p < N; p++) begin
          pos = 2'(p);
          #1;
          check(bit_out == TS[i][N-1-p], $sformatf("bit i=%0d p=%0d", i, p));
        end
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
    check(group_switches == 2 * K - 1, $sformatf("group switches %0d", group_switches));
    advance = 1; @(negedge clk); advance = 0;
    clear = 1; @(negedge clk); clear = 0;
    check(pattern == 0 && group == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
