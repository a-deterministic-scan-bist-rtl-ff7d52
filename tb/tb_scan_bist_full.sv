// tb_scan_bist_full - scan_bist_top at its default sizes (one chain of
// 611 cells, 94 deterministic patterns, K = 1): two complete
// deterministic sessions of 94*612 cycles plus flush each, checked by
// sbist_top_harness.  Mixed mode is not run here: at its default of 2^20
// pseudorandom patterns it needs about 6.4e8 cycles.
module tb_scan_bist_full;
  int checks, failures;
  bit finished;

  sbist_top_harness #(.FULL(1), .N(611), .M(94), .K(1), .NUM_PR(1048576), .RUN_MIXED(0))
    h (.checks, .failures, .finished);

  initial begin
    #5_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
