// tb_scan_bist_top - end-to-end test of scan_bist_top at reduced sizes.
// Four configurations run side by side: a partitioned source (N = 13,
// M = 7, K = 3) with mixed mode; a single-FSM source (K = 1) on three
// scan chains with mixed mode; two chains with a partitioned source; and
// the CKT2-like split of 371 patterns into 25 groups on a short chain
// (N = 6).  See sbist_top_harness for what is checked.
module tb_scan_bist_top;
  int c0, f0, c1, f1, c2, f2, c3, f3;
  bit d0, d1, d2, d3;

  sbist_top_harness #(.N(13), .M(7),   .K(3),  .NUM_PR(4), .RUN_MIXED(1)) h0 (.checks(c0), .failures(f0), .finished(d0));
  sbist_top_harness #(.N(9),  .M(5),   .K(1),  .NUM_PR(3), .RUN_MIXED(1), .CHAINS(3)) h1 (.checks(c1), .failures(f1), .finished(d1));
  sbist_top_harness #(.N(6),  .M(371), .K(25), .NUM_PR(2), .RUN_MIXED(0)) h2 (.checks(c2), .failures(f2), .finished(d2));
  sbist_top_harness #(.N(7),  .M(10),  .K(2),  .NUM_PR(5), .RUN_MIXED(1), .CHAINS(2)) h3 (.checks(c3), .failures(f3), .finished(d3));

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end
endmodule
