// tb_table1_circuits - the fully deterministic BIST at the scan-chain
// lengths and test-set sizes of the benchmark circuits it was synthesized
// for (s15850 is covered by tb_scan_bist_full).  Each configuration runs
// two complete deterministic sessions through sbist_top_harness, which
// checks every applied pattern, the test length of m*(n+1) cycles and the
// signature.  CKT2's 371 patterns are split into 25 partitions, as in
// the partitioned architecture.  The test sets are the built-in
// stand-ins, not the circuits' ATPG sets.
module tb_table1_circuits;
  localparam int NCFG = 5;
  int c [NCFG], f [NCFG];
  bit d [NCFG];

  sbist_top_harness #(.N(1763), .M(12),  .K(1),  .NUM_PR(2), .RUN_MIXED(0)) s35932 (.checks(c[0]), .failures(f[0]), .finished(d[0]));
  sbist_top_harness #(.N(1664), .M(68),  .K(1),  .NUM_PR(2), .RUN_MIXED(0)) s38417 (.checks(c[1]), .failures(f[1]), .finished(d[1]));
  sbist_top_harness #(.N(1464), .M(110), .K(1),  .NUM_PR(2), .RUN_MIXED(0)) s38584 (.checks(c[2]), .failures(f[2]), .finished(d[2]));
  sbist_top_harness #(.N(282),  .M(45),  .K(1),  .NUM_PR(2), .RUN_MIXED(0)) ckt1   (.checks(c[3]), .failures(f[3]), .finished(d[3]));
  sbist_top_harness #(.N(862),  .M(371), .K(25), .NUM_PR(2), .RUN_MIXED(0)) ckt2   (.checks(c[4]), .failures(f[4]), .finished(d[4]));

  function automatic int total(int a [NCFG]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    #20_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
