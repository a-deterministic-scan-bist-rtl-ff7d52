// tb_table3_mixed_mode - mixed-mode BIST at the scan-chain lengths and
// deterministic pattern counts of the mixed-mode configurations
// (s13207, s15850, s38417, s38584).  Their pseudorandom phases of 64K to
// 2M patterns would take 4.6e7 to 3.3e9 cycles, so NUM_PR is cut to 16
// here; the LFSR phase, the switch to the bit generation logic, the
// deterministic phase and the signature are all checked by
// sbist_top_harness.
module tb_table3_mixed_mode;
  localparam int NCFG = 4;
  int c [NCFG], f [NCFG];
  bit d [NCFG];

  sbist_top_harness #(.N(700),  .M(17), .K(1), .NUM_PR(16), .RUN_MIXED(1)) s13207 (.checks(c[0]), .failures(f[0]), .finished(d[0]));
  sbist_top_harness #(.N(611),  .M(65), .K(1), .NUM_PR(16), .RUN_MIXED(1)) s15850 (.checks(c[1]), .failures(f[1]), .finished(d[1]));
  sbist_top_harness #(.N(1664), .M(26), .K(1), .NUM_PR(16), .RUN_MIXED(1)) s38417 (.checks(c[2]), .failures(f[2]), .finished(d[2]));
  sbist_top_harness #(.N(1464), .M(50), .K(1), .NUM_PR(16), .RUN_MIXED(1)) s38584 (.checks(c[3]), .failures(f[3]), .finished(d[3]));

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
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
