// tb_mod_counter - self-checking test of mod_counter (MOD = 5 and MOD = 1).
// Drives random enable and clear and compares count and at_max with an
// integer reference model every cycle.
module tb_mod_counter;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [2:0] count;
  logic at_max;
  logic [0:0] count1;
  logic at_max1;
  int checks = 0, failures = 0;
  int ref_cnt = 0;

  mod_counter #(.MOD(5)) dut (.clk, .rst_n, .clear, .en, .count, .at_max);
  mod_counter #(.MOD(1)) dut1 (.clk, .rst_n, .clear, .en, .count(count1), .at_max(at_max1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wraps = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      checks++;
      if (count !== 3'(ref_cnt) || at_max !== (ref_cnt == 4)) begin
        failures++;
        $display("mismatch k=%0d count=%0d ref=%0d at_max=%0b", k, count, ref_cnt, at_max);
      end
      checks++;
      if (count1 !== 1'b0 || at_max1 !== 1'b1) failures++;
      en    = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 30) == 0);
      if (clear)   ref_cnt = 0;
      else if (en) begin
        if (ref_cnt == 4) wraps++;
        ref_cnt = (ref_cnt + 1) % 5;
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
