// tb_lfsr_prpg - self-checking test of the pseudorandom pattern source.
// A 4-bit instance with x^4 + x + 1 must visit all 15 non-zero states
// before repeating; the default 32-bit instance is compared bit by bit
// with a reference written as polynomial arithmetic (multiply by x modulo
// the characteristic polynomial), including load and hold.
module tb_lfsr_prpg;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic b4, b32;
  logic [3:0] s4;
  logic [31:0] s32;
  int checks = 0, failures = 0;

  lfsr_prpg #(.WIDTH(4), .POLY(4'b0011), .SEED(4'b0001)) dut4 (.clk, .rst_n, .load, .en, .bit_out(b4), .state(s4));
  lfsr_prpg dut32 (.clk, .rst_n, .load, .en, .bit_out(b32), .state(s32));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // multiply by x modulo x^32 + x^22 + x^2 + x + 1
  function automatic logic [31:0] times_x(logic [31:0] a);
    logic [32:0] p;
    p = {a, 1'b0};
    if (p[32]) p = p ^ 33'h1_0040_0007;
    return p[31:0];
  endfunction

  initial begin
    bit seen [16];
    logic [31:0] r;
    int distinct = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (s4 != 4'b0001 || s32 != 32'hACE1_2468) failures++;
    en = 1;
    r = 32'hACE1_2468;
    for (int k = 0; k < 15; k++) begin
      if (!seen[s4]) distinct++;
      seen[s4] = 1;
      checks++;
      if (b32 !== r[31] || s32 !== r) begin failures++; $display("32-bit mismatch at %0d", k); end
      @(negedge clk);
      r = times_x(r);
    end
    checks++;
    if (distinct != 15 || s4 != 4'b0001 || seen[0]) begin
      failures++; $display("4-bit period wrong: distinct=%0d", distinct);
    end
    for (int k = 0; k < 500; k++) begin
      en = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (en) r = times_x(r);
      checks++;
      if (s32 !== r) begin failures++; $display("32-bit mismatch at %0d", k); end
    end
    load = 1; @(negedge clk); load = 0;
    checks++;
    if (s32 !== 32'hACE1_2468) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
