// tb_scan_chain - self-checking test of the scan chain (N = 9).
// Random bits are shifted in and the chain contents and scan-out are
// compared with a queue model; capture (scan_en = 0) must load d in one
// clock, and the captured word must then leave scan-out MSB first.
module tb_scan_chain;
  localparam int N = 9;
  logic clk = 0, scan_en = 0, scan_in = 0, scan_out;
  logic [N-1:0] d, q;
  int checks = 0, failures = 0;

  scan_chain #(.N(N)) dut (.clk, .scan_en, .scan_in, .d, .q, .scan_out);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit model [N];
    logic [N-1:0] cap;
    for (int round = 0; round < 20; round++) begin
      // shift N random bits
      scan_en = 1;
      for (int k = 0; k < N; k++) begin
        scan_in = 1'($urandom);
        @(negedge clk);
        for (int c = N - 1; c > 0; c--) model[c] = model[c-1];
        model[0] = scan_in;
      end
      for (int c = 0; c < N; c++) begin
        checks++;
        if (q[c] !== model[c]) begin failures++; $display("round %0d cell %0d", round, c); end
      end
      // capture
      cap = N'($urandom);
      d = cap;
      scan_en = 0;
      @(negedge clk);
      d = ~cap;
      checks++;
      if (q !== cap) begin failures++; $display("capture failed"); end
      // unload: scan-out must show cells N-1 .. 0
      scan_en = 1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (scan_out !== cap[N-1-k]) begin failures++; $display("scan-out bit %0d", k); end
        scan_in = 1'($urandom);
        @(negedge clk);
        for (int c = N - 1; c > 0; c--) model[c] = model[c-1];
        model[0] = scan_in;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
