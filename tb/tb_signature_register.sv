// tb_signature_register - self-checking test of the response compactor.
// The serial instance must hold, after L enabled bits d_0..d_(L-1), the
// remainder of sum d_k x^(L-1-k) modulo x^32+x^22+x^2+x+1, computed here
// by long division of the whole stream.  A 4-input MISR instance is
// checked against a per-clock reference, and linearity (signature of
// a xor b equals the xor of the signatures) is used to show that a
// single flipped response bit changes the signature.
module tb_signature_register;
  localparam int L = 200;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [0:0] din;
  logic [3:0] din4;
  logic [31:0] sig, sig4;
  int checks = 0, failures = 0;

  signature_register dut (.clk, .rst_n, .clear, .en, .din, .signature(sig));
  signature_register #(.NUM_IN(4)) dut4 (.clk, .rst_n, .clear, .en, .din(din4), .signature(sig4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // remainder of the stream polynomial by long division
  function automatic logic [31:0] divide(bit s [L]);
    logic [L+31:0] poly;
    poly = '0;
    for (int k = 0; k < L; k++) poly[L-1-k] = s[k];
    for (int b = L + 31; b >= 32; b--)
      if (poly[b]) poly[b -: 33] = poly[b -: 33] ^ 33'h1_0040_0007;
    return poly[31:0];
  endfunction

  task automatic run(bit s [L], bit use_en_gaps, output logic [31:0] got);
    logic [31:0] m4;
    clear = 1; @(negedge clk); clear = 0;
    m4 = '0;
    for (int k = 0; k < L; k++) begin
      if (use_en_gaps && $urandom_range(0, 3) == 0) begin
        en = 0; din = 1'($urandom); @(negedge clk);
      end
      en = 1;
      din = s[k];
      din4 = 4'($urandom);
      m4 = {m4[30:0], 1'b0} ^ (m4[31] ? 32'h0040_0007 : 32'h0) ^ {28'h0, din4};
      @(negedge clk);
      checks++;
      if (sig4 !== m4) begin failures++; $display("MISR mismatch at %0d", k); end
    end
    en = 0;
    got = sig;
  endtask

  initial begin
    bit a [L], b [L], c [L];
    logic [31:0] sa, sb, sc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < L; k++) begin a[k] = 1'($urandom); b[k] = 0; end
    b[$urandom_range(0, L - 1)] = 1;
    for (int k = 0; k < L; k++) c[k] = a[k] ^ b[k];
    run(a, 1, sa);
    checks++; if (sa !== divide(a)) begin failures++; $display("sig a %h exp %h", sa, divide(a)); end
    run(b, 0, sb);
    checks++; if (sb !== divide(b)) begin failures++; $display("sig b"); end
    run(c, 1, sc);
    checks++; if (sc !== divide(c)) begin failures++; $display("sig c"); end
    checks++; if (sc !== (sa ^ sb) || sc == sa) begin failures++; $display("linearity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
