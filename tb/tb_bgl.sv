// tb_bgl - self-checking test of the bit generation logic.
// A 3-pattern, 5-cell test set written out cell by cell is checked for
// every (state, position): the bit shifted in at position p must be the
// value of cell N-1-p.  The default-sized instance (94 x 611) is checked
// against sbist_pkg::td_bit for a sample of entries, and a two-chain
// instance must give each chain its own part of every pattern.
module tb_bgl;
  localparam int M = 3, N = 5;
  // t[i][c]: value of scan cell c in pattern i
  localparam logic [N-1:0] T0 = 5'b10110;  // cells 4..0
  localparam logic [N-1:0] T1 = 5'b00011;
  localparam logic [N-1:0] T2 = 5'b11101;
  localparam logic [N-1:0] TS [M] = '{T0, T1, T2};

  logic [1:0] state;
  logic [2:0] pos;
  logic bit_out;
  logic [6:0] state_d;
  logic [9:0] pos_d;
  logic bit_d;
  logic [1:0] bits2;
  int checks = 0, failures = 0;

  bgl #(.M(M), .N(N), .TEST_SET(TS)) dut (.state, .pos, .bit_out);
  bgl dut_d (.state(state_d), .pos(pos_d), .bit_out(bit_d));
  // two chains of 5 cells: pattern i = {chain 1, chain 0}
  localparam logic [2*N-1:0] TS2 [M] = '{{T1, T0}, {T2, T1}, {T0, T2}};
  bgl #(.M(M), .N(N), .CHAINS(2), .TEST_SET(TS2)) dut2 (.state, .pos, .bit_out(bits2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] t [M];
    t[0] = T0; t[1] = T1; t[2] = T2;
    for (int i = 0; i < M; i++)
      for (int p = 0; p < N; p++) begin
        state = 2'(i); pos = 3'(p);
        #1;
        checks++;
        if (bits2[0] !== t[i][N-1-p] || bits2[1] !== t[(i + 1) % M][N-1-p]) begin
          failures++;
          $display("2 chains: state %0d pos %0d: got %b", i, p, bits2);
        end
        checks++;
        if (bit_out !== t[i][N-1-p]) begin
          failures++;
          $display("state %0d pos %0d: got %0b exp %0b", i, p, bit_out, t[i][N-1-p]);
        end
      end
    for (int k = 0; k < 2000; k++) begin
      int i, p;
      i = $urandom_range(0, 93);
      p = $urandom_range(0, 610);
      state_d = 7'(i); pos_d = 10'(p);
      #1;
      checks++;
      if (bit_d !== sbist_pkg::td_bit(1, i, 610 - p)) begin
        failures++;
        $display("default: state %0d pos %0d mismatch", i, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
