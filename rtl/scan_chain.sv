// scan_chain - one scan chain of N mux-D scan cells.
//
// In the full-scan circuit under test these are the circuit's own state
// flip-flops with a scan multiplexer in front.  With scan_en = 1 the chain
// shifts one place per clock: scan_in enters cell 0, cell c takes cell
// c-1, and cell N-1 drives scan_out.  With scan_en = 0 every cell loads
// its functional input d[c] (the circuit's next-state / response bit),
// which is how the BIST captures a test response in one functional clock.
// q drives the circuit under test.  The cells have no reset, as functional
// scan flip-flops generally need none for test; the BIST never reads a
// value that was not first shifted in or captured.
module scan_chain #(
  parameter int N = 611
) (
  input  logic         clk,
  input  logic         scan_en,
  input  logic         scan_in,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         scan_out
);

  assign scan_out = q[N-1];

  always_ff @(posedge clk) begin
    if (scan_en) begin
      if (N > 1) q <= {q[N-2:0], scan_in};
      else       q <= N'(scan_in);
    end else begin
      q <= d;
    end
  end

endmodule
