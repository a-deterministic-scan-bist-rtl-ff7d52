// mod_counter - modulo-MOD binary up-counter.
//
// Used twice in the scan-BIST: as the position counter (MOD = n, the scan
// chain length), which sequences the bits of one pattern and belongs to the
// BIST controller, and as the pattern counter (MOD = m, or m/k for one
// partition), which holds the state S_1..S_m of the pattern-delivery FSM.
// The position counter is a plain binary counter whose states follow the
// normal binary sequence, as the architecture requires of it.
//
// Interface: clear (synchronous, priority over en) returns the count to 0;
// en advances it by one per clock and wraps from MOD-1 to 0.  at_max is 1
// while count == MOD-1, i.e. on the cycle whose increment wraps.  rst_n is
// an asynchronous active-low reset to 0 (a choice of this design).
module mod_counter #(
  parameter int MOD = 611,
  localparam int W  = sbist_pkg::cnt_width(MOD)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         at_max
);

  assign at_max = (count == W'(MOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           count <= '0;
    else if (clear)       count <= '0;
    else if (en) begin
      if (at_max)         count <= '0;
      else                count <= count + 1'b1;
    end
  end

endmodule
