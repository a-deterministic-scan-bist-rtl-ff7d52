// lfsr_prpg - pseudorandom pattern generator for mixed-mode BIST.
//
// An internal-XOR (Galois) LFSR of WIDTH bits with characteristic
// polynomial x^WIDTH + POLY; one new bit per enabled clock is fed to the
// scan chain through the 2:1 source multiplexer during the pseudorandom
// phase, before the deterministic patterns are applied.  The width,
// polynomial and seed are choices of this design (the architecture only
// names an LFSR); the default x^32+x^22+x^2+x+1 is primitive, so the
// sequence repeats only after 2^32-1 bits.
//
// Interface: load puts SEED into the register (priority over en); en
// shifts once; bit_out is the current MSB, i.e. the bit shifted into the
// chain on this cycle.  rst_n is asynchronous and also loads SEED.
module lfsr_prpg #(
  parameter int                WIDTH = 32,
  parameter logic [WIDTH-1:0]  POLY  = WIDTH'(sbist_pkg::POLY32),
  parameter logic [WIDTH-1:0]  SEED  = WIDTH'(32'hACE1_2468)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic             bit_out,
  output logic [WIDTH-1:0] state
);

  initial begin
    assert (SEED != '0) else $fatal(1, "lfsr_prpg: an all-zero seed locks the LFSR");
  end

  assign bit_out = state[WIDTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= SEED;
    else if (load)   state <= SEED;
    else if (en)     state <= {state[WIDTH-2:0], 1'b0} ^ (state[WIDTH-1] ? POLY : '0);
  end

endmodule
