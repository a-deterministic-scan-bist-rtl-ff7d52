// signature_register - response compactor (serial / multiple-input
// signature register).
//
// Compresses the scan-out stream into a WIDTH-bit signature by polynomial
// division: on each enabled clock the register shifts left, the bit
// leaving the MSB feeds back through POLY (internal XOR), and the NUM_IN
// scan-out bits are XORed into the low bits.  With NUM_IN = 1 this is a
// serial signature register for one scan chain; with NUM_IN > 1 (one bit
// per chain) it is a MISR.  The architecture only asks for a compactor
// large enough for a very low aliasing probability; the 32-bit width and
// primitive polynomial x^32+x^22+x^2+x+1 are this design's choice
// (aliasing about 2^-32).
//
// Interface: clear zeroes the signature (priority over en), en compacts
// din.  rst_n is asynchronous, to zero.
module signature_register #(
  parameter int               WIDTH  = 32,
  parameter int               NUM_IN = 1,
  parameter logic [WIDTH-1:0] POLY   = WIDTH'(sbist_pkg::POLY32)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic [NUM_IN-1:0] din,
  output logic [WIDTH-1:0]  signature
);

  initial begin
    assert (NUM_IN <= WIDTH) else $fatal(1, "signature_register: NUM_IN > WIDTH");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      signature <= '0;
    else if (clear)  signature <= '0;
    else if (en)     signature <= {signature[WIDTH-2:0], 1'b0}
                                  ^ (signature[WIDTH-1] ? POLY : '0)
                                  ^ WIDTH'(din);
  end

endmodule
