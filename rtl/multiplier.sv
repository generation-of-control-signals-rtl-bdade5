// multiplier -- combinational multiplier functional block.
//
// The datapath of the example transition allocates one multiplier for the
// product x*y.  The block is treated as pre-designed; here it is a plain
// unsigned W x W multiply that keeps the low W bits, so that the product fits
// the W-bit register tmp it is stored in (the width and the truncation are
// this design's choice).
//
// Interface: a, b (W bits) -> p (W bits).  Timing: combinational.
module multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);

  // The product is evaluated at W bits: the carry out of bit W-1 is dropped.
  assign p = a * b;

endmodule
