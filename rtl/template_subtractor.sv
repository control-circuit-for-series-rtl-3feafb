// template_subtractor -- the SUM adder.
//
// Combinational: z = y - x, the reference compensation voltage
// vF = vL - vsin, where y is the line-voltage sample held in Z1 and x the
// sinusoidal template sample held in Z2.  All three words are two's
// complement.  As in a plain W-bit adder the result is taken modulo 2^W,
// so a difference outside the W-bit range wraps; with the template close to
// the line fundamental the difference stays small.  The subtraction follows
// the document; the number format is this design's choice.
module template_subtractor #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] y,   // Y[0..11]: line voltage vL
  input  logic [W-1:0] x,   // X[0..11]: template vsin
  output logic [W-1:0] z    // Z[0..11]: compensation reference vF
);

  always_comb z = y - x;

endmodule
