// address_mux2 -- MUX2, the 8-bit source selector of bus lines A[10..17].
//
// Selected by S4: NB[0..7], the frequency word from Z3 that forms the upper
// template address, while the memory is read (S4 = 1), or NA[0..7], the
// upper compensation bits Z[10..11] together with the D/A latch controls,
// while a D/A converter is written (S4 = 0).  Purely combinational.  The
// inputs and the select line follow the logic diagram; the polarity of S4
// is this design's choice.
module address_mux2 #(
  parameter int unsigned W = 8
) (
  input  logic         sel,   // S4
  input  logic [W-1:0] na,    // NA[0..7]
  input  logic [W-1:0] nb,    // NB[0..7]
  output logic [W-1:0] a      // A[10..17]
);

  always_comb a = sel ? nb : na;

endmodule
