// address_mux1 -- MUX1, the 10-bit source selector of bus lines A[0..9].
//
// Selected by S3,S2: the compensation word Z[0..9] while a D/A converter is
// written, or the sample number MA, MB or MC of one phase while the
// template memory is read.  Purely combinational.  The four inputs and the
// select lines are those of the logic diagram; the select code assignment
// (apf_pkg::mux1_sel_e) is this design's choice.
module address_mux1
  import apf_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  mux1_sel_e    sel,   // S3,S2
  input  logic [W-1:0] z,     // Z[0..9]
  input  logic [W-1:0] ma,    // MA[0..9]
  input  logic [W-1:0] mb,    // MB[0..9]
  input  logic [W-1:0] mc,    // MC[0..9]
  output logic [W-1:0] a      // A[0..9]
);

  always_comb begin
    unique case (sel)
      SEL_Z:   a = z;
      SEL_MA:  a = ma;
      SEL_MB:  a = mb;
      SEL_MC:  a = mc;
      default: a = z;
    endcase
  end

endmodule
