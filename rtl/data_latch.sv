// data_latch -- enable-loaded holding register, used for Z1, Z2 and Z3.
//
// On a rising clock edge with en high, q takes d; otherwise q holds.
// Z1 (12 bits) holds the A/D word, loaded by EN1 while the converter drives
// the D bus; Z2 (12 bits) holds the template word, loaded by EN2 while the
// memory drives the same bus; Z3 (8 bits) holds the lower 8 bits of the
// phase-A sample counter, loaded by EN3 at a phase-A zero crossing, and
// gives the frequency part of the template address.  The document calls
// these latches; they are built here as edge-triggered registers with a
// clock enable, cleared by the synchronous active-low reset.
module data_latch #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)   q <= '0;
    else if (en)  q <= d;
  end

endmodule
