// sample_counter -- one of the per-phase sample counters L1, L2, L3.
//
// A W-bit (10-bit) counter that advances by one on every CLK2 enable, i.e.
// once per control cycle, and is cleared by its phase's CLR line from the
// zero-crossing detector.  Its value is the number of the template sample
// that belongs to the current instant of the phase and forms the lower part
// of the template memory address.  Clear has priority over the increment;
// if no zero crossing arrives the counter wraps modulo 2^W.  Counting,
// clearing and the width follow the document; the priority, the wrap and
// the reset are this design's choices.
module sample_counter #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,   // CLK2 enable
  input  logic         clr,    // CLRA / CLRB / CLRC
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (tick)  q <= q + 1'b1;
  end

endmodule
