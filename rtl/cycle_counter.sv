// cycle_counter -- the instruction counter L0.
//
// Counts the system clock modulo MOD (242 in the reference configuration).
// Its state q addresses the control decoder D1, so one pass through the
// 242 states is one control cycle.  tick (the CLK2 line) is high for one
// clock in the last state of the cycle; it is used as a clock enable by the
// sample counters, so the sample time step equals one control cycle
// (242 / 11.0592 MHz = 21.9 us).  The modulus and width follow the logic
// diagram; producing CLK2 as a one-clock enable in the last state, instead
// of a divided clock, and the synchronous active-low reset are this
// design's choices.
module cycle_counter #(
  parameter int unsigned MOD = 242,
  parameter int unsigned W   = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] q,      // current step of the control cycle
  output logic         tick    // CLK2: last step of the cycle
);

  localparam logic [W-1:0] LAST = W'(MOD - 1);

  always_ff @(posedge clk) begin
    if (!rst_n)          q <= '0;
    else if (q == LAST)  q <= '0;
    else                 q <= q + 1'b1;
  end

  assign tick = (q == LAST);

endmodule
