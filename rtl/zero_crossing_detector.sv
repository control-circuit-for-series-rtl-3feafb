// zero_crossing_detector -- DZ1.
//
// The sign bit D11 of each phase's A/D word is offered to the detector while
// that word is on the D bus, together with the phase strobe FA, FB or FC from
// the decoder.  The detector remembers the previous sign of every phase.  A
// change from negative (D11 = 1, two's complement) to non-negative is a
// rising zero crossing: in the strobe cycle the detector raises the phase's
// clear line (CLRA, CLRB, CLRC), which restarts that phase's sample counter
// at the next clock edge, and for phase A also EN3, which loads the lower
// 8 bits of L1 into Z3 at the same edge, before the counter is cleared.
// Outputs are combinational in the strobe cycle; the sign memory updates at
// the clock edge of the strobe.  That the detector uses D11 and drives the
// three clear lines and EN3 follows the logic diagram; detecting only the
// rising crossing, without hysteresis, is this design's choice.
module zero_crossing_detector #(
  parameter int unsigned NPH = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           d11,      // sign bit of the word on the D bus
  input  logic [NPH-1:0] strobe,   // FA (bit 0), FB, FC
  output logic [NPH-1:0] clr,      // CLRA (bit 0), CLRB, CLRC
  output logic           en3       // load Z3 (phase A crossing)
);

  logic [NPH-1:0] was_neg;

  always_ff @(posedge clk) begin
    if (!rst_n) was_neg <= '0;
    else begin
      for (int p = 0; p < NPH; p++)
        if (strobe[p]) was_neg[p] <= d11;
    end
  end

  always_comb begin
    for (int p = 0; p < NPH; p++)
      clr[p] = strobe[p] && was_neg[p] && !d11;
  end

  assign en3 = clr[0];

endmodule
