// control_decoder -- D1, the decoder of the instruction counter L0.
//
// Purely combinational: maps the control-cycle step q (0..241) to one
// control word (apf_pkg::ctrl_t).  Per phase p the schedule is
//   * S1,S0 = p from MUX_LEAD clocks before the phase's conversion;
//   * CONV_AT[p]:            CS with RC = 0 for CONV_LEN clocks (convert);
//   * PROC_AT[p] + 0..2:     CS with RC = 1 and DIR (A/D word on the D bus);
//                            at + 2 EN1 loads Z1 and the strobe F[p] hands
//                            the sign bit to the zero-crossing detector;
//   * PROC_AT[p] + 3..6:     G, S3,S2 = sample counter of phase p and S4 = 1
//                            (template address on A[0..17], word on the D
//                            bus); at + 6 EN2 loads Z2;
//   * WRITE_AT[p] + 0..1:    WR[p] with LDAC, LLSB and LMSB (Z on the A bus).
// Outside the memory read MUX1 and MUX2 select Z and NA, so the A bus
// carries the compensation word whenever a D/A converter is written.  The
// schedule is the one of the timing diagram (about 19.2 us of the 21.9 us
// cycle are used); the list of decoded lines is that of the logic diagram;
// the order and length of the short strobes inside a window are this
// design's choices.
module control_decoder
  import apf_pkg::*;
(
  input  cycle_t q,
  output ctrl_t  c
);

  always_comb begin
    c      = '0;
    c.rc   = 1'b1;
    c.s32  = SEL_Z;
    c.s4   = 1'b0;

    // Analog multiplexer address: each phase from MUX_LEAD clocks before its
    // conversion until the next phase takes over.
    if (q >= CONV_AT[2] - cycle_t'(MUX_LEAD))      c.s = 2'd2;
    else if (q >= CONV_AT[1] - cycle_t'(MUX_LEAD)) c.s = 2'd1;
    else                                           c.s = 2'd0;

    for (int p = 0; p < NPHASE; p++) begin
      // Convert command.
      if (q >= CONV_AT[p] && q < CONV_AT[p] + cycle_t'(CONV_LEN)) begin
        c.cs = 1'b1;
        c.rc = 1'b0;
      end
      // A/D word onto the D bus, load Z1, sign to the zero-crossing detector.
      if (q >= PROC_AT[p] && q < PROC_AT[p] + cycle_t'(RD_ADC_LEN)) begin
        c.cs  = 1'b1;
        c.rc  = 1'b1;
        c.dir = 1'b1;
        if (q == PROC_AT[p] + cycle_t'(RD_ADC_LEN - 1)) begin
          c.en1     = 1'b1;
          c.fabc[p] = 1'b1;
        end
      end
      // Template read: sample number and frequency onto the A bus.
      if (q >= PROC_AT[p] + cycle_t'(RD_ROM_OFS) &&
          q <  PROC_AT[p] + cycle_t'(RD_ROM_OFS + RD_ROM_LEN)) begin
        c.g   = 1'b1;
        c.s32 = mux1_sel_e'(p + 1);
        c.s4  = 1'b1;
        if (q == PROC_AT[p] + cycle_t'(RD_ROM_OFS + RD_ROM_LEN - 1))
          c.en2 = 1'b1;
      end
      // D/A write.
      if (q >= WRITE_AT[p] && q < WRITE_AT[p] + cycle_t'(WR_LEN)) begin
        c.wr[p] = 1'b1;
        c.ldac  = 1'b1;
        c.llsb  = 1'b1;
        c.lmsb  = 1'b1;
      end
    end
  end

endmodule
