// apf_control_top -- control logic of a series active power filter.
//
// The controller produces, for each of the three phases, the reference
// compensation voltage vF = vL - vsin: the measured line voltage minus a
// sinusoidal template of the line's own frequency that is kept in phase with
// the line.  It works open loop and entirely in hardware.  Per control cycle
// of 242 system clocks (21.9 us at 11.0592 MHz, about 914 cycles per 50 Hz
// period) it, for each phase in turn,
//   1. addresses the external analog multiplexer (S) and starts the A/D
//      converter, then reads its 12-bit word from the D bus into Z1;
//   2. hands the sign bit to the zero-crossing detector DZ1, which restarts
//      the phase's sample counter (L1/L2/L3) at a rising zero crossing; at a
//      phase-A crossing the lower 8 bits of L1, the period measured in
//      control cycles, are first kept in Z3 as the frequency word;
//   3. reads the template memory at address {Z3, sample number} (A[17:10],
//      A[9:0]) and loads the returned word from the D bus into Z2;
//   4. puts Z = Z1 - Z2 and the D/A latch controls on the A bus and writes
//      the phase's D/A converter (WR).
// The instruction counter L0 and the decoder D1 generate every strobe; see
// control_decoder for the schedule.  The A/D converter, analog multiplexer,
// template memory and D/A converters are external parts.
//
// Ports: d_i is the shared D bus (driven by the A/D converter while
// cs_o & rc_o, by the memory while g_o).  a_o is the shared output bus to the
// memory and the converters.  z_o is the compensation word of the phase being
// processed (the optional digital output), freq_o the frequency word in Z3.
// All strobes are active high.  Bit map of A[17:10] while S4 = 0 (NA):
// {zeros[17:15], LMSB[14], LLSB[13], LDAC[12], Z[11:10]}; the position of
// LDAC, LLSB and LMSB in NA is this design's choice, everything else follows
// the logic diagram.
module apf_control_top
  import apf_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   d_i,      // D[0..11]
  output logic [1:0]          s_o,      // S1,S0
  output logic                cs_o,     // A/D CS
  output logic                rc_o,     // A/D R/C (1 = read)
  output logic                dir_o,    // D-bus direction (1 = from A/D)
  output logic                g_o,      // template memory output enable
  output logic [NPHASE-1:0]   wr_o,     // WR2..WR0
  output logic [ABUS_W-1:0]   a_o,      // A[0..17]
  output logic                clk2_o,   // CLK2, one clock per control cycle
  output logic [DATA_W-1:0]   z_o,      // Z[0..11]
  output logic [FREQ_W-1:0]   freq_o    // NB[0..7]
);

  cycle_t              step;
  logic                clk2;
  ctrl_t               c;
  logic [DATA_W-1:0]   y, x, z;
  logic [NPHASE-1:0]   clr;
  logic                en3;
  logic [SAMPLE_W-1:0] m [NPHASE];
  logic [FREQ_W-1:0]   na, nb;

  cycle_counter #(.MOD(CYCLE_MOD), .W(CYCLE_W)) u_l0 (
    .clk, .rst_n, .q(step), .tick(clk2)
  );

  control_decoder u_d1 (.q(step), .c);

  data_latch #(.W(DATA_W)) u_z1 (.clk, .rst_n, .en(c.en1), .d(d_i), .q(y));
  data_latch #(.W(DATA_W)) u_z2 (.clk, .rst_n, .en(c.en2), .d(d_i), .q(x));

  template_subtractor #(.W(DATA_W)) u_sum (.y, .x, .z);

  zero_crossing_detector #(.NPH(NPHASE)) u_dz1 (
    .clk, .rst_n, .d11(d_i[DATA_W-1]), .strobe(c.fabc), .clr, .en3
  );

  for (genvar p = 0; p < NPHASE; p++) begin : g_cnt
    sample_counter #(.W(SAMPLE_W)) u_l (
      .clk, .rst_n, .tick(clk2), .clr(clr[p]), .q(m[p])
    );
  end

  data_latch #(.W(FREQ_W)) u_z3 (
    .clk, .rst_n, .en(en3), .d(m[0][FREQ_W-1:0]), .q(nb)
  );

  assign na = {3'b000, c.lmsb, c.llsb, c.ldac, z[DATA_W-1:SAMPLE_W]};

  address_mux1 #(.W(SAMPLE_W)) u_mux1 (
    .sel(c.s32), .z(z[SAMPLE_W-1:0]), .ma(m[0]), .mb(m[1]), .mc(m[2]),
    .a(a_o[SAMPLE_W-1:0])
  );

  address_mux2 #(.W(FREQ_W)) u_mux2 (
    .sel(c.s4), .na, .nb, .a(a_o[ABUS_W-1:SAMPLE_W])
  );

  assign s_o    = c.s;
  assign cs_o   = c.cs;
  assign rc_o   = c.rc;
  assign dir_o  = c.dir;
  assign g_o    = c.g;
  assign wr_o   = c.wr;
  assign clk2_o = clk2;
  assign z_o    = z;
  assign freq_o = nb;

  // The A/D converter and the memory share the D bus: never both enabled.
  a_bus_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(c.g && c.cs && c.rc));
  // A D/A converter is only written while the A bus carries Z / NA.
  a_write_sel: assert property (@(posedge clk) disable iff (!rst_n)
    (|c.wr) |-> (c.s32 == SEL_Z && !c.s4));

endmodule
