// apf_pkg -- shared constants and the control-word type of the series active
// power filter controller.
//
// The controller runs a fixed schedule: an 8-bit counter (L0) counts the
// 11.0592 MHz system clock modulo 242, and a decoder (D1) turns each counter
// state into the strobes of one step.  One 242-clock control cycle (21.9 us)
// serves all three phases, one after the other, and also defines the time
// step of the per-phase sample counters.  The numbers below are the clock
// indices of the schedule steps; they were obtained by converting the event
// times of the published timing diagram (0.27, 3.27, 4.34, 7.64, 10.12,
// 13.42, 15.91, 19.21 us) to clock periods of 90.4 ns.  The exact placement
// of the short strobes inside the processing windows is this design's own.
//
// All control signals in ctrl_t are active high ("asserted" = 1); the
// polarity of the physical pins of the converters and the memory is left to
// the pad ring.
package apf_pkg;

  // Data word width of the converters, the template and the SUM adder.
  localparam int unsigned DATA_W    = 12;
  // Width of the per-phase sample counters L1..L3 (sample number).
  localparam int unsigned SAMPLE_W  = 10;
  // Width of the frequency word held in Z3 (upper memory address part).
  localparam int unsigned FREQ_W    = 8;
  // Width of the shared address/data output bus A[0..17].
  localparam int unsigned ABUS_W    = SAMPLE_W + FREQ_W;
  // Modulus and width of the instruction counter L0.
  localparam int unsigned CYCLE_MOD = 242;
  localparam int unsigned CYCLE_W   = 8;
  localparam int unsigned NPHASE    = 3;

  typedef logic [CYCLE_W-1:0] cycle_t;

  // Schedule, in system clocks from the start of the control cycle.
  // Start of each phase's A/D conversion (0.27, 4.34, 10.12 us).
  localparam cycle_t CONV_AT  [NPHASE] = '{8'd3,  8'd48,  8'd112};
  // Start of each phase's PLD processing window (3.27, 7.64, 13.42 us).
  localparam cycle_t PROC_AT  [NPHASE] = '{8'd36, 8'd84,  8'd148};
  // Write of each phase's D/A converter (4.34, 10.12, 15.91 us).
  localparam cycle_t WRITE_AT [NPHASE] = '{8'd48, 8'd112, 8'd176};
  // The analog multiplexer is addressed this many clocks before conversion.
  localparam int unsigned MUX_LEAD  = 3;
  // Offsets inside a processing window.
  localparam int unsigned RD_ADC_LEN = 3;  // ADC read: offsets 0..2, Z1 load at 2
  localparam int unsigned RD_ROM_OFS = 3;  // template read: offsets 3..6
  localparam int unsigned RD_ROM_LEN = 4;  // Z2 load at offset 6
  localparam int unsigned CONV_LEN   = 2;  // length of the convert command
  localparam int unsigned WR_LEN     = 2;  // length of a DAC write pulse

  // MUX1 select codes (lines S3,S2).
  typedef enum logic [1:0] {
    SEL_Z  = 2'd0,   // Z[0..9]: compensation word to the D/A converters
    SEL_MA = 2'd1,   // L1 sample number, phase A
    SEL_MB = 2'd2,   // L2 sample number, phase B
    SEL_MC = 2'd3    // L3 sample number, phase C
  } mux1_sel_e;

  // One decoder output word.
  typedef struct packed {
    logic [1:0]  s;      // S1,S0: external analog multiplexer address (phase)
    logic        cs;     // A/D converter chip select
    logic        rc;     // A/D read (1) / convert (0), meaningful while cs = 1
    logic        dir;    // D-bus direction: 1 while the A/D converter drives it
    logic        g;      // template memory output enable
    logic        en1;    // load Z1 from the D bus (A/D word)
    logic        en2;    // load Z2 from the D bus (template word)
    logic [2:0]  wr;     // WR2..WR0: write strobe of the phase's D/A converter
    logic        ldac;   // D/A: transfer input latch to DAC latch
    logic        llsb;   // D/A: load the 8 low bits of the input latch
    logic        lmsb;   // D/A: load the 4 high bits of the input latch
    mux1_sel_e   s32;    // S3,S2: MUX1 select
    logic        s4;     // S4: MUX2 select, 1 = NB (frequency), 0 = NA
    logic [2:0]  fabc;   // FC,FB,FA: zero-crossing detector phase strobes
  } ctrl_t;

endpackage
