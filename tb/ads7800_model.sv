// ads7800_model -- behavioural model of the analog input path: a four-
// channel analog multiplexer (CD74HC4052 type, address S1,S0) in front of a
// 12-bit A/D converter (ADS7800 type), for simulation only.
//
// A convert command (cs with rc = 0) samples the selected channel, a real
// voltage in the +/-5 V range, and quantises it to a two's complement code
// (2048 codes per 5 V, saturating).  The converter is then busy for
// CONV_CLKS clocks; a read (cs with rc = 1) presents the code on the D bus
// and must not come while busy, which the model counts in read_while_busy.
// Channel 3 of the multiplexer reads 0 V.
module ads7800_model #(
  parameter int CONV_CLKS = 30
) (
  input  logic        clk,
  input  logic [1:0]  s,
  input  logic        cs,
  input  logic        rc,
  input  real         vin0,
  input  real         vin1,
  input  real         vin2,
  output logic        drive,          // model drives the D bus
  output logic [11:0] d,
  output int          conversions,
  output int          read_while_busy
);

  logic [11:0] code;
  int          busy;
  logic        cs_rc_q;

  function automatic logic [11:0] quantise(real v);
    int c;
    c = int'($floor(v / 5.0 * 2048.0 + 0.5));
    if (c > 2047)  c = 2047;
    if (c < -2048) c = -2048;
    return 12'(c);
  endfunction

  initial begin code = 0; busy = 0; cs_rc_q = 0; conversions = 0; read_while_busy = 0; end

  always @(posedge clk) begin
    if (busy > 0) busy <= busy - 1;
    cs_rc_q <= cs && !rc;
    if (cs && !rc && !cs_rc_q) begin
      case (s)
        2'd0:    code <= quantise(vin0);
        2'd1:    code <= quantise(vin1);
        2'd2:    code <= quantise(vin2);
        default: code <= '0;
      endcase
      busy <= CONV_CLKS;
      conversions <= conversions + 1;
    end
    if (cs && rc && busy > 0) read_while_busy <= read_while_busy + 1;
  end

  assign drive = cs && rc;
  assign d     = code;

endmodule
