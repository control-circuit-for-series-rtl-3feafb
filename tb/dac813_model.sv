// dac813_model -- behavioural model of one 12-bit D/A converter (DAC813
// type) on the shared A bus, for simulation only.  While its own WR line
// and the load lines LMSB, LLSB and LDAC (A[14], A[13], A[12]) are high, the input and
// DAC latches are transparent; the code A[11:0] is taken at the clock edge.
// The model keeps the last code (two's complement), the output voltage it
// stands for (5 V per 2048 codes) and a write counter.
module dac813_model (
  input  logic        clk,
  input  logic        wr,
  input  logic [17:0] a,
  output logic [11:0] code,
  output real         vout,
  output int          writes
);

  initial begin code = '0; writes = 0; end

  always @(posedge clk) begin
    if (wr && a[14] && a[13] && a[12]) begin
      code   <= a[11:0];
      writes <= writes + 1;
    end
  end

  assign vout = real'($signed(code)) * 5.0 / 2048.0;

endmodule
