// m27c4002_model -- behavioural model of the sinusoidal template memory
// (256K x 16 UV EPROM of the M27C4002 type; 12 data bits are used), for
// simulation only.
//
// Content: the address is {f, n} with f = A[17:10], the frequency word, and
// n = A[9:0], the sample number.  Frequency word f stands for a mains period
// of P = 768 + f control cycles (f is the period modulo 256, and 768..1023
// cycles of 21.88 us cover 44.7..59.5 Hz).  The stored word is
//     round(AMP * sin(2 * pi * n / P))      (two's complement, 12 bits).
// The word is computed on access instead of being held in an array.  The
// output is valid ACC_CLKS clocks after the address and G have become
// stable; before that the model returns a junk pattern.
module m27c4002_model #(
  parameter int AMP      = 637,
  parameter int ACC_CLKS = 2
) (
  input  logic        clk,
  input  logic [17:0] a,
  input  logic        g,
  output logic [11:0] d
);

  logic [17:0] a_q;
  int          stable;

  initial begin a_q = 0; stable = 0; end

  function automatic logic [11:0] word(logic [17:0] addr);
    real p, n;
    p = 768.0 + real'(addr[17:10]);
    n = real'(addr[9:0]);
    return 12'(int'($floor(real'(AMP) * $sin(6.283185307179586 * n / p) + 0.5)));
  endfunction

  always @(posedge clk) begin
    a_q    <= a;
    stable <= (g && a == a_q) ? stable + 1 : 0;
  end

  assign d = (stable >= ACC_CLKS - 1 && a == a_q) ? word(a) : 12'hA5A;

endmodule
