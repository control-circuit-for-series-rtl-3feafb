// tb_zero_crossing_detector -- self-checking test of DZ1.
// Three sine waves of different periods are sampled in turn; each sample's
// sign bit is offered with its phase strobe, as the decoder does.  A clear
// pulse is expected exactly when a phase's previous sample was negative and
// the present one is not; EN3 exactly with the phase-A clear.  The number of
// crossings found per phase is compared with the number of periods run.
module tb_zero_crossing_detector;
  logic clk = 0, rst_n = 0;
  logic d11 = 0;
  logic [2:0] strobe = 0, clr;
  logic en3;
  int checks = 0, failures = 0;
  int ncross [3];
  real prev_v [3];
  localparam int PER [3] = '{914, 831, 1015};
  localparam int NSAMP = 3100;

  zero_crossing_detector #(.NPH(3)) dut (.clk, .rst_n, .d11, .strobe, .clr, .en3);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < 3; p++) begin ncross[p] = 0; prev_v[p] = 1.0; end
    for (int k = 0; k < NSAMP; k++) begin
      for (int p = 0; p < 3; p++) begin
        real v;
        bit exp_clr;
        // Phase offsets of 0, -120 and +120 degrees plus a small offset so
        // that no sample is exactly zero.
        v = $sin(6.283185307179586 * (real'(k) / PER[p] - p / 3.0) + 0.001);
        exp_clr = (k > 0) && (prev_v[p] < 0.0) && (v >= 0.0);
        d11 = (v < 0.0);
        strobe = 3'b001 << p;
        #1;
        checks++;
        if (clr != (exp_clr ? (3'b001 << p) : 3'b000)) begin
          failures++; $display("FAIL k=%0d p=%0d clr=%b", k, p, clr);
        end
        checks++;
        if (en3 != (exp_clr && p == 0)) begin failures++; $display("FAIL en3 k=%0d", k); end
        if (exp_clr) ncross[p]++;
        @(posedge clk); #1;
        strobe = 0;
        // Without a strobe nothing may fire, whatever is on the bus.
        d11 = ~d11;
        #1;
        checks++;
        if (clr != 0 || en3) begin failures++; $display("FAIL pulse without strobe"); end
        prev_v[p] = v;
        @(posedge clk); #1;
      end
    end
    for (int p = 0; p < 3; p++) begin
      int expect_n;
      // Rising crossings of sin(2 pi (k/P - p/3)) for 0 < k < NSAMP.
      expect_n = 0;
      for (int k = 1; k < NSAMP; k++)
        if ($floor(real'(k) / PER[p] - p / 3.0 + 0.001 / 6.283185307179586) !=
            $floor(real'(k - 1) / PER[p] - p / 3.0 + 0.001 / 6.283185307179586))
          expect_n++;
      checks++;
      if (ncross[p] != expect_n || ncross[p] < 3) begin
        failures++; $display("FAIL crossings phase %0d: %0d exp %0d", p, ncross[p], expect_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
