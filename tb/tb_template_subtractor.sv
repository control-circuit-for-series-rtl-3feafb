// tb_template_subtractor -- self-checking test of the SUM adder
// (z = y - x, two's complement, 12 bits).  Checks corner values and random
// pairs against integer arithmetic reduced modulo 4096, and, for pairs whose
// difference fits in 12 bits, the signed value.
module tb_template_subtractor;
  logic [11:0] y, x, z;
  int checks = 0, failures = 0;

  template_subtractor #(.W(12)) dut (.y, .x, .z);

  task automatic one(int yi, int xi);
    int diff;
    y = 12'(yi); x = 12'(xi);
    #1;
    diff = yi - xi;
    checks++;
    if (z != 12'(diff)) begin
      failures++; $display("FAIL %0d - %0d -> %0d", yi, xi, $signed(z));
    end
    if (diff >= -2048 && diff <= 2047) begin
      checks++;
      if ($signed(z) != diff) begin failures++; $display("FAIL signed %0d - %0d", yi, xi); end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    one(0, 0); one(1000, 1000); one(2047, 0); one(0, 2047); one(-2048, 0);
    one(-1, 1); one(500, -500); one(-1500, -1400); one(1024, 1);
    for (int i = 0; i < 5000; i++)
      one(int'($urandom % 4096) - 2048, int'($urandom % 4096) - 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
