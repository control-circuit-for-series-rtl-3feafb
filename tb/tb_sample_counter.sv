// tb_sample_counter -- self-checking test of a per-phase sample counter
// (L1/L2/L3).  Random CLK2 enables and clears, including clears in the same
// clock as an enable, long runs that wrap the 10-bit counter, and an
// expected value kept by the testbench.
module tb_sample_counter;
  logic clk = 0, rst_n = 0;
  logic tick = 0, clr = 0;
  logic [9:0] q;
  int model;
  int checks = 0, failures = 0, wraps = 0, clr_with_tick = 0;

  sample_counter #(.W(10)) dut (.clk, .rst_n, .tick, .clr, .q);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst_n = 1;
    model = 0;
    checks++; if (q != 0) failures++;
    for (int i = 0; i < 20000; i++) begin
      tick = ($urandom % 2) == 0;
      // Phase 1: rare clears so the counter wraps; phase 2: frequent clears.
      clr  = (i < 8000) ? (($urandom % 3000) == 0) : (($urandom % 20) == 0);
      if (clr && tick) clr_with_tick++;
      @(posedge clk);
      if (clr) model = 0;
      else if (tick) begin
        model = model + 1;
        if (model == 1024) begin model = 0; wraps++; end
      end
      #1;
      checks++;
      if (q != 10'(model)) begin failures++; $display("FAIL %0d: %0d exp %0d", i, q, model); end
    end
    checks++; if (wraps == 0)         begin failures++; $display("FAIL no wrap exercised"); end
    checks++; if (clr_with_tick == 0) begin failures++; $display("FAIL no clear+tick"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
