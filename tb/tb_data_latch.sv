// tb_data_latch -- self-checking test of the enable-loaded register used for
// Z1, Z2 (12 bits) and Z3 (8 bits).  Random data and enables; the expected
// value is kept by the testbench.  Both widths are tested.
module tb_data_latch;
  logic clk = 0, rst_n = 0;
  logic en12, en8;
  logic [11:0] d12, q12, m12;
  logic [7:0]  d8, q8, m8;
  int checks = 0, failures = 0;

  data_latch #(.W(12)) dut12 (.clk, .rst_n, .en(en12), .d(d12), .q(q12));
  data_latch #(.W(8))  dut8  (.clk, .rst_n, .en(en8),  .d(d8),  .q(q8));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en12 = 1; en8 = 1; d12 = 12'hABC; d8 = 8'h5A;
    @(posedge clk); #1;
    checks += 2;
    if (q12 != 0 || q8 != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    m12 = 0; m8 = 0;
    for (int i = 0; i < 2000; i++) begin
      en12 = ($urandom % 4) == 0;
      en8  = ($urandom % 3) == 0;
      d12  = 12'($urandom);
      d8   = 8'($urandom);
      @(posedge clk);
      if (en12) m12 = d12;
      if (en8)  m8  = d8;
      #1;
      checks++;
      if (q12 != m12) begin failures++; $display("FAIL w12 %0d: %h exp %h", i, q12, m12); end
      checks++;
      if (q8 != m8) begin failures++; $display("FAIL w8 %0d: %h exp %h", i, q8, m8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
