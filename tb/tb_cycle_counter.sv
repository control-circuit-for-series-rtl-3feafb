// tb_cycle_counter -- self-checking test of the L0 instruction counter.
// Runs the counter at its reference modulus (242) for several cycles and
// checks every state against an independent count, that CLK2 (tick) is high
// exactly in state 241, and that ticks are exactly 242 clocks apart.
module tb_cycle_counter;
  localparam int MOD = 242;
  logic clk = 0, rst_n = 0;
  logic [7:0] q;
  logic tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, nticks = 0;

  cycle_counter #(.MOD(MOD), .W(8)) dut (.clk, .rst_n, .q, .tick);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(q == 0, "state after reset");
    for (int i = 0; i < 5 * MOD + 17; i++) begin
      check(q == 8'(i % MOD), $sformatf("state at %0d: %0d", i, q));
      check(tick == ((i % MOD) == MOD - 1), $sformatf("tick at %0d", i));
      if (tick) begin
        if (last_tick >= 0) check(i - last_tick == MOD, "tick period");
        last_tick = i;
        nticks++;
      end
      @(posedge clk); #1;
    end
    check(nticks == 5, "number of CLK2 ticks");
    // Reset in the middle of a cycle returns to state 0.
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    check(q == 0, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
