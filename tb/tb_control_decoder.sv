// tb_control_decoder -- self-checking test of the D1 decoder.
// Walks the 242 steps of a control cycle and compares every line of the
// control word with a schedule written out here clock by clock from the
// timing diagram (convert at 3/48/112, processing from 36/84/148, D/A write
// at 48/112/176; one clock = 1/11.0592 MHz).  Also checks that the last
// D/A write ends before 19.3 us and the cycle fits in 22 us, and that the
// D bus is never claimed by both the converter and the memory.
module tb_control_decoder;
  import apf_pkg::*;
  cycle_t q;
  ctrl_t  c;
  int checks = 0, failures = 0;
  int last_wr = 0;
  int conv_start [3] = '{3, 48, 112};
  int proc_start [3] = '{36, 84, 148};
  int wr_start   [3] = '{48, 112, 176};

  control_decoder dut (.q, .c);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL step %0d: %s", q, msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 242; t++) begin
      bit e_conv, e_rd, e_en1, e_rom, e_en2, e_wrany;
      logic [2:0] e_f, e_wr;
      int e_s, e_sel;
      q = cycle_t'(t);
      #1;
      e_conv = 0; e_rd = 0; e_en1 = 0; e_rom = 0; e_en2 = 0;
      e_f = 0; e_wr = 0; e_sel = 0;
      e_s = (t < 45) ? 0 : (t < 109) ? 1 : 2;
      for (int p = 0; p < 3; p++) begin
        if (t == conv_start[p] || t == conv_start[p] + 1) e_conv = 1;
        if (t >= proc_start[p] && t <= proc_start[p] + 2) e_rd = 1;
        if (t == proc_start[p] + 2) begin e_en1 = 1; e_f[p] = 1; end
        if (t >= proc_start[p] + 3 && t <= proc_start[p] + 6) begin e_rom = 1; e_sel = p + 1; end
        if (t == proc_start[p] + 6) e_en2 = 1;
        if (t == wr_start[p] || t == wr_start[p] + 1) e_wr[p] = 1;
      end
      e_wrany = |e_wr;
      check(c.s == 2'(e_s), "S1,S0");
      check(c.cs == (e_conv || e_rd), "CS");
      check(c.rc == !e_conv, "RC");
      check(c.dir == e_rd, "DIR");
      check(c.en1 == e_en1, "EN1");
      check(c.fabc == e_f, "FA/FB/FC");
      check(c.g == e_rom, "G");
      check(c.en2 == e_en2, "EN2");
      check(c.s4 == e_rom, "S4");
      check(int'(c.s32) == e_sel, "S3,S2");
      check(c.wr == e_wr, "WR");
      check(c.ldac == e_wrany && c.llsb == e_wrany && c.lmsb == e_wrany, "LDAC/LLSB/LMSB");
      check(!(c.g && c.cs && c.rc), "D bus conflict");
      if (e_wrany) last_wr = t;
    end
    // Used part of the cycle: the last phase's D/A then settles for 3.3 us.
    check(real'(last_wr + 1) / 11.0592 + 3.3 < 19.4, "cycle length 19.2 us");
    check(242.0 / 11.0592 < 22.0, "cycle within 22 us");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
