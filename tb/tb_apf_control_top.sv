// tb_apf_control_top -- end-to-end test of the controller with models of the
// analog multiplexer + A/D converter, the template memory and the three D/A
// converters, at the reference configuration (11.0592 MHz clock, 242-clock
// control cycle, 12-bit data).
//
// The three line voltages (after the 1:100 divider, in volts at the A/D
// input) are generated here as a sequence of scenarios taken from the
// laboratory tests of the filter: balanced 110 V rms at 50 Hz; unbalance
// 110/125/85 V; unbalance with 30 % 3rd, 10 % 5th and 5 % 7th harmonic;
// 15 % flicker at 5 Hz; a 10 % swing at 2.5 Hz; 55 Hz and 45 Hz mains; and
// a dead line (no zero crossings) followed by recovery.
//
// Checks, per phase and control cycle:
//   * bit-exact: the D/A code equals the quantised line sample minus the
//     template word the memory must return for the sample number and
//     frequency word that this testbench derives on its own from the
//     sequence of A/D codes (zero crossings, period modulo 256);
//   * physical: once locked, the D/A code is within TOL codes of
//     v_line - (nominal sine at the true line phase), i.e. the reference
//     compensation voltage of eq. vF = vL - vsin;
//   * timing: D/A writes at clocks 48/112/176 of every 242-clock cycle,
//     3 conversions per cycle, no read of a busy converter, CLK2 in step 241;
//   * the frequency word in Z3.
// Each mechanism (zero crossing per phase, Z3 load, frequency change,
// counter wrap on a dead line, each scenario) is counted and must occur.
`timescale 1ns/1ps
module tb_apf_control_top;
  localparam real TCLK   = 1000.0 / 11.0592;    // ns
  localparam real TWO_PI = 6.283185307179586;
  localparam int  CYC    = 242;
  localparam int  AMP    = 637;                  // template, codes
  localparam int  TOL    = 8;                    // physical check, codes
  localparam int  WR_AT [3] = '{48, 112, 176};
  localparam int  CV_AT [3] = '{3, 48, 112};

  logic clk = 0, rst_n = 0;
  logic [11:0] d_bus, adc_d, rom_d, z;
  logic [1:0]  s;
  logic cs, rc, dir, g, clk2, adc_drive;
  logic [2:0]  wr;
  logic [17:0] a;
  logic [7:0]  freq;
  real vin [3];
  logic [11:0] dac_code [3];
  real dac_v [3];
  int  dac_writes [3];
  int  conversions, read_busy;

  apf_control_top dut (
    .clk, .rst_n, .d_i(d_bus), .s_o(s), .cs_o(cs), .rc_o(rc), .dir_o(dir),
    .g_o(g), .wr_o(wr), .a_o(a), .clk2_o(clk2), .z_o(z), .freq_o(freq)
  );

  ads7800_model #(.CONV_CLKS(30)) u_adc (
    .clk, .s, .cs, .rc, .vin0(vin[0]), .vin1(vin[1]), .vin2(vin[2]),
    .drive(adc_drive), .d(adc_d), .conversions, .read_while_busy(read_busy)
  );
  m27c4002_model #(.AMP(AMP), .ACC_CLKS(2)) u_rom (.clk, .a, .g, .d(rom_d));
  for (genvar p = 0; p < 3; p++) begin : g_dac
    dac813_model u_dac (.clk, .wr(wr[p]), .a, .code(dac_code[p]), .vout(dac_v[p]),
                        .writes(dac_writes[p]));
  end

  // Shared D bus: the converter while it is read, the memory while enabled.
  assign d_bus = adc_drive ? adc_d : (g ? rom_d : 12'h000);

  always #(TCLK / 2.0) clk = ~clk;

  // ---------------------------------------------------------------- line
  real f_line = 50.0, th = 0.0, tsec = 0.0;
  real vrms [3] = '{110.0, 110.0, 110.0};
  real hfrac [3] = '{0.0, 0.0, 0.0};
  int  horder [3] = '{3, 5, 7};
  real mdepth = 0.0, mfreq = 5.0;
  bit  dead = 0;

  function automatic real line_v(int p, real theta, real t);
    real tp, mod;
    tp  = theta - p * TWO_PI / 3.0;
    mod = 1.0 + mdepth * $sin(TWO_PI * mfreq * t);
    if (dead) return 0.0;
    return vrms[p] * 1.4142135623730951 / 100.0 * mod *
           ($sin(tp) + hfrac[p] * $sin(horder[p] * tp));
  endfunction

  always @(negedge clk) begin
    th   = th + TWO_PI * f_line * TCLK * 1.0e-9;
    if (th >= TWO_PI) th = th - TWO_PI;
    tsec = tsec + TCLK * 1.0e-9;
    for (int p = 0; p < 3; p++) vin[p] = line_v(p, th, tsec);
  end

  // ---------------------------------------------------------- scoreboard
  int checks = 0, failures = 0;
  int cyc = 0;                       // clocks since reset release
  int j [3] = '{0, 0, 0};            // expected sample numbers
  int fexp = 0;                      // expected frequency word
  bit neg [3] = '{0, 0, 0};          // previous sample negative
  int code_s [3];                    // quantised samples of this cycle
  real phys_s [3];                   // ideal vF of this cycle, codes
  int settle = 0;                    // cycles left before physical checks
  bit scen_on = 0;
  string scen = "reset";
  int n_cross [3] = '{0, 0, 0};
  int n_z3 = 0, n_fchange = 0, n_wrap = 0, n_phys = 0, n_exact = 0;
  int n_scen_phys [string];
  logic [7:0] freq_q = 0;
  real max_err = 0.0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%s] cycle %0d: %s", scen, cyc / CYC, msg);
    end
  endtask

  function automatic int quant(real v);
    int c;
    c = int'($floor(v / 5.0 * 2048.0 + 0.5));
    if (c > 2047) c = 2047;
    if (c < -2048) c = -2048;
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int step;
    step = cyc % CYC;
    check(clk2 == (step == CYC - 1), "CLK2 position");
    for (int p = 0; p < 3; p++) begin
      // The converter samples at the first clock of its convert command.
      if (step == CV_AT[p]) begin
        code_s[p] = quant(vin[p]);
        phys_s[p] = real'(code_s[p]) - AMP * $sin(th - p * TWO_PI / 3.0);
      end
      check(wr[p] == (step == WR_AT[p] || step == WR_AT[p] + 1), "D/A write timing");
      // Two clocks after the write the D/A code has been taken.
      if (step == WR_AT[p] + 2) begin
        int tmpl, e;
        if (neg[p] && code_s[p] >= 0) begin
          n_cross[p]++;
          if (p == 0) begin fexp = j[0] % 256; n_z3++; end
          j[p] = 0;
        end
        neg[p] = code_s[p] < 0;
        tmpl = int'($floor(AMP * $sin(TWO_PI * j[p] / (768.0 + fexp)) + 0.5));
        e = code_s[p] - tmpl;
        check(dac_code[p] == 12'(e),
              $sformatf("phase %0d code %0d expected %0d", p, $signed(dac_code[p]), e));
        n_exact++;
        check(dac_writes[p] == 2 * (cyc / CYC + 1), "one D/A write per cycle");
        if (scen_on && settle == 0 && !dead) begin
          real err;
          err = real'($signed(dac_code[p])) - phys_s[p];
          if (err < 0.0) err = -err;
          if (err > max_err) max_err = err;
          check(err <= TOL,
                $sformatf("phase %0d vF %0d ideal %f", p, $signed(dac_code[p]), phys_s[p]));
          n_phys++;
          if (n_scen_phys.exists(scen)) n_scen_phys[scen]++;
          else n_scen_phys[scen] = 1;
        end
      end
    end
    if (step == CYC - 1) begin
      for (int p = 0; p < 3; p++) begin
        j[p] = (j[p] + 1) % 1024;
        if (j[p] == 0) n_wrap++;
      end
      if (settle > 0) settle--;
      check(conversions == 3 * (cyc / CYC + 1), "three conversions per cycle");
      check(read_busy == 0, "A/D read before end of conversion");
      check(freq == 8'(fexp), $sformatf("Z3 %0d expected %0d", freq, fexp));
      if (freq != freq_q && n_z3 > 1) n_fchange++;
      freq_q = freq;
    end
    cyc++;
  end

  // ------------------------------------------------------------ scenarios
  task automatic run_periods(real periods);
    repeat (int'(periods / f_line / (CYC * TCLK * 1.0e-9))) repeat (CYC) @(posedge clk);
  endtask

  task automatic scenario(string name, real f, real v0, real v1, real v2,
                          real h0, real h1, real h2, real md, real mf, real periods);
    bit fchange;
    fchange = (f != f_line) || dead;
    scen = name;
    f_line = f; vrms = '{v0, v1, v2}; hfrac = '{h0, h1, h2};
    mdepth = md; mfreq = mf; dead = 0;
    if (fchange) settle = int'(2.5 / f / (CYC * TCLK * 1.0e-9));
    run_periods(periods);
  endtask

  initial begin
    #(64'd3_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    settle = 2 * 915;
    scen_on = 1;
    scenario("balanced",           50.0, 110.0, 110.0, 110.0, 0.0, 0.0, 0.0, 0.0,  5.0, 4.0);
    scenario("unbalance",          50.0, 110.0, 125.0,  85.0, 0.0, 0.0, 0.0, 0.0,  5.0, 3.0);
    scenario("unbalance+harmonics",50.0, 110.0,  85.0,  85.0, 0.3, 0.1, 0.05, 0.0, 5.0, 3.0);
    scenario("flicker 15% 5 Hz",   50.0, 110.0, 110.0, 110.0, 0.0, 0.0, 0.0, 0.15, 5.0, 10.0);
    scenario("swing 10% 2.5 Hz",   50.0, 110.0, 110.0, 110.0, 0.0, 0.0, 0.0, 0.10, 2.5, 20.0);
    scenario("55 Hz",              55.0, 110.0, 110.0, 110.0, 0.0, 0.0, 0.0, 0.0,  5.0, 5.0);
    scenario("45 Hz",              45.0, 110.0, 110.0, 110.0, 0.0, 0.0, 0.0, 0.0,  5.0, 5.0);
    // Dead line: no zero crossing, the sample counters wrap.
    scen = "dead line"; dead = 1;
    repeat (1100) repeat (CYC) @(posedge clk);
    scenario("recovery",           50.0, 110.0, 110.0, 110.0, 0.0, 0.0, 0.0, 0.0,  5.0, 4.0);

    // Every mechanism must have happened.
    for (int p = 0; p < 3; p++)
      check(n_cross[p] > 0, $sformatf("zero crossings of phase %0d: %0d", p, n_cross[p]));
    check(n_z3 > 0, "Z3 loads");
    check(n_fchange >= 2, $sformatf("frequency word changes: %0d", n_fchange));
    check(n_wrap > 0, "sample counter wrap");
    foreach (n_scen_phys[k]) $display("  scenario %-20s physical checks %0d", k, n_scen_phys[k]);
    check(n_scen_phys.num() == 8, "every scenario checked after lock");
    $display("largest deviation from the ideal vF: %0.1f codes (tolerance %0d)", max_err, TOL);
    $display("crossings %0d/%0d/%0d, Z3 loads %0d, frequency changes %0d, wraps %0d, exact %0d, physical %0d",
             n_cross[0], n_cross[1], n_cross[2], n_z3, n_fchange, n_wrap, n_exact, n_phys);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
