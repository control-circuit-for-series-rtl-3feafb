// tb_address_mux2 -- self-checking test of MUX2 (A[10..17] source select):
// S4 = 1 gives NB (frequency word), S4 = 0 gives NA.
module tb_address_mux2;
  logic sel;
  logic [7:0] na, nb, a;
  int checks = 0, failures = 0;

  address_mux2 #(.W(8)) dut (.sel, .na, .nb, .a);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      na = 8'($urandom); nb = 8'($urandom); sel = i[0];
      #1;
      checks++;
      if (a != (i[0] ? nb : na)) begin failures++; $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
