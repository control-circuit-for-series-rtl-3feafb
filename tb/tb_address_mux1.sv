// tb_address_mux1 -- self-checking test of MUX1 (A[0..9] source select).
// Every select code with random inputs; the expected output is picked by
// the testbench from the select code's meaning.
module tb_address_mux1;
  import apf_pkg::*;
  mux1_sel_e sel;
  logic [9:0] z, ma, mb, mc, a, e;
  int checks = 0, failures = 0;

  address_mux1 #(.W(10)) dut (.sel, .z, .ma, .mb, .mc, .a);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      z = 10'($urandom); ma = 10'($urandom); mb = 10'($urandom); mc = 10'($urandom);
      sel = mux1_sel_e'(i % 4);
      case (i % 4)
        0: e = z;
        1: e = ma;
        2: e = mb;
        default: e = mc;
      endcase
      #1;
      checks++;
      if (a != e) begin failures++; $display("FAIL sel %0d: %h exp %h", i % 4, a, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
