// tb_gf2_mul: exhaustive self-checking test of gf2_mul. Checks the GF(2^2) product against polynomial multiplication mod x^2+x+1.
// Every input combination is applied, one per 1 ns step, and the output is
// compared with a reference computed in aes_ref_pkg. A watchdog ends the run
// with a failure if the loop does not finish.
module tb_gf2_mul;
  import aes_ref_pkg::*;
  logic [1:0] a, b, p, exp;
  int checks = 0, failures = 0;

  gf2_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      exp = m2(a, b);
      checks++;
      if (p !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch in=%0h got=%0h exp=%0h", v, p, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
