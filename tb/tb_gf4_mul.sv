// tb_gf4_mul: exhaustive self-checking test of gf4_mul. Checks the GF((2^2)^2) product against polynomial multiplication over GF(2^2).
// Every input combination is applied, one per 1 ns step, and the output is
// compared with a reference computed in aes_ref_pkg. A watchdog ends the run
// with a failure if the loop does not finish.
module tb_gf4_mul;
  import aes_ref_pkg::*;
  logic [3:0] q, w, k, exp;
  int checks = 0, failures = 0;

  gf4_mul dut (.q(q), .w(w), .k(k));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {q, w} = 8'(v);
      #1;
      exp = m4(q, w);
      checks++;
      if (k !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch in=%0h got=%0h exp=%0h", v, k, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
