// tb_gf4_inv: exhaustive self-checking test of gf4_inv. Checks that q*k = 1 for every non-zero q and that 0 maps to 0.
// Every input combination is applied, one per 1 ns step, and the output is
// compared with a reference computed in aes_ref_pkg. A watchdog ends the run
// with a failure if the loop does not finish.
module tb_gf4_inv;
  import aes_ref_pkg::*;
  logic [3:0] q, k, exp;
  int checks = 0, failures = 0;

  gf4_inv dut (.q(q), .k(k));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      q = 4'(v);
      #1;
      exp = (q == 0) ? 4'h0 : ((m4(q, k) == 4'h1) ? k : ~k);
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
