// tb_gf2_mul_phi: exhaustive self-checking test of gf2_mul_phi. Checks q*phi against the polynomial product with phi = {10}.
// Every input combination is applied, one per 1 ns step, and the output is
// compared with a reference computed in aes_ref_pkg. A watchdog ends the run
// with a failure if the loop does not finish.
module tb_gf2_mul_phi;
  import aes_ref_pkg::*;
  logic [1:0] q, k, exp;
  int checks = 0, failures = 0;

  gf2_mul_phi dut (.q(q), .k(k));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      q = 2'(v);
      #1;
      exp = m2(q, 2'b10);
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
