// tb_inv_iso_map: exhaustive self-checking test of inv_iso_map. Checks that delta^-1 is a field isomorphism back to GF(2^8): for composite c, delta^-1(c*z) = delta^-1(c)*delta^-1(z) for z = delta(0x02) = 0x5f and delta(0x53) = 0x53.
// Every input combination is applied, one per 1 ns step, and the output is
// compared with a reference computed in aes_ref_pkg. A watchdog ends the run
// with a failure if the loop does not finish.
module tb_inv_iso_map;
  import aes_ref_pkg::*;
  logic [7:0] q, a, exp, da;
  int checks = 0, failures = 0;

  inv_iso_map dut (.q(q), .a(a));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      q = 8'(v % 256);
      #1; da = a;
      q = m8c(8'(v % 256), (v < 256) ? 8'h5f : 8'h53);
      #1;
      exp = gmul(da, (v < 256) ? 8'h02 : 8'h53);
      checks++;
      if (a !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch in=%0h got=%0h exp=%0h", v, a, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
