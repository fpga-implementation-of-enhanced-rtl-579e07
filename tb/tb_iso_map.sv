// tb_iso_map: exhaustive self-checking test of iso_map. Checks that delta is a field isomorphism: delta(a*b) = delta(a)*delta(b) in the composite field for b = 2, 3 and 0x53, whose images 0x5f, 0x5e, 0x53 are fixed constants.
// Every input combination is applied, one per 1 ns step, and the output is
// compared with a reference computed in aes_ref_pkg. A watchdog ends the run
// with a failure if the loop does not finish.
module tb_iso_map;
  import aes_ref_pkg::*;
  logic [7:0] q, a, exp, da;
  int checks = 0, failures = 0;

  iso_map dut (.q(q), .a(a));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 768; v++) begin
      q = 8'(v % 256);
      #1; da = a;
      q = (v < 256) ? gmul(8'(v), 8'h02) : (v < 512) ? gmul(8'(v), 8'h03) : gmul(8'(v), 8'h53);
      #1;
      exp = m8c(da, (v < 256) ? 8'h5f : (v < 512) ? 8'h5e : 8'h53);
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
