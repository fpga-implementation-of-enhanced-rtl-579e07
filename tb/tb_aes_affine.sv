// tb_aes_affine: exhaustive self-checking test of aes_affine. Checks affine(ginv(x)) against the FIPS-197 S-box rebuilt from the rotation form.
// Every input combination is applied, one per 1 ns step, and the output is
// compared with a reference computed in aes_ref_pkg. A watchdog ends the run
// with a failure if the loop does not finish.
module tb_aes_affine;
  import aes_ref_pkg::*;
  logic [7:0] x, y, exp;
  int checks = 0, failures = 0;

  aes_affine dut (.x(x), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = ginv(8'(v));
      #1;
      exp = sbox(8'(v));
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch in=%0h got=%0h exp=%0h", v, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
