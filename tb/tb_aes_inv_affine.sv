// tb_aes_inv_affine: exhaustive self-checking test of aes_inv_affine. Checks that the inverse affine map undoes the affine map: invaffine(sbox(v)) = ginv(v).
// Every input combination is applied, one per 1 ns step, and the output is
// compared with a reference computed in aes_ref_pkg. A watchdog ends the run
// with a failure if the loop does not finish.
module tb_aes_inv_affine;
  import aes_ref_pkg::*;
  logic [7:0] x, y, exp;
  int checks = 0, failures = 0;

  aes_inv_affine dut (.x(x), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = sbox(8'(v));
      #1;
      exp = ginv(8'(v));
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
