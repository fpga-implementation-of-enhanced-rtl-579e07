// tb_shift_rows: applies random states and a fixed byte-index pattern in
// both modes and compares with the reference ShiftRows / InvShiftRows; also
// checks that the inverse undoes the forward shift through the reference.
module tb_shift_rows;
  import aes_ref_pkg::*;
  logic         dec;
  logic [127:0] s, y, e;
  int checks = 0, failures = 0;

  shift_rows dut (.dec(dec), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      if (n == 0) s = 128'h000102030405060708090a0b0c0d0e0f;
      else s = {$urandom, $urandom, $urandom, $urandom};
      dec = n[0];
      #1;
      e = shift_rows_ref(s, dec);
      checks++;
      if (y !== e) begin
        failures++;
        $display("dec=%0d in=%032h got=%032h exp=%032h", dec, s, y, e);
      end
      if (n == 0) begin
        checks++;
        if (y !== 128'h00050a0f04090e03080d02070c01060b) begin
          failures++;
          $display("fixed pattern got=%032h", y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
