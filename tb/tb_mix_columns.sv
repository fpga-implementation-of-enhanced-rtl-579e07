// tb_mix_columns: random states in both modes against the reference
// MixColumns / InvMixColumns (GF(2^8) matrix products), plus the FIPS-197
// round-1 example column db 13 53 45 -> 8e 4d a1 bc.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic         dec;
  logic [127:0] s, y, e;
  int checks = 0, failures = 0;

  mix_columns dut (.dec(dec), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      if (n < 2) s = {4{32'hdb135345}};
      else s = {$urandom, $urandom, $urandom, $urandom};
      dec = n[0];
      #1;
      e = mix_ref(s, dec);
      if (n == 0) e = {4{32'h8e4da1bc}};
      checks++;
      if (y !== e) begin
        failures++;
        $display("dec=%0d in=%032h got=%032h exp=%032h", dec, s, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
