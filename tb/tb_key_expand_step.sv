// tb_key_expand_step: checks the on-the-fly key step against the full
// AES-256 key expansion of the reference model, for the FIPS-197 key and
// random keys, every round index, forwards (encryption) and backwards
// (decryption). A combinational copy (PIPE = 0) is checked directly and a
// pipelined copy (PIPE = 1) one clock later.
module tb_key_expand_step;
  import aes_ref_pkg::*;
  logic         clk = 0;
  logic         dec;
  logic [3:0]   round;
  logic [127:0] ka, kb, na0, nb0, na1, nb1, ena, enb, ena_p, enb_p;
  logic [255:0] key;
  sched_t       w;
  int checks = 0, failures = 0;

  key_expand_step #(.PIPE(1'b0)) dut0 (.clk(clk), .dec(dec), .round(round), .ka(ka), .kb(kb),
                                       .na(na0), .nb(nb0));
  key_expand_step #(.PIPE(1'b1)) dut1 (.clk(clk), .dec(dec), .round(round), .ka(ka), .kb(kb),
                                       .na(na1), .nb(nb1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit first = 1;
    dec = 0; round = 1; ka = 0; kb = 0;
    for (int k = 0; k < 20; k++) begin
      if (k == 0) key = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
      else key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      w = expand(key);
      for (int m = 0; m < 26; m++) begin
        @(negedge clk);
        dec = (m >= 13);
        round = 4'(m % 13 + 1);
        if (!dec) begin
          ka = round_key(w, round - 1); kb = round_key(w, round);
          ena = round_key(w, round);    enb = round_key(w, round + 1);
        end else begin
          ka = round_key(w, 15 - round); kb = round_key(w, 14 - round);
          ena = round_key(w, 14 - round); enb = round_key(w, 13 - round);
        end
        #1;
        checks++;
        if (na0 !== ena || nb0 !== enb) begin
          failures++;
          $display("PIPE=0 dec=%0d round=%0d got=%032h exp=%032h", dec, round, nb0, enb);
        end
        @(posedge clk);
        #1;
        if (!first) begin
          checks++;
          if (na1 !== ena || nb1 !== enb) begin
            failures++;
            $display("PIPE=1 dec=%0d round=%0d got=%032h exp=%032h", dec, round, nb1, enb);
          end
        end
        first = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
