// tb_key_setup: loads the FIPS-197 AES-256 key and random keys and checks
// that busy lasts exactly 13 clocks, that enc_key is the cipher key and
// that dec_key holds (K14, K13) of the reference key expansion. Also checks
// that reset clears busy and that a load while busy restarts the count.
module tb_key_setup;
  import aes_ref_pkg::*;
  logic         clk = 0, rst, load, busy;
  logic [255:0] key, enc_key, dec_key;
  sched_t       w;
  int checks = 0, failures = 0;

  key_setup dut (.clk(clk), .rst(rst), .load(load), .key(key), .busy(busy),
                 .enc_key(enc_key), .dec_key(dec_key));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cyc;
    rst = 1; load = 0; key = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!busy, "busy after reset");
    for (int k = 0; k < 10; k++) begin
      if (k == 0) key = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
      else key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      w = expand(key);
      load = 1;
      if (k == 3) begin
        // restart: a first load with another key, then the real one 5 clocks later
        key = ~key;
        @(posedge clk); #1 load = 0;
        repeat (4) @(posedge clk);
        #1 key = ~key; load = 1;
      end
      @(posedge clk); #1 load = 0;
      cyc = 0;
      while (busy) begin
        @(posedge clk); #1;
        cyc++;
      end
      check(cyc == 13, $sformatf("busy lasted %0d clocks", cyc));
      check(enc_key == key, "enc_key");
      check(dec_key == {round_key(w, 14), round_key(w, 13)}, "dec_key");
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
