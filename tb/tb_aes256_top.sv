// tb_aes256_top: end-to-end test of the AES-256 engine at its default
// parameters. It
//  * encrypts the FIPS-197 Appendix C.3 block (key 00..1f, plaintext
//    00112233..eeff) and expects 8ea2b7ca516745bfeafc49904b496089, then
//    decrypts that ciphertext back to the plaintext;
//  * streams a few hundred random blocks of random mode with gaps and
//    back-to-back runs, reloading random keys while blocks are in flight;
//  * checks every result against the reference model, in order, with a
//    latency of exactly 29 clocks, and that a run of back-to-back inputs
//    comes out one block per clock;
//  * exercises the Nikhilam multiplier port with random operands.
// It counts how often each mechanism occurred (encryption, decryption, mode
// switch between consecutive blocks, back-to-back blocks, key-setup stall,
// key change with blocks in flight) and fails if one never did.
module tb_aes256_top;
  import aes_ref_pkg::*;
  localparam int LATENCY = 29;

  logic         clk = 0, rst, key_load, key_busy, in_valid, in_ready, enc_dec;
  logic [255:0] key;
  logic [127:0] in_data, out_data;
  logic         out_valid, out_enc_dec;
  logic [7:0]   mul_a, mul_b;
  logic [15:0]  mul_p;

  aes256_top dut (.clk(clk), .rst(rst), .key_load(key_load), .key(key), .key_busy(key_busy),
                  .in_valid(in_valid), .in_ready(in_ready), .enc_dec(enc_dec), .in_data(in_data),
                  .out_valid(out_valid), .out_enc_dec(out_enc_dec), .out_data(out_data),
                  .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p));

  typedef struct {
    logic [127:0] data;
    logic         enc;
    longint       t_in;
  } exp_t;

  exp_t   q [$];
  longint cycle = 0;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_switch = 0, n_b2b = 0, n_stall = 0, n_key_inflight = 0;
  int n_out_b2b = 0;
  logic [255:0] cur_key;
  logic         last_enc = 1'b1, last_acc = 1'b0, last_out = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // monitor: samples the values that the DUT sees at each rising edge
  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid && !in_ready) n_stall++;
      if (key_load && q.size() > 0) n_key_inflight++;
      if (in_valid && in_ready) begin
        exp_t e;
        e.enc  = enc_dec;
        e.data = enc_dec ? encrypt(in_data, cur_key) : decrypt(in_data, cur_key);
        e.t_in = cycle;
        q.push_back(e);
        if (enc_dec) n_enc++; else n_dec++;
        if (last_acc) begin
          n_b2b++;
          if (enc_dec != last_enc) n_switch++;
        end
        last_enc = enc_dec;
      end
      last_acc = in_valid && in_ready;
      if (key_load) cur_key = key;   // takes effect for blocks after this edge
      if (out_valid) begin
        exp_t e;
        if (last_out) n_out_b2b++;
        if (q.size() == 0) check(0, "output with nothing in flight");
        else begin
          e = q.pop_front();
          check(out_data === e.data && out_enc_dec === e.enc,
                $sformatf("data got=%032h exp=%032h enc=%0d", out_data, e.data, e.enc));
          check(cycle - e.t_in == LATENCY, $sformatf("latency %0d", cycle - e.t_in));
        end
      end
      last_out = out_valid;
    end
  end

  task automatic load_key(logic [255:0] k);
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
  endtask

  task automatic send(logic [127:0] d, logic enc);
    @(negedge clk);
    in_valid = 1; in_data = d; enc_dec = enc;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    logic [127:0] fips_ct;
    rst = 1; key_load = 0; key = 0; in_valid = 0; in_data = 0; enc_dec = 1;
    mul_a = 0; mul_b = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // FIPS-197 C.3
    load_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    send(128'h00112233445566778899aabbccddeeff, 1);   // offered while key setup runs
    wait (q.size() == 0);
    send(128'h8ea2b7ca516745bfeafc49904b496089, 0);
    wait (q.size() == 0);
    check(encrypt(128'h00112233445566778899aabbccddeeff, cur_key) == 128'h8ea2b7ca516745bfeafc49904b496089,
          "reference model disagrees with FIPS-197");

    // random traffic
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      mul_a = 8'($urandom); mul_b = 8'($urandom);
      #1;
      check(mul_p == 16'(mul_a) * 16'(mul_b), "nikhilam product");
      if (n % 150 == 75) begin
        key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        key_load = 1;
      end else key_load = 0;
      in_valid = (n % 100 < 60) ? 1'b1 : ($urandom_range(0, 3) == 0);
      enc_dec  = $urandom_range(0, 1);
      in_data  = {$urandom, $urandom, $urandom, $urandom};
    end
    @(negedge clk);
    in_valid = 0; key_load = 0;
    repeat (LATENCY + 20) @(posedge clk);
    check(q.size() == 0, "blocks lost");

    $display("mechanisms: enc=%0d dec=%0d mode_switch=%0d back_to_back=%0d stall=%0d key_change_in_flight=%0d out_back_to_back=%0d",
             n_enc, n_dec, n_switch, n_b2b, n_stall, n_key_inflight, n_out_b2b);
    check(n_enc > 0, "no encryption");
    check(n_dec > 0, "no decryption");
    check(n_switch > 0, "no mode switch");
    check(n_b2b > 0, "no back-to-back blocks");
    check(n_stall > 0, "no key-setup stall");
    check(n_key_inflight > 0, "no key change with blocks in flight");
    check(n_out_b2b > 0, "no back-to-back results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
