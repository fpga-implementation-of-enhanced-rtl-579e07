// aes256_top: high-throughput AES-256 engine that both encrypts and
// decrypts, with round keys made on the fly, plus the Nikhilam multiplier.
//
// Cipher: an input stage XORs the block with the first round key (K0 for
// encryption, K14 for decryption) and 14 unrolled aes_round stages follow,
// the last without MixColumns. Every block carries its own mode bit and its
// own pair of round keys down the pipeline; each round derives the next
// pair (forward schedule for encryption, backward for decryption), so no
// table of 15 round keys exists and blocks of either mode, and blocks under
// the old key, can be in flight together. A block can enter every clock.
//
// Keys: key_load with a 256-bit key starts key_setup, which needs 13 clocks
// to find (K14, K13) for decryption. key_busy and in_ready show it; no
// block is accepted meanwhile. A block accepted in the same clock as
// key_load still uses the previous key.
//
// Interface: in_valid/in_ready handshake (accepted when both are high),
// enc_dec = 1 encrypts and 0 decrypts. Results come out in order with
// out_valid, out_enc_dec and out_data and cannot be stalled.
// Timing: latency 1 + 14 * (PIPE ? 2 : 1) clocks, 29 by default;
// throughput one 128-bit block per clock.
// Two assertions state the timing rules: an accepted block leaves exactly
// LATENCY clocks later, and a finished key setup was busy for 13 clocks.
// Reset: rst is synchronous and active high; it clears the valid bits and
// key_busy. Before the first key_load the key registers hold no key.
//
// mul_a, mul_b, mul_p: the 8-bit Nikhilam multiplier, combinational and
// independent of the cipher.
module aes256_top
  import aes_pkg::*;
#(
  parameter bit PIPE = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        key_load,
  input  key256_t     key,
  output logic        key_busy,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        enc_dec,
  input  state_t      in_data,
  output logic        out_valid,
  output logic        out_enc_dec,
  output state_t      out_data,
  input  logic [7:0]  mul_a,
  input  logic [7:0]  mul_b,
  output logic [15:0] mul_p
);
  key256_t enc_key, dec_key, start_key;
  logic    valid [NR+1];
  logic    dec   [NR+1];
  state_t  st    [NR+1];
  state_t  ka    [NR+1];
  state_t  kb    [NR+1];

  key_setup u_keys (.clk(clk), .rst(rst), .load(key_load), .key(key),
                    .busy(key_busy), .enc_key(enc_key), .dec_key(dec_key));

  assign in_ready  = !key_busy;
  assign start_key = enc_dec ? enc_key : dec_key;

  // input stage: first AddRoundKey with the first key of the pair
  always_ff @(posedge clk) begin
    if (rst) valid[0] <= 1'b0;
    else     valid[0] <= in_valid && in_ready;
    dec[0] <= !enc_dec;
    st[0]  <= in_data ^ start_key[255:128];
    {ka[0], kb[0]} <= start_key;
  end

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.PIPE(PIPE), .ROUND(r), .LAST(r == NR)) u_round (
      .clk(clk), .rst(rst),
      .in_valid(valid[r-1]), .in_dec(dec[r-1]), .in_state(st[r-1]),
      .in_ka(ka[r-1]), .in_kb(kb[r-1]),
      .out_valid(valid[r]), .out_dec(dec[r]), .out_state(st[r]),
      .out_ka(ka[r]), .out_kb(kb[r]));
  end

  // timing rules: an accepted block leaves exactly LATENCY clocks later, and
  // a key setup, once finished, has been busy for NR - 1 clocks
  localparam int unsigned LATENCY = 1 + NR * (PIPE ? 2 : 1);
  a_latency     : assert property (@(posedge clk) disable iff (rst)
                                   in_valid && in_ready |-> ##LATENCY out_valid);
  a_setup_clks  : assert property (@(posedge clk) disable iff (rst)
                                   $fell(key_busy) |-> $past(key_busy, NR - 1));

  assign out_valid   = valid[NR];
  assign out_enc_dec = !dec[NR];
  assign out_data    = st[NR];

  nikhilam_mult #(.N(8)) u_mul (.a(mul_a), .b(mul_b), .p(mul_p));
endmodule
