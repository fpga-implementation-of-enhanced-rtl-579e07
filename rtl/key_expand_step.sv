// key_expand_step: one step of the AES-256 key schedule, run forwards for
// encryption or backwards for decryption, so that round keys are made on
// the fly instead of being stored.
// A step takes a pair of consecutive round keys (ka, kb), words A0..A3 and
// B0..B3 with word 0 in bits [127:96], and returns the next pair
// (na, nb) = (kb, new key). Both directions need the same word function of
// the last word B3:
//   temp = SubWord(RotWord(B3)) ^ Rcon   when round is odd
//   temp = SubWord(B3)                    when round is even
// with Rcon index (round+1)/2 forwards and (15-round)/2 backwards.
//   forwards  (dec = 0): N0 = A0^t, N1 = A0^A1^t, N2 = A0^A1^A2^t, N3 = A0^..^A3^t
//   backwards (dec = 1): N0 = A0^t, N1 = A1^A0,   N2 = A2^A1,      N3 = A3^A2
// The forward chain is flattened: the prefix XORs of A are formed in
// parallel with the four S-boxes and temp is XORed in last, so the path is
// one S-box plus one XOR.
// Encryption round r is entered with (K(r-1), K(r)) and makes K(r+1);
// decryption round j is entered with (K(15-j), K(14-j)) and makes K(13-j).
// PIPE = 1 uses sub-pipelined S-boxes and delays the other operands to
// match: the outputs then follow the inputs by one clock.
module key_expand_step
  import aes_pkg::*;
#(
  parameter bit PIPE = 1'b0
) (
  input  logic       clk,
  input  logic       dec,
  input  logic [3:0] round,
  input  state_t     ka,
  input  state_t     kb,
  output state_t     na,
  output state_t     nb
);
  word_t  b3, sub_in, sub_out, t, pre1, pre2, pre3;
  word_t  a0_d, a1_d, a2_d, a3_d, pre1_d, pre2_d, pre3_d;
  byte_t  rc, rc_d;
  logic   dec_d;
  state_t kb_d;

  assign b3     = kb[31:0];
  // RotWord on odd rounds
  assign sub_in = round[0] ? {b3[23:0], b3[31:24]} : b3;
  assign rc     = round[0] ? rcon(dec ? ((4'd15 - round) >> 1) : ((round + 4'd1) >> 1)) : 8'h00;
  assign pre1   = ka[127:96] ^ ka[95:64];
  assign pre2   = pre1 ^ ka[63:32];
  assign pre3   = pre2 ^ ka[31:0];

  for (genvar i = 0; i < 4; i++) begin : g_sub
    aes_sbox #(.PIPE(PIPE)) u_sbox (.clk(clk), .dec(1'b0),
                                    .x(sub_in[8*i +: 8]), .y(sub_out[8*i +: 8]));
  end

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      {a0_d, a1_d, a2_d, a3_d} <= ka;
      {pre1_d, pre2_d, pre3_d} <= {pre1, pre2, pre3};
      kb_d  <= kb;
      rc_d  <= rc;
      dec_d <= dec;
    end
  end else begin : g_comb
    assign {a0_d, a1_d, a2_d, a3_d} = ka;
    assign {pre1_d, pre2_d, pre3_d} = {pre1, pre2, pre3};
    assign kb_d  = kb;
    assign rc_d  = rc;
    assign dec_d = dec;
  end

  assign t  = sub_out ^ {rc_d, 24'h0};
  assign na = kb_d;
  assign nb = dec_d ? {a0_d ^ t, a1_d ^ a0_d, a2_d ^ a1_d, a3_d ^ a2_d}
                    : {a0_d ^ t, pre1_d ^ t, pre2_d ^ t, pre3_d ^ t};
endmodule
