// aes_round: one unrolled round of the integrated encryption/decryption
// engine, with the key schedule step for the following round beside it.
//   encryption (in_dec = 0): SubBytes, ShiftRows, MixColumns, AddRoundKey
//   decryption (in_dec = 1): InvSubBytes, InvShiftRows, AddRoundKey,
//                            InvMixColumns
// SubBytes and ShiftRows commute, so both directions share the same 16
// integrated S-boxes and shift network; one mix_columns unit sits before the
// round-key XOR (encryption) or after it (decryption), picked by a mode
// multiplexer. LAST = 1 builds the final round, which has no MixColumns.
// The round key is in_kb; the key step turns (in_ka, in_kb) into the pair
// for the next round.
// Timing: PIPE = 1 adds the register inside every S-box (the sub-pipeline),
// and the round ends in a register, so results leave 2 clocks after they
// enter (1 clock with PIPE = 0). A new block may enter every clock. Valid
// bits have a synchronous active-high reset; data registers have none.
module aes_round
  import aes_pkg::*;
#(
  parameter bit          PIPE  = 1'b1,
  parameter int unsigned ROUND = 1,
  parameter bit          LAST  = 1'b0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  logic   in_dec,
  input  state_t in_state,
  input  state_t in_ka,
  input  state_t in_kb,
  output logic   out_valid,
  output logic   out_dec,
  output state_t out_state,
  output state_t out_ka,
  output state_t out_kb
);
  state_t sb, sr, mix_in, mix_out, nxt, rk, nka, nkb;
  logic   valid_m, dec_m;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox #(.PIPE(PIPE)) u_sbox (.clk(clk), .dec(in_dec),
                                    .x(in_state[8*i +: 8]), .y(sb[8*i +: 8]));
  end

  key_expand_step #(.PIPE(PIPE)) u_key (
    .clk(clk), .dec(in_dec), .round(4'(ROUND)), .ka(in_ka), .kb(in_kb), .na(nka), .nb(nkb));

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      if (rst) valid_m <= 1'b0;
      else     valid_m <= in_valid;
      dec_m <= in_dec;
      rk    <= in_kb;
    end
  end else begin : g_comb
    assign valid_m = in_valid;
    assign dec_m   = in_dec;
    assign rk      = in_kb;
  end

  shift_rows  u_sr  (.dec(dec_m), .s(sb), .y(sr));
  assign mix_in = dec_m ? (sr ^ rk) : sr;
  mix_columns u_mix (.dec(dec_m), .s(mix_in), .y(mix_out));

  always_comb begin
    if (LAST)       nxt = sr ^ rk;
    else if (dec_m) nxt = mix_out;
    else            nxt = mix_out ^ rk;
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= valid_m;
    out_dec   <= dec_m;
    out_state <= nxt;
    out_ka    <= nka;
    out_kb    <= nkb;
  end
endmodule
