// key_setup: prepares the two starting key pairs of the engine when a new
// 256-bit cipher key is loaded.
//   enc_key = (K0, K1): the cipher key itself, start of the forward schedule.
//   dec_key = (K14, K13): the last two round keys, start of the backward
//             schedule used by decryption.
// dec_key is found by stepping the forward schedule 13 times with one
// combinational key_expand_step, one step per clock. busy is high from the
// clock after load until dec_key is valid (13 clocks); a load while busy
// restarts. Only these 512 bits are kept; all other round keys are made as
// blocks pass through the rounds. Synchronous active-high reset clears busy;
// the key registers are not reset.
module key_setup
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    load,
  input  key256_t key,
  output logic    busy,
  output key256_t enc_key,
  output key256_t dec_key
);
  state_t     ka, kb, na, nb;
  logic [3:0] round;

  key_expand_step #(.PIPE(1'b0)) u_step (
    .clk(clk), .dec(1'b0), .round(round), .ka(ka), .kb(kb), .na(na), .nb(nb));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      round <= 4'd1;
    end else if (load) begin
      busy    <= 1'b1;
      round   <= 4'd1;
      enc_key <= key;
      {ka, kb} <= key;
    end else if (busy) begin
      {ka, kb} <= {na, nb};
      round    <= round + 4'd1;
      if (round == 4'(NR - 1)) begin
        busy    <= 1'b0;
        dec_key <= {nb, na};
      end
    end
  end
endmodule
