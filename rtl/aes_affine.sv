// aes_affine: the affine transformation that follows the multiplicative
// inverse in SubBytes: y_i = x_i ^ x_(i+4) ^ x_(i+5) ^ x_(i+6) ^ x_(i+7) ^ c_i
// (indices mod 8) with c = 8'h63. Combinational XOR network.
module aes_affine (
  input  logic [7:0] x,
  output logic [7:0] y
);
  always_comb begin
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i + 4) % 8] ^ x[(i + 5) % 8] ^ x[(i + 6) % 8] ^ x[(i + 7) % 8];
    y = y ^ 8'h63;
  end
endmodule
