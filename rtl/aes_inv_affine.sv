// aes_inv_affine: the inverse affine transformation that precedes the
// multiplicative inverse in InvSubBytes:
// y_i = x_(i+2) ^ x_(i+5) ^ x_(i+7) ^ d_i (indices mod 8), d = 8'h05.
module aes_inv_affine (
  input  logic [7:0] x,
  output logic [7:0] y
);
  always_comb begin
    for (int i = 0; i < 8; i++)
      y[i] = x[(i + 2) % 8] ^ x[(i + 5) % 8] ^ x[(i + 7) % 8];
    y = y ^ 8'h05;
  end
endmodule
