// gf2_mul: multiplier in GF(2^2), the lowest field of the composite S-box.
// Elements are a1*x + a0 with x^2 = x + 1. The product is expanded into
// AND/XOR terms: p1 = a1b1 ^ a1b0 ^ a0b1, p0 = a1b1 ^ a0b0. Purely
// combinational.
module gf2_mul (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] p
);
  logic hh;
  always_comb begin
    hh   = a[1] & b[1];
    p[1] = hh ^ (a[1] & b[0]) ^ (a[0] & b[1]);
    p[0] = hh ^ (a[0] & b[0]);
  end
endmodule
