// gf4_square: squaring in GF((2^2)^2). Squaring is linear over GF(2), so
// the cross terms cancel and k = qH^2 x + (qL^2 + phi qH^2), which reduces
// to the four XOR equations k3 = q3, k2 = q3^q2, k1 = q2^q1, k0 = q3^q1^q0.
module gf4_square (
  input  logic [3:0] q,
  output logic [3:0] k
);
  assign k = {q[3], q[3] ^ q[2], q[2] ^ q[1], q[3] ^ q[1] ^ q[0]};
endmodule
