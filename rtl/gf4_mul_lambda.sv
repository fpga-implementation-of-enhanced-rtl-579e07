// gf4_mul_lambda: multiplication of a GF((2^2)^2) element by the constant
// lambda = {1100} that defines the top field extension y^2 + y + lambda.
// Since lambda's low half is zero the product reduces to
// k3 = q2^q0, k2 = q3^q2^q1^q0, k1 = q3, k0 = q2.
module gf4_mul_lambda (
  input  logic [3:0] q,
  output logic [3:0] k
);
  assign k = {q[2] ^ q[0], q[3] ^ q[2] ^ q[1] ^ q[0], q[3], q[2]};
endmodule
