// gf2_mul_phi: multiplication of a GF(2^2) element by the constant
// phi = {10} (= x). With x^2 = x + 1: (q1 x + q0) x = (q1 ^ q0) x + q1,
// so k1 = q1 ^ q0 and k0 = q1. Two wires and one XOR gate.
module gf2_mul_phi (
  input  logic [1:0] q,
  output logic [1:0] k
);
  assign k = {q[1] ^ q[0], q[1]};
endmodule
