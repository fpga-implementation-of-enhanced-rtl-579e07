// inv_iso_map: the inverse isomorphic mapping delta^-1, from the composite
// field GF(((2^2)^2)^2) back to GF(2^8). An 8x8 XOR matrix, the inverse of
// the matrix in iso_map.
module inv_iso_map (
  input  logic [7:0] q,
  output logic [7:0] a
);
  always_comb begin
    a[7] = q[7] ^ q[6] ^ q[5] ^ q[1];
    a[6] = q[6] ^ q[2];
    a[5] = q[6] ^ q[5] ^ q[1];
    a[4] = q[6] ^ q[5] ^ q[4] ^ q[2] ^ q[1];
    a[3] = q[5] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    a[2] = q[7] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    a[1] = q[5] ^ q[4];
    a[0] = q[6] ^ q[5] ^ q[4] ^ q[2] ^ q[0];
  end
endmodule
