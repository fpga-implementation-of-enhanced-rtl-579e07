// iso_map: the isomorphic mapping delta from GF(2^8) (AES polynomial
// x^8+x^4+x^3+x+1) to the composite field GF(((2^2)^2)^2) built with
// x^2+x+1, x^2+x+phi (phi={10}) and x^2+x+lambda (lambda={1100}).
// delta is an 8x8 bit matrix, realised as XOR trees, one per output bit.
// The matrix entries are this design's (the standard matrix for these
// polynomials); its inverse is inv_iso_map.
module iso_map (
  input  logic [7:0] q,
  output logic [7:0] a
);
  always_comb begin
    a[7] = q[7] ^ q[5];
    a[6] = q[7] ^ q[6] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    a[5] = q[7] ^ q[5] ^ q[3] ^ q[2];
    a[4] = q[7] ^ q[5] ^ q[3] ^ q[2] ^ q[1];
    a[3] = q[7] ^ q[6] ^ q[2] ^ q[1];
    a[2] = q[7] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    a[1] = q[6] ^ q[4] ^ q[1];
    a[0] = q[6] ^ q[1] ^ q[0];
  end
endmodule
