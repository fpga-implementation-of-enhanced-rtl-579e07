// gf4_inv: multiplicative inverse in GF((2^2)^2), written as four
// sum-of-products equations of the input bits (0 maps to 0). This is the
// only non-linear piece of the composite-field S-box besides the GF(2^4)
// multipliers around it.
module gf4_inv (
  input  logic [3:0] q,
  output logic [3:0] k
);
  logic q3, q2, q1, q0;
  always_comb begin
    {q3, q2, q1, q0} = q;
    k[3] = q3 ^ (q3 & q2 & q1) ^ (q3 & q0) ^ q2;
    k[2] = (q3 & q2 & q1) ^ (q3 & q2 & q0) ^ (q3 & q0) ^ q2 ^ (q2 & q1);
    k[1] = q3 ^ (q3 & q2 & q1) ^ (q3 & q1 & q0) ^ q2 ^ (q2 & q0) ^ q1;
    k[0] = (q3 & q2 & q1) ^ (q3 & q2 & q0) ^ (q3 & q1) ^ (q3 & q1 & q0)
         ^ (q3 & q0) ^ q2 ^ (q2 & q1) ^ (q2 & q1 & q0) ^ q1 ^ q0;
  end
endmodule
