// gf4_mul: multiplier in GF((2^2)^2). Elements are qH*x + qL with qH, qL
// in GF(2^2) and x^2 = x + phi. Expanding and reducing:
//   k = qH wH (x + phi) + (qH wL + qL wH) x + qL wL
// so kH = qH wH ^ qH wL ^ qL wH and kL = phi*(qH wH) ^ qL wL.
// Built from four GF(2^2) multipliers and one phi multiplier, combinational.
module gf4_mul (
  input  logic [3:0] q,
  input  logic [3:0] w,
  output logic [3:0] k
);
  logic [1:0] hh, hl, lh, ll, hh_phi;
  gf2_mul     u_hh (.a(q[3:2]), .b(w[3:2]), .p(hh));
  gf2_mul     u_hl (.a(q[3:2]), .b(w[1:0]), .p(hl));
  gf2_mul     u_lh (.a(q[1:0]), .b(w[3:2]), .p(lh));
  gf2_mul     u_ll (.a(q[1:0]), .b(w[1:0]), .p(ll));
  gf2_mul_phi u_ph (.q(hh), .k(hh_phi));
  assign k = {hh ^ hl ^ lh, hh_phi ^ ll};
endmodule
