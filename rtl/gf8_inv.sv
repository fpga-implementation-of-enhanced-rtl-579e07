// gf8_inv: multiplicative inverse in GF(2^8) by composite-field arithmetic
// (0 maps to 0). The byte is mapped by delta into GF(((2^2)^2)^2) as
// qH*y + qL, where y^2 = y + lambda. Then
//   d     = lambda*qH^2 ^ qL*(qH ^ qL)        (an element of GF(2^4))
//   inv   = qH*d^-1 * y + (qH ^ qL)*d^-1
// and delta^-1 maps the result back. Only GF(2^4) logic is needed: one
// squarer, one lambda multiplier, three GF(2^4) multipliers and one
// GF(2^4) inverter.
// PIPE = 1 inserts a register after the GF(2^4) inverter (it holds qH,
// qH^qL and d^-1, 12 bits), splitting the inverse into two clock cycles:
// y then appears one clock after x. With PIPE = 0 the block is purely
// combinational and clk is unused. The register position is this design's
// choice.
module gf8_inv #(
  parameter bit PIPE = 1'b0
) (
  input  logic       clk,
  input  logic [7:0] x,
  output logic [7:0] y
);
  logic [7:0] q;
  logic [3:0] qh, ql, qs, qh_sq, qh_sq_l, ql_qs, d, d_inv;
  logic [3:0] s2_qh, s2_qs, s2_dinv, out_h, out_l;

  iso_map        u_iso  (.q(x), .a(q));
  assign qh = q[7:4];
  assign ql = q[3:0];
  assign qs = qh ^ ql;
  gf4_square     u_sq   (.q(qh), .k(qh_sq));
  gf4_mul_lambda u_lam  (.q(qh_sq), .k(qh_sq_l));
  gf4_mul        u_mul0 (.q(qs), .w(ql), .k(ql_qs));
  assign d = qh_sq_l ^ ql_qs;
  gf4_inv        u_inv  (.q(d), .k(d_inv));

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      s2_qh   <= qh;
      s2_qs   <= qs;
      s2_dinv <= d_inv;
    end
  end else begin : g_comb
    assign s2_qh   = qh;
    assign s2_qs   = qs;
    assign s2_dinv = d_inv;
  end

  gf4_mul        u_mulh (.q(s2_qh), .w(s2_dinv), .k(out_h));
  gf4_mul        u_mull (.q(s2_qs), .w(s2_dinv), .k(out_l));
  inv_iso_map    u_iiso (.q({out_h, out_l}), .a(y));
endmodule
