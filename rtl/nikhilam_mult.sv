// nikhilam_mult: unsigned N x N multiplier built on the Nikhilam rule
// ("all from nine and the last from ten") with the base B = 2^N. Each
// operand is written as its distance from the base, a' = B - a and
// b' = B - b, and then
//   a * b = (a - b') * B + a' * b'
// The left term is a cross subtraction followed by a shift (free wiring);
// the right term multiplies the two complements. The complements, the
// cross subtraction, the accumulation of the bit-by-bit partial products of
// a' * b' and the final sum all use Kogge-Stone adders (ksa_adder), which is
// the change that distinguishes this multiplier from one using carry-save
// or ripple adders. Widths: a', b' need N+1 bits (a = 0 gives a' = B); the
// cross term is signed and needs N+2 bits. Combinational.
module nikhilam_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned W  = 2*N + 2;  // working width of all sums
  logic [N:0]   ac, bc;                  // complements from the base
  logic [N+1:0] cdiff;                   // a - b' = a + b - B, two's complement
  logic [W-1:0] pp [N+1];                // partial products of ac * bc
  logic [W-1:0] acc [N+2];               // running sums of the partial products
  logic [W-1:0] cross_sh, total;
  logic         unused_c0, unused_c1, unused_c2, unused_c3;
  logic [N:0]   unused_acc_c;

  // a' = ~a + 1 and b' = ~b + 1 in N+1 bits
  ksa_adder #(.W(N+1)) u_ca (.a({1'b0, ~a}), .b('0), .cin(1'b1), .s(ac), .cout(unused_c0));
  ksa_adder #(.W(N+1)) u_cb (.a({1'b0, ~b}), .b('0), .cin(1'b1), .s(bc), .cout(unused_c1));
  // a - b' = a + ~b' + 1 in N+2 bits
  ksa_adder #(.W(N+2)) u_cr (.a({2'b00, a}), .b({1'b1, ~bc}), .cin(1'b1), .s(cdiff),
                             .cout(unused_c2));

  always_comb
    for (int i = 0; i <= N; i++)
      pp[i] = W'(ac & {(N+1){bc[i]}}) << i;

  assign acc[0] = '0;
  for (genvar i = 0; i <= N; i++) begin : g_acc
    ksa_adder #(.W(W)) u_add (.a(acc[i]), .b(pp[i]), .cin(1'b0), .s(acc[i+1]),
                              .cout(unused_acc_c[i]));
  end

  // sign-extend the cross term and shift it by the base
  assign cross_sh = W'({{N{cdiff[N+1]}}, cdiff}) << N;
  ksa_adder #(.W(W)) u_fin (.a(cross_sh), .b(acc[N+1]), .cin(1'b0), .s(total), .cout(unused_c3));
  assign p = total[2*N-1:0];
endmodule
