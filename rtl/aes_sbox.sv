// aes_sbox: integrated S-box for SubBytes and InvSubBytes sharing one
// composite-field inverter (gf8_inv).
//   dec = 0: y = affine(x^-1)          (SubBytes)
//   dec = 1: y = (invaffine(x))^-1     (InvSubBytes)
// A multiplexer in front of the inverter selects x or invaffine(x), and one
// behind it selects affine(inverse) or the inverse itself.
// PIPE = 1 passes the register inside gf8_inv through: y and the delayed
// mode bit then follow x by one clock. PIPE = 0 is combinational.
module aes_sbox #(
  parameter bit PIPE = 1'b0
) (
  input  logic       clk,
  input  logic       dec,
  input  logic [7:0] x,
  output logic [7:0] y
);
  logic [7:0] x_ia, inv_in, inv_out, inv_aff;
  logic       dec_s2;

  aes_inv_affine u_ia  (.x(x), .y(x_ia));
  assign inv_in = dec ? x_ia : x;
  gf8_inv #(.PIPE(PIPE)) u_inv (.clk(clk), .x(inv_in), .y(inv_out));
  aes_affine     u_aff (.x(inv_out), .y(inv_aff));

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) dec_s2 <= dec;
  end else begin : g_comb
    assign dec_s2 = dec;
  end

  assign y = dec_s2 ? inv_out : inv_aff;
endmodule
