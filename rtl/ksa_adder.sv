// ksa_adder: W-bit Kogge-Stone parallel-prefix adder. Bit generate and
// propagate signals (g = a&b, p = a^b) are combined in ceil(log2 W) prefix
// levels, each level merging spans twice as long as the one before, so the
// carry into every bit is ready after log2(W) gate levels. The carry-in is
// folded into bit 0's generate term. Combinational.
module ksa_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned LV = (W > 1) ? $clog2(W) : 1;
  logic [W-1:0] p0;
  logic [W-1:0] g [LV+1];
  logic [W-1:0] p [LV+1];

  always_comb begin
    p0   = a ^ b;
    g[0] = a & b;
    p[0] = p0;
    g[0][0] = (a[0] & b[0]) | (p0[0] & cin);
    for (int l = 0; l < LV; l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
          p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    // g[LV][i] is the carry out of bit i
    s[0] = p0[0] ^ cin;
    for (int i = 1; i < W; i++) s[i] = p0[i] ^ g[LV][i-1];
    cout = g[LV][W-1];
  end
endmodule
