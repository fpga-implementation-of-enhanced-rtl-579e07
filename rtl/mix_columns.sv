// mix_columns: integrated MixColumns / InvMixColumns on all four columns
// at once. Each column (a0..a3) is multiplied in GF(2^8) by the circulant
// matrix {02 03 01 01} (dec = 0) or {0e 0b 0d 09} (dec = 1). The constant
// multiplications are built from xtime (multiply by x, a shift and a
// conditional XOR with 8'h1b): 2a = xt(a), 4a = xt(2a), 8a = xt(4a), and
// e.g. 0e*a = 8a ^ 4a ^ 2a. Combinational.
module mix_columns
  import aes_pkg::*;
(
  input  logic   dec,
  input  state_t s,
  output state_t y
);
  function automatic byte_t xt(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      byte_t m2 [4];
      byte_t m4 [4];
      byte_t m8 [4];
      byte_t o;
      for (int r = 0; r < 4; r++) begin
        a[r]  = get_byte(s, r, c);
        m2[r] = xt(a[r]);
        m4[r] = xt(m2[r]);
        m8[r] = xt(m4[r]);
      end
      for (int r = 0; r < 4; r++) begin
        if (!dec)
          // 02*a[r] ^ 03*a[r+1] ^ a[r+2] ^ a[r+3]
          o = m2[r] ^ m2[(r + 1) % 4] ^ a[(r + 1) % 4] ^ a[(r + 2) % 4] ^ a[(r + 3) % 4];
        else
          // 0e*a[r] ^ 0b*a[r+1] ^ 0d*a[r+2] ^ 09*a[r+3]
          o = (m8[r] ^ m4[r] ^ m2[r])
            ^ (m8[(r + 1) % 4] ^ m2[(r + 1) % 4] ^ a[(r + 1) % 4])
            ^ (m8[(r + 2) % 4] ^ m4[(r + 2) % 4] ^ a[(r + 2) % 4])
            ^ (m8[(r + 3) % 4] ^ a[(r + 3) % 4]);
        y[127 - 8*(4*c + r) -: 8] = o;
      end
    end
  end
endmodule
