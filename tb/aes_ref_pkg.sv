// aes_ref_pkg: reference models used by the testbenches. They are written
// independently of the RTL: field products by shift-and-add polynomial
// arithmetic, inverses by exhaustive search, the S-box from the rotation
// form of the affine map, and AES-256 as the byte-oriented textbook
// algorithm with the full 60-word key expansion held in an array.
package aes_ref_pkg;
  typedef logic [7:0] b8;

  // GF(2^8) product modulo x^8+x^4+x^3+x+1
  function automatic b8 gmul(b8 a, b8 b);
    b8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic b8 ginv(b8 a);
    for (int c = 1; c < 256; c++) if (gmul(a, b8'(c)) == 8'h01) return b8'(c);
    return 8'h00;
  endfunction

  function automatic b8 rotl(b8 a, int n);
    return b8'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic b8 sbox_calc(b8 x);
    b8 v = ginv(x);
    return v ^ rotl(v, 1) ^ rotl(v, 2) ^ rotl(v, 3) ^ rotl(v, 4) ^ 8'h63;
  endfunction

  // the S-box and its inverse are built once, on first use, from sbox_calc
  b8  sb_tab  [256];
  b8  isb_tab [256];
  bit tab_ready = 1'b0;

  function automatic void build_tables();
    for (int c = 0; c < 256; c++) begin
      sb_tab[c] = sbox_calc(b8'(c));
      isb_tab[sb_tab[c]] = b8'(c);
    end
    tab_ready = 1'b1;
  endfunction

  function automatic b8 sbox(b8 x);
    if (!tab_ready) build_tables();
    return sb_tab[x];
  endfunction

  function automatic b8 inv_sbox(b8 y);
    if (!tab_ready) build_tables();
    return isb_tab[y];
  endfunction

  // GF(2^2): polynomials mod x^2 + x + 1
  function automatic logic [1:0] m2(logic [1:0] a, logic [1:0] b);
    logic [2:0] t = 0;
    for (int i = 0; i < 2; i++) if (b[i]) t ^= 3'(a) << i;
    if (t[2]) t ^= 3'b111;
    return t[1:0];
  endfunction

  // GF((2^2)^2): polynomials over GF(2^2) mod y^2 + y + phi, phi = 2
  function automatic logic [3:0] m4(logic [3:0] a, logic [3:0] b);
    logic [1:0] c2, c1, c0;
    c2 = m2(a[3:2], b[3:2]);
    c1 = m2(a[3:2], b[1:0]) ^ m2(a[1:0], b[3:2]);
    c0 = m2(a[1:0], b[1:0]);
    // y^2 = y + phi
    return {c1 ^ c2, c0 ^ m2(c2, 2'b10)};
  endfunction

  // GF(((2^2)^2)^2): polynomials over GF(2^4) mod z^2 + z + lambda, lambda = 4'hc
  function automatic b8 m8c(b8 a, b8 b);
    logic [3:0] c2, c1, c0;
    c2 = m4(a[7:4], b[7:4]);
    c1 = m4(a[7:4], b[3:0]) ^ m4(a[3:0], b[7:4]);
    c0 = m4(a[3:0], b[3:0]);
    return {c1 ^ c2, c0 ^ m4(c2, 4'hc)};
  endfunction

  // ---- AES-256, textbook form -------------------------------------------
  typedef logic [31:0] w32;
  typedef w32 sched_t [60];

  function automatic w32 subword(w32 w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic sched_t expand(logic [255:0] key);
    sched_t w;
    b8 rc = 8'h01;
    for (int i = 0; i < 8; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      w32 t = w[i-1];
      if (i % 8 == 0) begin
        t = subword({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end else if (i % 8 == 4) t = subword(t);
      w[i] = w[i-8] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] round_key(sched_t w, int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  typedef b8 st_t [4][4];   // [row][col]

  function automatic st_t to_st(logic [127:0] v);
    st_t s;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = v[127 - 8*(4*c+r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] v;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) v[127 - 8*(4*c+r) -: 8] = s[r][c];
    return v;
  endfunction

  function automatic st_t shift(st_t s, bit inv);
    st_t o;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      if (!inv) o[r][c] = s[r][(c + r) % 4];
      else      o[r][(c + r) % 4] = s[r][c];
    return o;
  endfunction

  function automatic st_t mix(st_t s, bit inv);
    st_t o;
    b8 m [4];
    if (!inv) m = '{8'h02, 8'h03, 8'h01, 8'h01};
    else      m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) begin
      o[r][c] = 0;
      for (int k = 0; k < 4; k++) o[r][c] ^= gmul(m[(k - r + 4) % 4], s[k][c]);
    end
    return o;
  endfunction

  function automatic logic [127:0] shift_rows_ref(logic [127:0] v, bit inv);
    return from_st(shift(to_st(v), inv));
  endfunction

  function automatic logic [127:0] mix_ref(logic [127:0] v, bit inv);
    return from_st(mix(to_st(v), inv));
  endfunction

  function automatic logic [127:0] sub_ref(logic [127:0] v, bit inv);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[8*i +: 8] = inv ? inv_sbox(v[8*i +: 8]) : sbox(v[8*i +: 8]);
    return o;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [255:0] key);
    sched_t w = expand(key);
    logic [127:0] s = pt ^ round_key(w, 0);
    for (int r = 1; r <= 14; r++) begin
      s = shift_rows_ref(sub_ref(s, 0), 0);
      if (r != 14) s = mix_ref(s, 0);
      s ^= round_key(w, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [255:0] key);
    sched_t w = expand(key);
    logic [127:0] s = ct ^ round_key(w, 14);
    for (int r = 13; r >= 0; r--) begin
      s = sub_ref(shift_rows_ref(s, 1), 1);
      s ^= round_key(w, r);
      if (r != 0) s = mix_ref(s, 1);
    end
    return s;
  endfunction
endpackage
