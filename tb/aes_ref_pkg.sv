// aes_ref_pkg: reference AES-128 model for the testbenches, written independently of the RTL.
//
// The state is kept as a 4x4 byte matrix st[row][col]; the S-box is found by searching for
// the multiplicative inverse in GF(2^8) (once, into a table) and applying the affine map
// with the FIPS-197 constant 0x63; the key schedule is expanded word by word
// into all eleven round keys. Slow but simple; only testbenches use it.
package aes_ref_pkg;

  typedef logic [7:0] b8;
  typedef b8 mat_t [4][4];

  function automatic b8 mul(b8 a, b8 b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic b8 inv(b8 a);
    if (a == 0) return 0;
    for (int c = 1; c < 256; c++) if (mul(a, b8'(c)) == 8'h01) return b8'(c);
    return 0;
  endfunction

  function automatic b8 aff(b8 x);
    b8 y;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return y;
  endfunction

  // S-box and inverse, built once on first use
  b8  sb_tbl  [256];
  b8  isb_tbl [256];
  bit built = 0;

  function automatic void build();
    for (int a = 0; a < 256; a++) begin
      sb_tbl[a] = aff(inv(b8'(a)));
      isb_tbl[sb_tbl[a]] = b8'(a);
    end
    built = 1;
  endfunction

  function automatic b8 sb(b8 a);
    if (!built) build();
    return sb_tbl[a];
  endfunction

  function automatic b8 isb(b8 a);
    if (!built) build();
    return isb_tbl[a];
  endfunction

  function automatic mat_t to_mat(logic [127:0] v);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) m[r][c] = v[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(mat_t m);
    logic [127:0] v;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) v[127 - 8*(4*c + r) -: 8] = m[r][c];
    return v;
  endfunction

  function automatic logic [127:0] t_sub(logic [127:0] v, bit inverse);
    mat_t m = to_mat(v);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = inverse ? isb(m[r][c]) : sb(m[r][c]);
    return from_mat(m);
  endfunction

  function automatic logic [127:0] t_shift(logic [127:0] v, bit inverse);
    mat_t m = to_mat(v);
    mat_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inverse) o[r][(c + r) % 4] = m[r][c];
        else         o[r][c] = m[r][(c + r) % 4];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] t_mix(logic [127:0] v, bit inverse);
    mat_t m = to_mat(v);
    mat_t o;
    b8 k [4];
    if (inverse) k = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else         k = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 0;
        for (int j = 0; j < 4; j++) o[r][c] ^= mul(k[(j - r + 4) % 4], m[j][c]);
      end
    return from_mat(o);
  endfunction

  // all eleven round keys
  function automatic void expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    b8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb(t[31:24]), sb(t[23:16]), sb(t[15:8]), sb(t[7:0])};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] round_key(logic [127:0] key, int r);
    logic [127:0] rk [11];
    expand(key, rk);
    return rk[r];
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = t_shift(t_sub(s, 0), 0);
      if (r != 10) s = t_mix(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] key, logic [127:0] ct);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = t_sub(t_shift(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = t_mix(s, 1);
    end
    return s;
  endfunction

endpackage
