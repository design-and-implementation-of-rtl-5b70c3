// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.
//
// Field multiplication is done two ways: by shift-and-add (gmul) and by the
// exponential/logarithm tables of generator 03 (gmul_log), following the
// table method: add the logarithms, subtract FF when the sum exceeds FF, and
// look the sum up in the exponential table.  The S-box is computed from a
// brute-force inverse and the affine map written with byte rotations.  A
// byte-array model of the full AES cipher (any key length) serves as the
// reference for the round, key schedule and core testbenches.
package tb_ref_pkg;

  typedef logic [7:0] b8;

  function automatic b8 gmul(b8 a, b8 b);
    b8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
      b = b >> 1;
    end
    return p;
  endfunction

  // Carry-free product of two 4-bit polynomials.
  function automatic logic [6:0] clmul4(logic [3:0] a, logic [3:0] b);
    logic [6:0] p = 0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p ^= 7'(a) << i;
    return p;
  endfunction

  // Exponential table E[i] = 03^i (E[255] = 01) and logarithm table L.
  function automatic void log_tables(output b8 e [256], output b8 l [256]);
    b8 g = 8'h01;
    for (int i = 0; i < 256; i++) l[i] = 0;
    for (int i = 0; i < 256; i++) begin
      e[i] = g;
      if (i < 255) l[g] = 8'(i);
      g = gmul(g, 8'h03);
    end
  endfunction

  function automatic b8 gmul_log(b8 a, b8 b);
    b8 e [256];
    b8 l [256];
    int s;
    if (a == 0 || b == 0) return 0;
    log_tables(e, l);
    s = int'(l[a]) + int'(l[b]);
    if (s > 255) s -= 255;
    return e[s];
  endfunction

  function automatic b8 rotl8(b8 x, int n);
    return 8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic b8 sbox(b8 x);
    b8 inv = 0;
    for (int y = 1; y < 256; y++)
      if (gmul(x, 8'(y)) == 8'h01) inv = 8'(y);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic b8 inv_sbox(b8 x);
    for (int y = 0; y < 256; y++)
      if (sbox(8'(y)) == x) return 8'(y);
    return 0;
  endfunction

  // Full lookup tables, built once per call site for speed.
  function automatic void sbox_tables(output b8 s [256], output b8 si [256]);
    for (int i = 0; i < 256; i++) begin
      s[i] = sbox(8'(i));
      si[s[i]] = 8'(i);
    end
  endfunction

  // ---- byte-array AES model: s[r + 4c], byte 0 = most significant ----
  typedef b8 st_t [16];

  function automatic st_t to_st(logic [127:0] v);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127 - 8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = s[i];
    return v;
  endfunction

  function automatic st_t mixcol(st_t s, bit inv);
    st_t o;
    b8 m [4];
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c + r] = 0;
        for (int k = 0; k < 4; k++)
          o[4*c + r] ^= gmul(m[(k - r + 4) % 4], s[4*c + k]);
      end
    return o;
  endfunction

  function automatic st_t shrows(st_t s, bit inv);
    st_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[r + 4*c] = s[r + 4*((c + r) % 4)];
        else      o[r + 4*((c + r) % 4)] = s[r + 4*c];
    return o;
  endfunction

  // Round keys: rk[r] is round key r as 128 bits.
  function automatic void expand(logic [255:0] key, int nk, output logic [127:0] rk [15]);
    logic [31:0] w [60];
    logic [31:0] t;
    b8 rc = 8'h01;
    int nr = nk + 6;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < 4*(nr+1); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
    for (int r = 0; r < 15; r++)
      rk[r] = (r <= nr) ? {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]} : '0;
  endfunction

  // key is left-aligned in 256 bits (AES-128 key in bits 255:128).
  function automatic logic [127:0] encrypt(logic [255:0] key, int nk, logic [127:0] pt);
    logic [127:0] rk [15];
    b8 sb [256];
    b8 si [256];
    st_t s;
    int nr = nk + 6;
    expand(key, nk, rk);
    sbox_tables(sb, si);
    s = to_st(pt ^ rk[0]);
    for (int r = 1; r <= nr; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sb[s[i]];
      s = shrows(s, 0);
      if (r != nr) s = mixcol(s, 0);
      s = to_st(from_st(s) ^ rk[r]);
    end
    return from_st(s);
  endfunction

  function automatic logic [127:0] decrypt(logic [255:0] key, int nk, logic [127:0] ct);
    logic [127:0] rk [15];
    b8 sb [256];
    b8 si [256];
    st_t s;
    int nr = nk + 6;
    expand(key, nk, rk);
    sbox_tables(sb, si);
    s = to_st(ct ^ rk[nr]);
    for (int r = nr - 1; r >= 0; r--) begin
      s = shrows(s, 1);
      for (int i = 0; i < 16; i++) s[i] = si[s[i]];
      s = to_st(from_st(s) ^ rk[r]);
      if (r != 0) s = mixcol(s, 1);
    end
    return from_st(s);
  endfunction

endpackage
