// aes_ref_pkg -- reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: GF(2^8) products use shift-and-add
// (Russian-peasant) multiplication instead of log/exp tables, the S-box entry
// is found by searching for the multiplicative inverse, and the state is kept
// as a 4x4 array of bytes. Slow, but simple enough to trust.
package aes_ref_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  typedef logic [7:0] st_t [4][4];     // st[r][c]

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    if (a == 0) return 8'h00;
    for (int x = 1; x < 256; x++)
      if (gmul(a, 8'(x)) == 8'h01) return 8'(x);
    return 8'h00;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    logic [7:0] b, r;
    logic [7:0] c;
    b = ginv(a);
    c = 8'h63;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8] ^ c[i];
    return r;
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] a);
    for (int x = 0; x < 256; x++)
      if (sbox(8'(x)) == a) return 8'(x);
    return 8'h00;
  endfunction

  function automatic st_t to_st(logic [127:0] v);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = v[127 - 8 * (4 * c + r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] v;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        v[127 - 8 * (4 * c + r) -: 8] = s[r][c];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] v, bit inv);
    logic [127:0] o;
    for (int i = 0; i < 16; i++)
      o[8 * i +: 8] = inv ? inv_sbox(v[8 * i +: 8]) : sbox(v[8 * i +: 8]);
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] v, bit inv);
    st_t s, o;
    s = to_st(v);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) o[r][(c + r) % 4] = s[r][c];
        else     o[r][c] = s[r][(c + r) % 4];
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] v, bit inv);
    st_t s, o;
    logic [7:0] m [4];
    s = to_st(v);
    if (inv) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 8'h00;
        for (int k = 0; k < 4; k++) o[r][c] ^= gmul(m[(k - r + 4) % 4], s[k][c]);
      end
    return from_st(o);
  endfunction

  typedef logic [127:0] rk_t [11];

  function automatic rk_t expand(logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rk_t rk;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32 * i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i - 1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i - 4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4 * r], w[4 * r + 1], w[4 * r + 2], w[4 * r + 3]};
    return rk;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    rk_t rk;
    logic [127:0] s;
    rk = expand(key);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (r != 10) s = ref_mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] key, logic [127:0] ct);
    rk_t rk;
    logic [127:0] s;
    rk = expand(key);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

endpackage
