// aes_ref_pkg: a plain behavioural AES-128/192/256 model used by the
// testbenches as the independent reference.
//
// It shares no code with the RTL: the S-box is derived by searching for the
// multiplicative inverse with a bit-serial GF(2^8) multiply and applying the
// affine transform bit by bit, MixColumns uses the full multiply, and the
// ciphers follow the FIPS-197 pseudo-code round by round. Every testbench
// first checks this model against the FIPS-197 Appendix C vectors.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [127:0] rks_t [15];

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv, y;
    inv = 0;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (gmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  // Tables filled once by ref_init().
  logic [7:0] fwd [256];
  logic [7:0] inv_t [256];
  bit         ready = 0;

  function automatic void ref_init();
    if (ready) return;
    for (int i = 0; i < 256; i++) fwd[i] = ref_sbox(8'(i));
    for (int i = 0; i < 256; i++) inv_t[fwd[i]] = 8'(i);
    ready = 1;
  endfunction

  function automatic int nrounds(int ks);  // ks: 0=128 1=192 2=256
    return 10 + 2 * ks;
  endfunction

  function automatic rks_t expand(logic [255:0] key, int ks);
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0]  rc;
    int nk, tot;
    rks_t r;
    nk  = 4 + 2 * ks;
    tot = 4 * (nrounds(ks) + 1);
    rc  = 8'h01;
    for (int i = 0; i < 60; i++) w[i] = 0;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < tot; i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {fwd[t[31:24]], fwd[t[23:16]], fwd[t[15:8]], fwd[t[7:0]]} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {fwd[t[31:24]], fwd[t[23:16]], fwd[t[15:8]], fwd[t[7:0]]};
      end
      w[i] = w[i-nk] ^ t;
    end
    for (int k = 0; k < 15; k++) r[k] = {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
    return r;
  endfunction

  // state as s[row][col]
  typedef logic [7:0] st_t [4][4];

  function automatic st_t to_st(blk_t b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic blk_t from_st(st_t s);
    blk_t b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic blk_t sub_shift(blk_t b, bit inv);
    st_t s, o;
    s = to_st(b);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[r][c] = fwd[s[r][(c + r) % 4]];
        else      o[r][(c + r) % 4] = inv_t[s[r][c]];
    return from_st(o);
  endfunction

  function automatic logic [31:0] mix_col(logic [31:0] col, bit inv);
    logic [7:0] a [4];
    logic [7:0] m [4];
    logic [7:0] k [4];
    logic [31:0] o;
    for (int i = 0; i < 4; i++) a[i] = col[31 - 8*i -: 8];
    if (!inv) k = '{8'h02, 8'h03, 8'h01, 8'h01};
    else      k = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    for (int i = 0; i < 4; i++) begin
      m[i] = 0;
      for (int j = 0; j < 4; j++) m[i] ^= gmul(k[(j - i + 4) % 4], a[j]);
      o[31 - 8*i -: 8] = m[i];
    end
    return o;
  endfunction

  function automatic blk_t mix(blk_t b, bit inv);
    blk_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mix_col(b[127 - 32*c -: 32], inv);
    return o;
  endfunction

  function automatic blk_t encrypt(blk_t pt, logic [255:0] key, int ks);
    rks_t rk;
    blk_t s;
    rk = expand(key, ks);
    s = pt ^ rk[0];
    for (int r = 1; r <= nrounds(ks); r++) begin
      s = sub_shift(s, 0);
      if (r != nrounds(ks)) s = mix(s, 0);
      s = s ^ rk[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t ct, logic [255:0] key, int ks);
    rks_t rk;
    blk_t s;
    rk = expand(key, ks);
    s = ct ^ rk[nrounds(ks)];
    for (int r = nrounds(ks) - 1; r >= 0; r--) begin
      s = sub_shift(s, 1);
      s = s ^ rk[r];
      if (r != 0) s = mix(s, 1);
    end
    return s;
  endfunction

  function automatic logic [255:0] rand_key();
    logic [255:0] k;
    for (int i = 0; i < 8; i++) k[32*i +: 32] = $urandom;
    return k;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // FIPS-197 Appendix C: returns the number of mismatches of the model.
  function automatic int self_test();
    logic [255:0] k;
    blk_t pt, exp_ct [3];
    int bad;
    ref_init();
    bad = 0;
    pt = 128'h00112233445566778899aabbccddeeff;
    exp_ct[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    exp_ct[1] = 128'hdda97ca4864cdfe06eaf70a0ec0d7191;
    exp_ct[2] = 128'h8ea2b7ca516745bfeafc49904b496089;
    k = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    for (int ks = 0; ks < 3; ks++) begin
      logic [255:0] kk;
      kk = k & ~((256'h1 << (128 - 64*ks)) - 1);
      if (encrypt(pt, kk, ks) !== exp_ct[ks]) bad++;
      if (decrypt(exp_ct[ks], kk, ks) !== pt) bad++;
    end
    return bad;
  endfunction

endpackage
