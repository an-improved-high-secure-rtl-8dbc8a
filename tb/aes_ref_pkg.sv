// aes_ref_pkg: software reference model of AES (FIPS-197) for the testbenches.
//
// Written independently of the RTL: the S-box is built by searching for each byte's
// multiplicative inverse by brute force and applying the affine map bit by bit, the inverse
// S-box by inverting that table, and the key expansion stores the complete expanded key.
// Byte order matches the RTL: first byte of a block or key in the most significant bits.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  // Tables are filled on first use.
  logic [7:0] sb_tab  [256];
  logic [7:0] isb_tab [256];
  bit         tab_ready = 0;

  function automatic logic [7:0] sbox_calc(logic [7:0] x);
    logic [7:0] y = 0;
    logic [7:0] r;
    for (int c = 1; c < 256; c++) if (mul(x, 8'(c)) == 8'h01) y = 8'(c);
    for (int i = 0; i < 8; i++)
      r[i] = y[i] ^ y[(i+4)%8] ^ y[(i+5)%8] ^ y[(i+6)%8] ^ y[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return r;
  endfunction

  function automatic void build_tables();
    if (tab_ready) return;
    for (int c = 0; c < 256; c++) begin
      sb_tab[c] = sbox_calc(8'(c));
      isb_tab[sb_tab[c]] = 8'(c);
    end
    tab_ready = 1;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    build_tables();
    return sb_tab[x];
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] x);
    build_tables();
    return isb_tab[x];
  endfunction

  // Bytes of a block as an array, byte 0 first.
  typedef logic [7:0] bytes_t [16];

  function automatic bytes_t to_bytes(blk_t b);
    bytes_t o;
    for (int k = 0; k < 16; k++) o[k] = b[127-8*k -: 8];
    return o;
  endfunction

  function automatic blk_t from_bytes(bytes_t o);
    blk_t b;
    for (int k = 0; k < 16; k++) b[127-8*k -: 8] = o[k];
    return b;
  endfunction

  // Full key expansion: returns 4*(Nr+1) words, word i in w[i].
  typedef logic [31:0] words_t [60];

  function automatic words_t expand(logic [255:0] key, int nk);
    words_t w;
    logic [7:0] rc = 8'h01;
    int nr = nk + 6;
    for (int i = 0; i < nk; i++) w[i] = key[255-32*i -: 32];
    for (int i = nk; i < 4*(nr+1); i++) begin
      logic [31:0] t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
    return w;
  endfunction

  function automatic blk_t round_key(words_t w, int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic bytes_t mix(bytes_t s, bit inverse);
    bytes_t o;
    logic [7:0] m [4];
    m = inverse ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c+r] = 0;
        for (int k = 0; k < 4; k++) o[4*c+r] ^= mul(m[(k - r + 4) % 4], s[4*c+k]);
      end
    return o;
  endfunction

  function automatic bytes_t shift(bytes_t s, bit inverse);
    bytes_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (inverse) o[4*((c+r)%4)+r] = s[4*c+r];
        else         o[4*c+r] = s[4*((c+r)%4)+r];
    return o;
  endfunction

  function automatic bytes_t sub(bytes_t s, bit inverse);
    for (int k = 0; k < 16; k++) s[k] = inverse ? inv_sbox(s[k]) : sbox(s[k]);
    return s;
  endfunction

  function automatic blk_t encrypt(blk_t pt, logic [255:0] key, int nk);
    words_t w = expand(key, nk);
    int nr = nk + 6;
    blk_t s = pt ^ round_key(w, 0);
    for (int r = 1; r <= nr; r++) begin
      bytes_t b = shift(sub(to_bytes(s), 0), 0);
      if (r != nr) b = mix(b, 0);
      s = from_bytes(b) ^ round_key(w, r);
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t ct, logic [255:0] key, int nk);
    words_t w = expand(key, nk);
    int nr = nk + 6;
    blk_t s = ct ^ round_key(w, nr);
    for (int r = nr - 1; r >= 0; r--) begin
      bytes_t b = sub(shift(to_bytes(s), 1), 1);
      s = from_bytes(b) ^ round_key(w, r);
      if (r != 0) s = from_bytes(mix(to_bytes(s), 1));
    end
    return s;
  endfunction

endpackage
