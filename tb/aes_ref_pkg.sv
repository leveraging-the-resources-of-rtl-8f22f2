// aes_ref_pkg: plain (unmasked) AES-128 reference model and sharing helpers
// for the testbenches. Written independently of the RTL package: the S-box is
// found by searching for the multiplicative inverse and applying the affine
// map bit by bit, as FIPS-197 states it.
package aes_ref_pkg;

  localparam int unsigned NSH = 10;  // shares per byte

  typedef logic [7:0]        byte_t;
  typedef byte_t [15:0]      blk_t;     // [n] = byte n, FIPS order
  typedef byte_t [NSH-1:0]   sh_t;      // shares of one byte
  typedef sh_t [15:0]        shblk_t;

  function automatic byte_t mul(byte_t a, byte_t b);
    byte_t p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      b = b >> 1;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic byte_t power(byte_t a, int e);
    byte_t r = 1;
    for (int i = 0; i < e; i++) r = mul(r, a);
    return r;
  endfunction

  function automatic byte_t inv(byte_t a);
    for (int y = 1; y < 256; y++)
      if (mul(a, byte_t'(y)) == 8'h01) return byte_t'(y);
    return 8'h00;
  endfunction

  function automatic byte_t affine(byte_t b);
    byte_t o;
    byte_t c = 8'h63;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return o;
  endfunction

  function automatic byte_t sbox(byte_t a);
    return affine(inv(a));
  endfunction

  function automatic blk_t sub_bytes(blk_t s);
    for (int n = 0; n < 16; n++) s[n] = sbox(s[n]);
    return s;
  endfunction

  // Row r rotates left by r: new (r,c) = old (r, c+r).
  function automatic blk_t ref_shift_rows(blk_t s);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) o[4*c + r] = s[4*((c + r) % 4) + r];
    return o;
  endfunction

  function automatic blk_t mix_columns(blk_t s);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[4*c + r] = mul(8'h02, s[4*c + r]) ^ mul(8'h03, s[4*c + (r+1)%4])
                   ^ s[4*c + (r+2)%4] ^ s[4*c + (r+3)%4];
    return o;
  endfunction

  // One key-expansion step; rnum = 1..10.
  function automatic blk_t next_key(blk_t k, int rnum);
    blk_t o;
    byte_t rc = 8'h01;
    byte_t t [4];
    for (int i = 1; i < rnum; i++) rc = mul(rc, 8'h02);
    for (int j = 0; j < 4; j++) t[j] = sbox(k[12 + (j+1)%4]);
    t[0] ^= rc;
    for (int j = 0; j < 4; j++) begin
      o[j]      = k[j] ^ t[j];
      o[4 + j]  = k[4 + j] ^ o[j];
      o[8 + j]  = k[8 + j] ^ o[4 + j];
      o[12 + j] = k[12 + j] ^ o[8 + j];
    end
    return o;
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key);
    blk_t s = pt ^ key;
    blk_t k = key;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, r);
      s = ref_shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s = s ^ k;
    end
    return s;
  endfunction

  // 128-bit literal (first byte in the top bits) to a block.
  function automatic blk_t from_bits(logic [127:0] v);
    blk_t b;
    for (int n = 0; n < 16; n++) b[n] = v[127 - 8*n -: 8];
    return b;
  endfunction

  function automatic blk_t rand_blk();
    blk_t b;
    for (int n = 0; n < 16; n++) b[n] = byte_t'($urandom);
    return b;
  endfunction

  // Random sharing of one byte: nine random shares, the tenth fixes the XOR.
  function automatic sh_t share(byte_t v);
    sh_t s;
    byte_t acc = v;
    for (int i = 1; i < NSH; i++) begin
      s[i] = byte_t'($urandom);
      acc ^= s[i];
    end
    s[0] = acc;
    return s;
  endfunction

  function automatic byte_t unshare(sh_t s);
    byte_t v = 0;
    for (int i = 0; i < NSH; i++) v ^= s[i];
    return v;
  endfunction

  function automatic shblk_t share_blk(blk_t b);
    shblk_t s;
    for (int n = 0; n < 16; n++) s[n] = share(b[n]);
    return s;
  endfunction

  function automatic blk_t unshare_blk(shblk_t s);
    blk_t b;
    for (int n = 0; n < 16; n++) b[n] = unshare(s[n]);
    return b;
  endfunction

endpackage
