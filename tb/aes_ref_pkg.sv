// aes_ref_pkg: a plain behavioural AES-128 reference for the testbenches.
//
// It is written independently of the RTL: the S-box is found by brute-force
// search for each byte's multiplicative inverse in GF(2^8) followed by the
// affine transform written bit by bit, and decryption uses the straight
// FIPS-197 inverse cipher (InvShiftRows, InvSubBytes, AddRoundKey,
// InvMixColumns) rather than the equivalent inverse cipher of the RTL.
// Blocks are MSB-first: byte i of the FIPS-197 sequence is bits [127-8*i -: 8].
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0] b8_t;
  typedef blk_t keys_t [11];

  function automatic b8_t mul(b8_t a, b8_t b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic b8_t sbox(b8_t a);
    b8_t inv = 8'h00, s;
    if (a != 0) for (int b = 1; b < 256; b++) if (mul(a, b8_t'(b)) == 8'h01) inv = b8_t'(b);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // tables filled by init(), so the slow search runs once per simulation
  b8_t fwd [256];
  b8_t inv [256];
  bit  ready = 0;

  function automatic void init();
    if (ready) return;
    for (int i = 0; i < 256; i++) begin
      fwd[i] = sbox(b8_t'(i));
      inv[fwd[i]] = b8_t'(i);
    end
    ready = 1;
  endfunction

  function automatic b8_t gb(blk_t x, int i); return x[127-8*i -: 8]; endfunction

  function automatic blk_t sub(blk_t x, bit dir_inv);
    blk_t y;
    for (int i = 0; i < 16; i++) y[127-8*i -: 8] = dir_inv ? inv[gb(x, i)] : fwd[gb(x, i)];
    return y;
  endfunction

  function automatic blk_t shift(blk_t x, bit dir_inv);
    blk_t y;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (dir_inv) y[127-8*(r+4*((c+r)%4)) -: 8] = gb(x, r+4*c);
        else         y[127-8*(r+4*c) -: 8] = gb(x, r+4*((c+r)%4));
    return y;
  endfunction

  function automatic blk_t mix(blk_t x, bit dir_inv);
    blk_t y;
    b8_t m [4] = dir_inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b8_t acc = 0;
        for (int k = 0; k < 4; k++) acc ^= mul(m[(k - r + 4) % 4], gb(x, k + 4*c));
        y[127-8*(r+4*c) -: 8] = acc;
      end
    return y;
  endfunction

  function automatic keys_t expand(blk_t key);
    keys_t k;
    logic [31:0] w [44];
    b8_t rc = 8'h01;
    init();
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {fwd[t[31:24]], fwd[t[23:16]], fwd[t[15:8]], fwd[t[7:0]]} ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic blk_t encrypt(blk_t key, blk_t pt);
    keys_t k = expand(key);
    blk_t s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift(sub(s, 0), 0);
      if (r != 10) s = mix(s, 0);
      s ^= k[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t key, blk_t ct);
    keys_t k = expand(key);
    blk_t s = ct ^ k[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub(shift(s, 1), 1);
      s ^= k[r];
      if (r != 0) s = mix(s, 1);
    end
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
