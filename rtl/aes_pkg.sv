// aes_pkg: types, constants and byte-level functions shared by the AES-128
// datapath (encrypt and decrypt pipelines, key schedule).
//
// A 128-bit block is held MSB-first: byte i of the FIPS-197 input sequence
// (in0 .. in15) sits at bits [127-8*i -: 8]. Byte i is state row (i % 4),
// column (i / 4), so column c is the 32-bit word at bits [127-32*c -: 32].
//
// The S-box and its inverse are not typed in as tables. They are generated
// at elaboration by constant functions: the multiplicative inverse in GF(2^8)
// (polynomial x^8+x^4+x^3+x+1) is found by walking the powers of the
// generator 3 and its inverse together, and each inverse is put through the
// FIPS-197 affine transform (b ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63).
// The resulting localparam tables become ROMs (or LUTs) in synthesis.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [255:0][7:0] sbox_table_t;

  // AES-128: Nk = 4 key words, Nr = 10 rounds
  localparam int unsigned NR = 10;

  // Round keys as the pipelines consume them: index 0 feeds the first
  // Add Round Key, index NR the last one.
  typedef block_t round_keys_t [NR+1];

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // multiply by x in GF(2^8)
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic sbox_table_t gen_sbox();
    sbox_table_t s;
    byte_t p = 8'h01;   // runs through 3^k
    byte_t q = 8'h01;   // runs through 3^-k, the inverse of p
    for (int k = 0; k < 255; k++) begin
      p = p ^ xtime(p);               // p * 3
      q = q ^ byte_t'(q << 1);        // q / 3 = q * 0xf6
      q = q ^ byte_t'(q << 2);
      q = q ^ byte_t'(q << 4);
      if (q[7]) q = q ^ 8'h09;
      s[p] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end
    s[0] = 8'h63;                     // 0 has no inverse; maps to 0x63
    return s;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t f = gen_sbox();
    sbox_table_t r;
    for (int i = 0; i < 256; i++) r[f[i]] = byte_t'(i);
    return r;
  endfunction

  localparam sbox_table_t SBOX     = gen_sbox();
  localparam sbox_table_t INV_SBOX = gen_inv_sbox();

  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[127-8*i -: 8];
  endfunction

  // SubWord(RotWord(w)) of the key schedule
  function automatic word_t sub_rot_word(word_t w);
    word_t r = {w[23:0], w[31:24]};
    return {SBOX[r[31:24]], SBOX[r[23:16]], SBOX[r[15:8]], SBOX[r[7:0]]};
  endfunction

  function automatic word_t mix_column(word_t c);
    byte_t a0 = c[31:24], a1 = c[23:16], a2 = c[15:8], a3 = c[7:0];
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // InvMixColumns coefficients 9, 11, 13, 14 built from x2, x4, x8 (xtime
  // chains, no loops) so that synthesis does not need to unroll anything
  typedef struct packed { byte_t m9, m11, m13, m14; } inv_mults_t;

  function automatic inv_mults_t inv_mults(byte_t a);
    byte_t x2 = xtime(a);
    byte_t x4 = xtime(x2);
    byte_t x8 = xtime(x4);
    return '{m9: x8 ^ a, m11: x8 ^ x2 ^ a, m13: x8 ^ x4 ^ a, m14: x8 ^ x4 ^ x2};
  endfunction

  function automatic word_t inv_mix_column(word_t c);
    inv_mults_t a0 = inv_mults(c[31:24]);
    inv_mults_t a1 = inv_mults(c[23:16]);
    inv_mults_t a2 = inv_mults(c[15:8]);
    inv_mults_t a3 = inv_mults(c[7:0]);
    return {a0.m14 ^ a1.m11 ^ a2.m13 ^ a3.m9,
            a0.m9  ^ a1.m14 ^ a2.m11 ^ a3.m13,
            a0.m13 ^ a1.m9  ^ a2.m14 ^ a3.m11,
            a0.m11 ^ a1.m13 ^ a2.m9  ^ a3.m14};
  endfunction

  function automatic block_t inv_mix_block(block_t b);
    block_t r;
    for (int c = 0; c < 4; c++) r[127-32*c -: 32] = inv_mix_column(b[127-32*c -: 32]);
    return r;
  endfunction

endpackage
