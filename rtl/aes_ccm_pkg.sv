// aes_ccm_pkg: types, constants and GF(2^8) helper functions shared by the
// AES-CCM core.
//
// The AES helpers follow FIPS-197: field multiplication modulo
// x^8 + x^4 + x^3 + x + 1, the S-box as multiplicative inverse followed by the
// affine map with constant 0x63, and MixColumns on one 32-bit column.  The
// S-box table is produced here by a constant function so that no table of
// numbers has to be kept in the source; the hardware sees a plain 256x8 ROM.
//
// Byte order convention used throughout the design: a 128-bit block holds its
// first byte (byte 0 in FIPS-197 / SP 800-38C numbering) in bits [127:120].
// A 32-bit AES column holds its row-0 byte in bits [31:24].
package aes_ccm_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Source of the block the AES core encrypts next (the two input multiplexers
  // of the CCM datapath).
  typedef enum logic [1:0] {
    SRC_B0    = 2'd0,   // initial block B0 from the frame generator
    SRC_CBC   = 2'd1,   // payload block XOR previous cipher output (CBC-MAC)
    SRC_CTR   = 2'd2    // counter block CTRi from the frame generator
  } aes_src_e;

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiplication in GF(2^8).
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p;
    byte_t t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t gf_inv(input byte_t a);
    byte_t r;
    byte_t sq;
    r  = 8'h01;
    sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);          // a^(2^i)
      r  = gf_mul(r, sq);           // accumulates a^(2+4+...+128) = a^254
    end
    return r;
  endfunction

  // FIPS-197 S-box value of one byte.
  function automatic byte_t sbox_calc(input byte_t a);
    byte_t b;
    byte_t s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  // MixColumns on one column; row 0 in bits [31:24].
  function automatic word_t mix_column(input word_t c);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

endpackage
