// aes_pkg: types, constants and functions shared by the masked AES-128 pipeline.
//
// State and key layout follow the usual AES byte order: the most significant
// byte of a 128-bit value is byte 0 of the state, and the four 32-bit key
// words Kb0..Kb3 are the 128-bit key read from the top down. The packed arrays
// below use ascending ranges so that element 0 is that first byte or word.
//
// The S-box and its inverse are not typed in as tables: they are computed at
// elaboration time from their definition, the multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the AES affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The resulting constants synthesize as 256-entry ROMs.
package aes_pkg;

  typedef logic [7:0]        byte_t;
  typedef logic [31:0]       word_t;
  typedef byte_t [0:15]      state_t;      // element 0 = byte 0 (MSB)
  typedef word_t [0:3]       key_words_t;  // element 0 = Kb0 (MSB)
  typedef byte_t [0:255]     sbox_table_t;

  localparam int unsigned NR          = 10;  // rounds of AES-128
  localparam int unsigned KE_STAGES   = 5;   // pipeline stages of one masked key expansion
  localparam int unsigned ROUND_STAGES = KE_STAGES;  // a round takes as long as its key
  // Input register (initial AddRoundKey), NR rounds, output register.
  localparam int unsigned LATENCY     = 1 + NR * ROUND_STAGES + 1;

  // Multiplication by x in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);  // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) begin
      byte_t b = gf_inv(byte_t'(i));
      t[i] = b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t f = gen_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

  localparam sbox_table_t SBOX     = gen_sbox();
  localparam sbox_table_t INV_SBOX = gen_inv_sbox();

  // Round constant of round r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(int unsigned r);
    byte_t c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // Rotate a key word left by one byte (RotWord).
  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  // ShiftRows: row r of the state is rotated left by r columns.
  // Byte 4*c + r sits in column c, row r.
  function automatic state_t shift_rows(state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[4*c + r] = s[4*((c + r) % 4) + r];
    return o;
  endfunction

  // MixColumns: each column is multiplied by {02 03 01 01} circulant.
  function automatic state_t mix_columns(state_t s);
    state_t o;
    for (int c = 0; c < 4; c++) begin
      byte_t a0 = s[4*c];
      byte_t a1 = s[4*c + 1];
      byte_t a2 = s[4*c + 2];
      byte_t a3 = s[4*c + 3];
      o[4*c]     = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[4*c + 1] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[4*c + 2] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[4*c + 3] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

endpackage
