// aes_ref_pkg: a plain software model of AES-128 for the testbenches, written
// independently of the RTL. Its S-box is built with the classic generator walk
// (p runs over the powers of 3, q over the powers of 3^-1) rather than the
// exponentiation the RTL uses, and its key schedule is the textbook one with
// SubWord applied directly, not the masked variant.
package aes_ref_pkg;

  typedef logic [7:0] u8;

  u8  sbox_t [256];
  u8  inv_t  [256];
  bit built = 1'b0;

  function automatic u8 rl(u8 x, int n);
    return u8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void build();
    u8 p = 8'h01;
    u8 q = 8'h01;
    if (built) return;
    do begin
      p = p ^ u8'(p << 1) ^ ((p & 8'h80) != 0 ? 8'h1b : 8'h00);
      q ^= u8'(q << 1);
      q ^= u8'(q << 2);
      q ^= u8'(q << 4);
      if (q[7]) q ^= 8'h09;
      sbox_t[p] = q ^ rl(q, 1) ^ rl(q, 2) ^ rl(q, 3) ^ rl(q, 4) ^ 8'h63;
    end while (p != 8'h01);
    sbox_t[0] = 8'h63;
    for (int i = 0; i < 256; i++) inv_t[sbox_t[i]] = u8'(i);
    built = 1'b1;
  endfunction

  function automatic u8 sb(u8 x);
    build();
    return sbox_t[x];
  endfunction

  function automatic u8 isb(u8 x);
    build();
    return inv_t[x];
  endfunction

  function automatic logic [31:0] subw(logic [31:0] w);
    return {sb(w[31:24]), sb(w[23:16]), sb(w[15:8]), sb(w[7:0])};
  endfunction

  function automatic logic [127:0] mask128(logic [127:0] k);
    return {subw(k[127:96]), subw(k[95:64]), subw(k[63:32]), subw(k[31:0])};
  endfunction

  function automatic u8 mul2(u8 a);
    return u8'(a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Next round key by the textbook schedule.
  function automatic logic [127:0] next_key(logic [127:0] k, u8 rc);
    logic [31:0] w0 = k[127:96], w1 = k[95:64], w2 = k[63:32], w3 = k[31:0];
    logic [31:0] t = subw({w3[23:0], w3[31:24]}) ^ {rc, 24'h0};
    w0 ^= t; w1 ^= w0; w2 ^= w1; w3 ^= w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic u8 rcon(int r);
    u8 c = 8'h01;
    for (int i = 1; i < r; i++) c = mul2(c);
    return c;
  endfunction

  // One round's SubBytes, ShiftRows and (unless last) MixColumns, on a
  // column-major 4x4 byte matrix.
  function automatic logic [127:0] round_fn(logic [127:0] s, bit last);
    u8 m [4][4];   // m[row][col]
    u8 o [4][4];
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int rw = 0; rw < 4; rw++)
        m[rw][c] = sb(s[127 - 8*(4*c + rw) -: 8]);
    for (int rw = 0; rw < 4; rw++)
      for (int c = 0; c < 4; c++)
        o[rw][c] = m[rw][(c + rw) % 4];
    if (!last) begin
      for (int c = 0; c < 4; c++) begin
        u8 a [4];
        for (int rw = 0; rw < 4; rw++) a[rw] = o[rw][c];
        for (int rw = 0; rw < 4; rw++)
          o[rw][c] = mul2(a[rw]) ^ mul2(a[(rw+1)%4]) ^ a[(rw+1)%4] ^ a[(rw+2)%4] ^ a[(rw+3)%4];
      end
    end
    for (int c = 0; c < 4; c++)
      for (int rw = 0; rw < 4; rw++)
        r[127 - 8*(4*c + rw) -: 8] = o[rw][c];
    return r;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] s = pt ^ key;
    logic [127:0] k = key;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, rcon(r));
      s = round_fn(s, r == 10) ^ k;
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
