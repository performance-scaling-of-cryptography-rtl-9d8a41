// aes_ref_pkg: testbench-only AES-128 reference. The S-box is computed from
// its definition (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1,
// then the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^
// 0x63). Encryption is written byte by byte (SubBytes, ShiftRows,
// MixColumns, AddRoundKey), independently of any table formulation. State
// and key byte i sit at bits [8i +: 8] of a 128-bit value; byte i of the
// state is row i%4, column i/4.
package aes_ref_pkg;

  function automatic logic [7:0] gmul8(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv = '0, b;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (gmul8(x, 8'(c)) == 8'h01) inv = 8'(c);
    b = inv;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  typedef logic [7:0] sbox_t [256];

  function automatic sbox_t make_sbox();
    sbox_t s;
    for (int i = 0; i < 256; i++) s[i] = sbox(8'(i));
    return s;
  endfunction

  typedef logic [127:0] rk_t [11];

  function automatic rk_t expand_key(logic [127:0] key, sbox_t s);
    rk_t rk;
    logic [31:0] w [44];
    logic [7:0]  rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[32*i +: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[7:0], t[31:8]};                       // RotWord (byte 0 is LSB)
        t = {s[t[31:24]], s[t[23:16]], s[t[15:8]], s[t[7:0]]};
        t[7:0] ^= rcon;
        rcon = gmul8(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r+3], w[4*r+2], w[4*r+1], w[4*r]};
    return rk;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, rk_t rk, sbox_t s);
    logic [7:0] st [16], t [16];
    for (int i = 0; i < 16; i++) st[i] = pt[8*i +: 8] ^ rk[0][8*i +: 8];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) st[i] = s[st[i]];
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) t[row + 4*c] = st[row + 4*((c + row) % 4)];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0 = t[4*c], a1 = t[4*c+1], a2 = t[4*c+2], a3 = t[4*c+3];
          t[4*c]   = gmul8(a0, 2) ^ gmul8(a1, 3) ^ a2 ^ a3;
          t[4*c+1] = a0 ^ gmul8(a1, 2) ^ gmul8(a2, 3) ^ a3;
          t[4*c+2] = a0 ^ a1 ^ gmul8(a2, 2) ^ gmul8(a3, 3);
          t[4*c+3] = gmul8(a0, 3) ^ a1 ^ a2 ^ gmul8(a3, 2);
        end
      for (int i = 0; i < 16; i++) st[i] = t[i] ^ rk[r][8*i +: 8];
    end
    for (int i = 0; i < 16; i++) encrypt[8*i +: 8] = st[i];
  endfunction

  // Byte string as written in FIPS-197 (first byte leftmost) to the
  // byte-0-at-LSB layout used here.
  function automatic logic [127:0] from_str(logic [127:0] v);
    for (int i = 0; i < 16; i++) from_str[8*i +: 8] = v[8*(15-i) +: 8];
  endfunction

endpackage
