// tb_cipher_model: reference model of the 64-bit-block Rijndael codec and of
// the program-address protocol, written separately from the RTL for checking.
// The S-box is built by brute-force inversion in GF(2^8) and the bitwise
// affine map; the state is kept as a byte array.
package tb_cipher_model;

  byte unsigned sb [256];
  byte unsigned isb [256];
  bit           ready = 0;

  function automatic byte unsigned mul(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = (a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic void init();
    byte unsigned inv, r;
    if (ready) return;
    for (int x = 0; x < 256; x++) begin
      inv = 0;
      for (int y = 1; y < 256; y++) if (mul(8'(x), 8'(y)) == 1) inv = 8'(y);
      r = 0;
      for (int i = 0; i < 8; i++)
        r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ 1'((8'h63 >> i) & 1);
      sb[x] = r;
    end
    for (int x = 0; x < 256; x++) isb[sb[x]] = 8'(x);
    ready = 1;
  endfunction

  // round keys: rk[r] is 8 bytes
  function automatic void keys(input logic [127:0] key, input int nr, ref byte unsigned rk [15][8]);
    byte unsigned w [60][4];
    byte unsigned t [4];
    byte unsigned rc = 1, tmp;
    for (int i = 0; i < 16; i++) w[i/4][i%4] = key[127-8*i -: 8];
    for (int i = 4; i < 2*(nr+1); i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        tmp = t[0]; t[0] = t[1]; t[1] = t[2]; t[2] = t[3]; t[3] = tmp;
        for (int j = 0; j < 4; j++) t[j] = sb[t[j]];
        t[0] ^= rc;
        rc = mul(rc, 2);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ t[j];
    end
    for (int r = 0; r <= nr; r++)
      for (int j = 0; j < 8; j++) rk[r][j] = w[2*r + j/4][j%4];
  endfunction

  function automatic logic [63:0] pack(byte unsigned s [8]);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[63-8*i -: 8] = s[i];
    return v;
  endfunction

  function automatic void unpack(logic [63:0] v, ref byte unsigned s [8]);
    for (int i = 0; i < 8; i++) s[i] = v[63-8*i -: 8];
  endfunction

  function automatic void mixcol(ref byte unsigned s [8], input bit inverse);
    byte unsigned a [4];
    for (int c = 0; c < 2; c++) begin
      for (int r = 0; r < 4; r++) a[r] = s[4*c+r];
      for (int r = 0; r < 4; r++)
        if (!inverse)
          s[4*c+r] = mul(a[r],2) ^ mul(a[(r+1)%4],3) ^ a[(r+2)%4] ^ a[(r+3)%4];
        else
          s[4*c+r] = mul(a[r],14) ^ mul(a[(r+1)%4],11) ^ mul(a[(r+2)%4],13) ^ mul(a[(r+3)%4],9);
    end
  endfunction

  function automatic void swaprows(ref byte unsigned s [8]);
    byte unsigned t;
    t = s[1]; s[1] = s[5]; s[5] = t;
    t = s[3]; s[3] = s[7]; s[7] = t;
  endfunction

  function automatic logic [63:0] encrypt_block(logic [63:0] p, logic [127:0] key, int nr);
    byte unsigned rk [15][8];
    byte unsigned s [8];
    init();
    keys(key, nr, rk);
    unpack(p, s);
    for (int i = 0; i < 8; i++) s[i] ^= rk[0][i];
    for (int r = 1; r <= nr; r++) begin
      for (int i = 0; i < 8; i++) s[i] = sb[s[i]];
      swaprows(s);
      if (r != nr) mixcol(s, 0);
      for (int i = 0; i < 8; i++) s[i] ^= rk[r][i];
    end
    return pack(s);
  endfunction

  function automatic logic [63:0] decrypt_block(logic [63:0] c, logic [127:0] key, int nr);
    byte unsigned rk [15][8];
    byte unsigned s [8];
    init();
    keys(key, nr, rk);
    unpack(c, s);
    for (int r = nr; r >= 1; r--) begin
      for (int i = 0; i < 8; i++) s[i] ^= rk[r][i];
      if (r != nr) mixcol(s, 1);
      swaprows(s);
      for (int i = 0; i < 8; i++) s[i] = isb[s[i]];
    end
    for (int i = 0; i < 8; i++) s[i] ^= rk[0][i];
    return pack(s);
  endfunction

  // The codec with the program-address protocol, as seen by software. NR is
  // the number of rounds; a testbench may change it to match the design.
  int unsigned NR = 10;

  localparam logic [127:0] KEY = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;

  function automatic logic [63:0] enc(logic [31:0] d, logic [30:0] pad);
    return encrypt_block({1'b1, pad, d}, KEY, NR);
  endfunction

  function automatic logic [63:0] dec(logic [63:0] c);
    if (c[63:32] == 0) return {16'h7fff, 16'h0, c[31:0]};
    return decrypt_block(c, KEY, NR);
  endfunction

endpackage
