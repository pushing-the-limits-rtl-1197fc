// aes_ref_pkg: reference model used by the testbenches.
//
// A plain, word-oriented AES-128 written independently of the RTL: the
// S-box is built by searching for the multiplicative inverse and applying
// the affine map as rotations, the key is expanded word by word
// (FIPS-197 style) and the cipher runs on a 4x4 byte matrix. Byte k of a
// 128-bit block is element k of a 16-byte array (row k%4, column k/4).
package aes_ref_pkg;

  typedef logic [7:0] block_t [16];

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] prod = '0;
    // carry-less multiplication, then reduction by 0x11b
    for (int i = 0; i < 8; i++) if (b[i]) prod ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (prod[i]) prod ^= 16'h011b << (i - 8);
    return prod[7:0];
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv = 8'h00;
    for (int y = 1; y < 256; y++)
      if (x != 0 && ref_mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  // All eleven round keys, w[0..43] as bytes
  function automatic void expand_key(input block_t key, output logic [7:0] w [44][4]);
    logic [7:0] rcon = 8'h01;
    logic [7:0] t [4];
    for (int i = 0; i < 4; i++) for (int b = 0; b < 4; b++) w[i][b] = key[4*i+b];
    for (int i = 4; i < 44; i++) begin
      for (int b = 0; b < 4; b++) t[b] = w[i-1][b];
      if (i % 4 == 0) begin
        t = '{ref_sbox(w[i-1][1]) ^ rcon, ref_sbox(w[i-1][2]),
              ref_sbox(w[i-1][3]), ref_sbox(w[i-1][0])};
        rcon = ref_mul(rcon, 8'h02);
      end
      for (int b = 0; b < 4; b++) w[i][b] = w[i-4][b] ^ t[b];
    end
  endfunction

  function automatic block_t round_key(input block_t key, input int rnd);
    logic [7:0] w [44][4];
    block_t rk;
    expand_key(key, w);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) rk[4*c+r] = w[4*rnd+c][r];
    return rk;
  endfunction

  function automatic block_t aes128_encrypt(input block_t key, input block_t pt);
    logic [7:0] w [44][4];
    logic [7:0] s [4][4];   // s[row][col]
    logic [7:0] t [4][4];
    expand_key(key, w);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = pt[4*c+r] ^ w[c][r];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        t[r][c] = ref_sbox(s[r][(c + r) % 4]);              // SubBytes + ShiftRows
      if (rnd != 10) begin
        for (int c = 0; c < 4; c++) begin                     // MixColumns
          s[0][c] = ref_mul(8'h02, t[0][c]) ^ ref_mul(8'h03, t[1][c]) ^ t[2][c] ^ t[3][c];
          s[1][c] = t[0][c] ^ ref_mul(8'h02, t[1][c]) ^ ref_mul(8'h03, t[2][c]) ^ t[3][c];
          s[2][c] = t[0][c] ^ t[1][c] ^ ref_mul(8'h02, t[2][c]) ^ ref_mul(8'h03, t[3][c]);
          s[3][c] = ref_mul(8'h03, t[0][c]) ^ t[1][c] ^ t[2][c] ^ ref_mul(8'h02, t[3][c]);
        end
      end else begin
        s = t;
      end
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] ^= w[4*rnd+c][r];
    end
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) aes128_encrypt[4*c+r] = s[r][c];
  endfunction

  function automatic block_t from_hex(input logic [127:0] h);
    block_t b;
    for (int k = 0; k < 16; k++) b[k] = h[127-8*k -: 8];
    return b;
  endfunction

endpackage
