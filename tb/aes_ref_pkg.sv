// aes_ref_pkg: behavioural AES-128 reference for the testbenches.
//
// Written independently of the design: field multiplication by shift and
// reduce, the S-box by searching for the multiplicative inverse and applying
// the FIPS-197 affine map bit by bit, then key expansion and rounds on byte
// arrays. Call sbox_init() once before using ref_sbox() or ref_aes().
package aes_ref_pkg;

  logic [7:0] sbox_tab [256];

  function automatic logic [7:0] gmul(input logic [7:0] p, input logic [7:0] q);
    logic [15:0] prod;
    prod = '0;
    for (int i = 0; i < 8; i++) if (q[i]) prod ^= 16'(p) << i;
    for (int i = 15; i >= 8; i--) if (prod[i]) prod ^= 16'h011b << (i - 8);
    return prod[7:0];
  endfunction

  function automatic void sbox_init();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, s;
      inv = '0;
      for (int c = 1; c < 256; c++) if (gmul(8'(x), 8'(c)) == 8'h01) inv = 8'(c);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ (8'h63 >> i);
      sbox_tab[x] = s;
    end
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    return sbox_tab[x];
  endfunction

  function automatic logic [127:0] ref_aes(input logic [127:0] pt, input logic [127:0] k);
    logic [7:0] s [16], t [16], rk [16], rc;
    logic [127:0] ct;
    for (int i = 0; i < 16; i++) begin
      s[i]  = pt[127-8*i -: 8];
      rk[i] = k[127-8*i -: 8];
      s[i] ^= rk[i];
    end
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      logic [7:0] tmp [4];
      tmp[0] = sbox_tab[rk[13]] ^ rc; tmp[1] = sbox_tab[rk[14]];
      tmp[2] = sbox_tab[rk[15]];      tmp[3] = sbox_tab[rk[12]];
      for (int i = 0; i < 4; i++) rk[i] ^= tmp[i];
      for (int i = 4; i < 16; i++) rk[i] ^= rk[i-4];
      rc = gmul(rc, 8'h02);
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++)
          t[4*c+row] = sbox_tab[s[4*((c+row)%4)+row]];
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
          t[4*c]   = gmul(a0, 2) ^ gmul(a1, 3) ^ a2 ^ a3;
          t[4*c+1] = a0 ^ gmul(a1, 2) ^ gmul(a2, 3) ^ a3;
          t[4*c+2] = a0 ^ a1 ^ gmul(a2, 2) ^ gmul(a3, 3);
          t[4*c+3] = gmul(a0, 3) ^ a1 ^ a2 ^ gmul(a3, 2);
        end
      end
      for (int i = 0; i < 16; i++) s[i] = t[i] ^ rk[i];
    end
    for (int i = 0; i < 16; i++) ct[127-8*i -: 8] = s[i];
    return ct;
  endfunction

endpackage
