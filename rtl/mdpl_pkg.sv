// mdpl_pkg: shared types and constant functions for Masked Dual-Rail
// Pre-Charge Logic (MDPL).
//
// Every MDPL signal is a pair of wires. The true rail carries the data bit
// d XOR m, where m is the single mask bit shared by the whole circuit; the
// false rail carries its complement. In the pre-charge phase both rails are 0;
// in the evaluation phase exactly one of them rises. The struct mdpl_t bundles
// the two rails. The pair encoding and the pre-charge-to-0 convention follow
// the MDPL cell truth tables; the field names are this design's own.
//
// The package also holds the AES S-box as a constant function (multiplicative
// inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the FIPS-197 affine
// map), used at elaboration time to build the MDPL S-box network.
package mdpl_pkg;

  typedef struct packed {
    logic t;  // true rail:  d ^ m
    logic f;  // false rail: ~(d ^ m)
  } mdpl_t;

  localparam mdpl_t MDPL_PRECHARGED = '{t: 1'b0, f: 1'b0};

  // Encode a plain bit d with mask bit m (evaluation-phase value).
  function automatic mdpl_t mdpl_enc(input logic d, input logic m);
    return '{t: d ^ m, f: ~(d ^ m)};
  endfunction

  // Recover the plain bit from an evaluated pair.
  function automatic logic mdpl_dec(input mdpl_t x, input logic m);
    return x.t ^ m;
  endfunction

  // GF(2^8) multiplication, AES polynomial.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  // AES S-box: x^254 (0 maps to 0), then the affine transformation.
  function automatic logic [7:0] aes_sbox(input logic [7:0] x);
    logic [7:0] x2, x3, x6, x12, x15, x30, x60, x120, x127, x254, s;
    x2   = gf_mul(x, x);
    x3   = gf_mul(x2, x);
    x6   = gf_mul(x3, x3);
    x12  = gf_mul(x6, x6);
    x15  = gf_mul(x12, x3);
    x30  = gf_mul(x15, x15);
    x60  = gf_mul(x30, x30);
    x120 = gf_mul(x60, x60);
    x127 = gf_mul(x120, gf_mul(x6, x));
    x254 = gf_mul(x127, x127);
    s = x254 ^ {x254[6:0], x254[7]} ^ {x254[5:0], x254[7:6]}
        ^ {x254[4:0], x254[7:5]} ^ {x254[3:0], x254[7:4]} ^ 8'h63;
    return s;
  endfunction

  typedef logic [255:0][7:0] sbox_table_t;

  function automatic sbox_table_t aes_sbox_table();
    sbox_table_t tab;
    for (int i = 0; i < 256; i++) tab[i] = aes_sbox(8'(i));
    return tab;
  endfunction

endpackage
