// mdpl_xor_vec: W MDPL XOR gates side by side, y[i] = a[i] XOR b[i].
// A helper of this design for byte- and word-wide XORs (AddRoundKey,
// MixColumns, key expansion). Combinational.
module mdpl_xor_vec
  import mdpl_pkg::*;
#(
  parameter int W = 8
) (
  input  mdpl_t [W-1:0] a,
  input  mdpl_t [W-1:0] b,
  input  mdpl_t         m,
  output mdpl_t [W-1:0] y
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    mdpl_xor u_xor (.a(a[i]), .b(b[i]), .m(m), .q(y[i]));
  end
endmodule
