// mdpl_mixcolumn: AES MixColumns on one 4-byte column, in MDPL gates.
//
// With t = a0^a1^a2^a3, each output byte is y_i = a_i ^ t ^ xtime(a_i ^ a_i+1)
// (indices mod 4), which equals the FIPS-197 matrix product with rows
// (2 3 1 1). Byte a0 is a[31:24]. A helper of this design. Combinational.
module mdpl_mixcolumn
  import mdpl_pkg::*;
(
  input  mdpl_t [31:0] a,
  input  mdpl_t        m,
  output mdpl_t [31:0] y
);
  mdpl_t [3:0][7:0] b, p, xp, u, o;
  mdpl_t [7:0] t01, t23, t;

  assign b = a;   // b[3] = a0 ... b[0] = a3

  mdpl_xor_vec #(.W(8)) u_t01 (.a(b[3]), .b(b[2]), .m(m), .y(t01));
  mdpl_xor_vec #(.W(8)) u_t23 (.a(b[1]), .b(b[0]), .m(m), .y(t23));
  mdpl_xor_vec #(.W(8)) u_t   (.a(t01),  .b(t23),  .m(m), .y(t));

  for (genvar i = 0; i < 4; i++) begin : g_byte
    // byte index r = 3 - i in FIPS order; its neighbour r+1 is b[(i+3)%4]
    mdpl_xor_vec #(.W(8)) u_p  (.a(b[i]),  .b(b[(i+3)%4]), .m(m), .y(p[i]));
    mdpl_xtime            u_xt (.a(p[i]),  .m(m), .y(xp[i]));
    mdpl_xor_vec #(.W(8)) u_u  (.a(b[i]),  .b(t),     .m(m), .y(u[i]));
    mdpl_xor_vec #(.W(8)) u_o  (.a(u[i]),  .b(xp[i]), .m(m), .y(o[i]));
  end

  assign y = o;
endmodule
