// mdpl_xtime: multiplication by x (i.e. by 2) in the AES field GF(2^8), on an
// MDPL byte. A left shift is wiring; reduction by x^8+x^4+x^3+x+1 adds a[7]
// into bits 1, 3 and 4 with three MDPL XOR gates. A helper of this design.
// Combinational.
module mdpl_xtime
  import mdpl_pkg::*;
(
  input  mdpl_t [7:0] a,
  input  mdpl_t       m,
  output mdpl_t [7:0] y
);
  assign y[0] = a[7];
  assign y[2] = a[1];
  assign y[5] = a[4];
  assign y[6] = a[5];
  assign y[7] = a[6];
  mdpl_xor u_x1 (.a(a[0]), .b(a[7]), .m(m), .q(y[1]));
  mdpl_xor u_x3 (.a(a[2]), .b(a[7]), .m(m), .q(y[3]));
  mdpl_xor u_x4 (.a(a[3]), .b(a[7]), .m(m), .q(y[4]));
endmodule
