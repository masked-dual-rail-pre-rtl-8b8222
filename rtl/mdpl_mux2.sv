// mdpl_mux2: MDPL 2-to-1 multiplexer, y = s ? hi : lo.
//
// Built from three MDPL gates plus a rail swap for NOT s. With NOR_FORM = 0 it
// is NAND(NAND(s, hi), NAND(NOT s, lo)); with NOR_FORM = 1 it is
// NOR(NOR(NOT s, hi), NOR(s, lo)). Both are monotonic networks of majority
// gates and give the same function; the S-box alternates them between tree
// levels. A helper of this design, combinational.
module mdpl_mux2
  import mdpl_pkg::*;
#(
  parameter bit NOR_FORM = 1'b0
) (
  input  mdpl_t s,
  input  mdpl_t hi,
  input  mdpl_t lo,
  input  mdpl_t m,
  output mdpl_t y
);
  mdpl_t s_n, n_hi, n_lo;

  mdpl_inv u_inv (.a(s), .q(s_n));

  if (NOR_FORM) begin : g_nor
    mdpl_nor u_hi  (.a(s_n),  .b(hi),   .m(m), .q(n_hi));
    mdpl_nor u_lo  (.a(s),    .b(lo),   .m(m), .q(n_lo));
    mdpl_nor u_out (.a(n_hi), .b(n_lo), .m(m), .q(y));
  end else begin : g_nand
    mdpl_nand u_hi  (.a(s),    .b(hi),   .m(m), .q(n_hi));
    mdpl_nand u_lo  (.a(s_n),  .b(lo),   .m(m), .q(n_lo));
    mdpl_nand u_out (.a(n_hi), .b(n_lo), .m(m), .q(y));
  end
endmodule
