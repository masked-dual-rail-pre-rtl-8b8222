// mdpl_xor: MDPL 2-input XOR gate.
//
// Built as (a AND NOT b) OR (NOT a AND b) from two MDPL AND gates and one MDPL
// OR gate; the inversions are rail swaps. That is six majority gates, the cost
// given for the MDPL XOR. Because every stage is monotonic, the output pair
// still rises at most once per evaluation phase. The exact decomposition is
// this design's choice; only the cell count comes from the MDPL cell summary.
// Inputs: a, b, mask pair m; output q = (a XOR b) XOR m. Combinational.
module mdpl_xor
  import mdpl_pkg::*;
(
  input  mdpl_t a,
  input  mdpl_t b,
  input  mdpl_t m,
  output mdpl_t q
);
  mdpl_t a_n, b_n, p0, p1;

  mdpl_inv u_inv_a (.a(a), .q(a_n));
  mdpl_inv u_inv_b (.a(b), .q(b_n));
  mdpl_and u_and0  (.a(a),   .b(b_n), .m(m), .q(p0));
  mdpl_and u_and1  (.a(a_n), .b(b),   .m(m), .q(p1));
  mdpl_or  u_or    (.a(p0),  .b(p1),  .m(m), .q(q));
endmodule
