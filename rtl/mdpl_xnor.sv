// mdpl_xnor: MDPL 2-input XNOR gate.
//
// Built as (a AND b) OR (NOT a AND NOT b): two MDPL AND gates and one MDPL OR
// gate, six majority gates in total, matching the MDPL cell summary. The
// decomposition is this design's choice. Inputs: a, b, mask pair m; output
// q = NOT(a XOR b) XOR m. Combinational; pre-charged in, pre-charged out.
module mdpl_xnor
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
  mdpl_and u_and0  (.a(a),   .b(b),   .m(m), .q(p0));
  mdpl_and u_and1  (.a(a_n), .b(b_n), .m(m), .q(p1));
  mdpl_or  u_or    (.a(p0),  .b(p1),  .m(m), .q(q));
endmodule
