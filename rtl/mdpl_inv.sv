// mdpl_inv: MDPL inverter.
//
// Inverting a dual-rail signal needs no transistor: the true and false rails
// are exchanged. The cell therefore has zero area; it is kept as a module so
// that netlists built from MDPL cells read like their CMOS originals.
// Input a, output q = NOT a (still masked with the same m). Combinational,
// pre-charged input gives pre-charged output.
module mdpl_inv
  import mdpl_pkg::*;
(
  input  mdpl_t a,
  output mdpl_t q
);
  assign q.t = a.f;
  assign q.f = a.t;
endmodule
