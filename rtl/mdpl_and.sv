// mdpl_and: MDPL 2-input AND gate.
//
// Two majority gates: the true rail is MAJ(a_m, b_m, m) and the false rail is
// MAJ(~a_m, ~b_m, ~m). Because majority is self-dual the two results are
// complementary during evaluation, and (a_m, b_m, m) masked with m gives
// q_m = (a AND b) XOR m. With every input pair pre-charged to 00 the output
// pair is 00, so the pre-charge wave passes through. This is the construction
// of the MDPL AND truth table. Inputs: a, b and the mask pair m; output q.
// Combinational.
module mdpl_and
  import mdpl_pkg::*;
(
  input  mdpl_t a,
  input  mdpl_t b,
  input  mdpl_t m,
  output mdpl_t q
);
  mdpl_maj u_true  (.a(a.t), .b(b.t), .c(m.t), .q(q.t));
  mdpl_maj u_false (.a(a.f), .b(b.f), .c(m.f), .q(q.f));
endmodule
