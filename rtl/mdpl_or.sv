// mdpl_or: MDPL 2-input OR gate.
//
// Two majority gates like the AND, but with the mask rails exchanged: the true
// rail is MAJ(a_m, b_m, ~m) and the false rail MAJ(~a_m, ~b_m, m), which gives
// q_m = (a OR b) XOR m as in the MDPL OR truth table. All-zero (pre-charged)
// inputs give a pre-charged output. Inputs: a, b, mask pair m; output q.
// Combinational.
module mdpl_or
  import mdpl_pkg::*;
(
  input  mdpl_t a,
  input  mdpl_t b,
  input  mdpl_t m,
  output mdpl_t q
);
  mdpl_maj u_true  (.a(a.t), .b(b.t), .c(m.f), .q(q.t));
  mdpl_maj u_false (.a(a.f), .b(b.f), .c(m.t), .q(q.f));
endmodule
