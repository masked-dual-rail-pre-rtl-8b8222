// mdpl_nor: MDPL 2-input NOR gate.
//
// The MDPL OR with its two output rails exchanged: two majority gates,
// q_m = NOT(a OR b) XOR m. Pre-charged inputs give a pre-charged output.
// Inputs: a, b, mask pair m; output q. Combinational.
module mdpl_nor
  import mdpl_pkg::*;
(
  input  mdpl_t a,
  input  mdpl_t b,
  input  mdpl_t m,
  output mdpl_t q
);
  mdpl_maj u_true  (.a(a.f), .b(b.f), .c(m.t), .q(q.t));
  mdpl_maj u_false (.a(a.t), .b(b.t), .c(m.f), .q(q.f));
endmodule
