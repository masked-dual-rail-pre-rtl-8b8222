// mdpl_nand: MDPL 2-input NAND gate.
//
// The MDPL AND with its two output rails exchanged (an MDPL inverter is only a
// swap of the rails), so it costs the same two majority gates:
// q_m = NOT(a AND b) XOR m. Pre-charged inputs give a pre-charged output.
// Inputs: a, b, mask pair m; output q. Combinational.
module mdpl_nand
  import mdpl_pkg::*;
(
  input  mdpl_t a,
  input  mdpl_t b,
  input  mdpl_t m,
  output mdpl_t q
);
  mdpl_maj u_true  (.a(a.f), .b(b.f), .c(m.f), .q(q.t));
  mdpl_maj u_false (.a(a.t), .b(b.t), .c(m.t), .q(q.f));
endmodule
