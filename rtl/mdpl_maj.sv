// mdpl_maj: 3-input majority gate, the standard cell from which every MDPL
// combinational gate is built.
//
// q = MAJ(a, b, c) is 1 when at least two inputs are 1. Majority is a
// monotonic (positive) function, so when all inputs only rise during the
// evaluation phase the output rises at most once and never glitches; with all
// inputs pre-charged to 0 the output is 0. Purely combinational, no timing of
// its own. In a real flow this cell is a library MAJ3 instance that synthesis
// must not restructure.
module mdpl_maj (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic q
);
  assign q = (a & b) | (a & c) | (b & c);
endmodule
