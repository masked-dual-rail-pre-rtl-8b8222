// cmos_to_mdpl: interface from ordinary single-rail (CMOS) signals into MDPL.
//
// Each input bit x is masked with the current mask m and expanded into a
// dual-rail pair: (x XOR m, NOT(x XOR m)) during evaluation and 00 during
// pre-charge. x should come from a register that changes only at clk edges,
// so each rail pair makes at most one 0-to-1 transition per evaluation.
// The need for such an interface comes from the MDPL design flow; its
// circuit is this design's choice. Parameter W is the number of bits.
// Combinational.
module cmos_to_mdpl
  import mdpl_pkg::*;
#(
  parameter int W = 8
) (
  input  logic           prch,
  input  logic           m,
  input  logic  [W-1:0]  x,
  output mdpl_t [W-1:0]  y
);
  always_comb begin
    for (int i = 0; i < W; i++) begin
      y[i].t = (x[i] ^ m) & ~prch;
      y[i].f = ~(x[i] ^ m) & ~prch;
    end
  end
endmodule
