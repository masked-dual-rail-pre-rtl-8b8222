// mdpl_to_cmos: interface from MDPL back to ordinary single-rail signals.
//
// At the clk edge that ends an evaluation period (cap = 1) and when en = 1,
// the true rail of every pair is unmasked with the current mask m and stored
// in a plain register x. The block also watches the pairs: err becomes 1, and
// stays 1 until reset, if a pair is not 00 during a pre-charge period or not
// complementary (01 or 10) at the end of an evaluation period. The need for
// the interface comes from the MDPL design flow; the register and the rail
// monitor are this design's choice. Parameter W is the number of bits.
// Output x changes one clk edge after the evaluation it samples.
module mdpl_to_cmos
  import mdpl_pkg::*;
#(
  parameter int W = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           prch,
  input  logic           cap,
  input  logic           en,
  input  logic           m,
  input  mdpl_t [W-1:0]  a,
  output logic  [W-1:0]  x,
  output logic           err
);
  logic bad;

  always_comb begin
    bad = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (prch && (a[i].t || a[i].f)) bad = 1'b1;
      if (cap && (a[i].t == a[i].f))  bad = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x   <= '0;
      err <= 1'b0;
    end else begin
      if (cap && en) begin
        for (int i = 0; i < W; i++) x[i] <= a[i].t ^ m;
      end
      if (bad) err <= 1'b1;
    end
  end
endmodule
