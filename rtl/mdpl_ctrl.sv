// mdpl_ctrl: mask generator and pre-charge control for an MDPL circuit.
//
// One mask bit serves the whole circuit and changes every MDPL clock cycle.
// Each MDPL cycle is two periods of clk: a pre-charge period (prch = 1) in
// which all MDPL nets return to 00, then an evaluation period (prch = 0) in
// which each net pair resolves. cap is high during the evaluation period; the
// rising clk edge that ends it is where MDPL flip-flops capture and where the
// mask register loads the next mask.
//
// The mask source is a 32-bit Galois LFSR (x^32 + x^22 + x^2 + x + 1) whose
// bit 0 is the next mask m_nxt. The circuit-wide mask and the cycle-by-cycle
// change follow the MDPL architecture; the LFSR and the two-clk-per-cycle
// phase scheme stand in for the random number generator and clock tree, which
// are not specified, and are this design's own. A real design would use a true
// random source.
//
// Outputs: prch, cap, the mask m and next mask m_nxt as plain (CMOS) bits for
// flip-flops and interfaces, and the mask as a pre-charged MDPL pair mr for
// the gates (mr.t = m, mr.f = NOT m during evaluation, 00 in pre-charge).
// After reset the first period is a pre-charge period and m = 0.
module mdpl_ctrl
  import mdpl_pkg::*;
#(
  parameter logic [31:0] SEED = 32'hACE1_2468  // non-zero LFSR seed
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  prch,
  output logic  cap,
  output logic  m,
  output logic  m_nxt,
  output mdpl_t mr
);
  logic        eval_q;
  logic [31:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eval_q <= 1'b0;
      lfsr   <= SEED;
      m      <= 1'b0;
    end else begin
      eval_q <= ~eval_q;
      if (eval_q) begin
        m    <= m_nxt;
        lfsr <= (lfsr >> 1) ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
      end
    end
  end

  assign m_nxt = lfsr[0];
  assign prch  = ~eval_q;
  assign cap   = eval_q;
  assign mr.t  = m & eval_q;
  assign mr.f  = ~m & eval_q;

  initial assert (SEED != 32'h0) else $error("mdpl_ctrl: SEED must be non-zero");
endmodule
