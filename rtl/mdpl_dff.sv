// mdpl_dff: MDPL D flip-flop with mask switching.
//
// The circuit's mask bit changes every MDPL clock cycle, so a register must
// hand its content over from the old mask m to the new mask m_nxt. At the end
// of the evaluation phase (cap = 1 at a rising clk edge) the cell stores
// s = d_m XOR m XOR m_nxt = d XOR m_nxt in one ordinary D flip-flop. Its output
// pair is forced to 00 while prch = 1, which launches the pre-charge wave into
// the logic that follows, and shows (s, NOT s) during evaluation, i.e. the
// stored bit masked with the mask that is current after the edge.
//
// Mask switching and starting the pre-charge wave are the two duties the MDPL
// flip-flop has; the exact gating (two ANDs with NOT prch on the outputs, the
// re-masking XOR at the flip-flop input) is this design's choice.
//
// Timing: clk runs two edges per MDPL cycle (see mdpl_ctrl); prch and cap come
// from mdpl_ctrl. d must be evaluated (complementary) when cap is sampled.
// Reset clears the stored bit. Only the true input rail is stored: once d has
// evaluated, its false rail carries no extra information, so d.f is used only by
// the assertion that checks the pair has evaluated.
module mdpl_dff
  import mdpl_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cap,    // capture strobe: last clk cycle of the evaluation phase
  input  logic  prch,   // 1 = pre-charge phase
  input  logic  m,      // mask of the cycle that is ending (CMOS)
  input  logic  m_nxt,  // mask of the next cycle (CMOS)
  input  mdpl_t d,
  output mdpl_t q
);
  logic s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   s <= 1'b0;
    else if (cap) begin
      s <= d.t ^ m ^ m_nxt;
      // Dual-rail rule: the input pair has evaluated when it is captured.
      a_evaluated: assert (d.t != d.f)
        else $error("mdpl_dff: input pair %b not evaluated at capture", d);
    end
  end

  assign q.t = s & ~prch;
  assign q.f = ~s & ~prch;
endmodule
