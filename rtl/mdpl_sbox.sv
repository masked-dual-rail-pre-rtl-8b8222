// mdpl_sbox: the AES S-box (SubBytes on one byte) as a network of MDPL gates.
//
// Each of the 8 output bits is a function of the 8 input bits and is built as
// a Shannon decomposition:
//   * 64 leaf cells, one per value of input bits 7..2, each a function of the
//     two low input bits a[1], a[0]. The leaf's 4-entry truth table, taken
//     from the S-box, picks one of the 16 two-input functions: a constant
//     (the mask pair itself for 0, its swap for 1, since 0 XOR m = m), a wire
//     or rail swap, or one MDPL AND / OR / NAND / NOR / XOR / XNOR gate, with
//     inputs inverted by rail swaps where needed.
//   * a 6-level tree of 63 MDPL multiplexers selecting with a[2] (leaf side)
//     up to a[7] (root). Levels alternate between the NAND and the NOR form.
// Every path is monotonic, so the pre-charge wave passes through (all-00
// inputs give all-00 outputs) and each output pair rises once per evaluation.
//
// DPA attacks on MDPL AES target the output of the first SubBytes; this
// particular gate structure, as a synthesis tool might produce it from a table,
// is this design's own. The S-box table is computed at elaboration by
// mdpl_pkg::aes_sbox_table. Inputs a (a[7] = MSB) and mask pair m; output y.
// Combinational.
module mdpl_sbox
  import mdpl_pkg::*;
(
  input  mdpl_t [7:0] a,
  input  mdpl_t       m,
  output mdpl_t [7:0] y
);
  localparam sbox_table_t SBOX = aes_sbox_table();

  mdpl_t a0_n, a1_n, one;

  mdpl_inv u_inv0 (.a(a[0]), .q(a0_n));
  mdpl_inv u_inv1 (.a(a[1]), .q(a1_n));
  mdpl_inv u_one  (.a(m),    .q(one));   // MDPL constant 1 = swapped mask

  for (genvar j = 0; j < 8; j++) begin : g_bit
    // Heap-ordered tree: nodes 0..62 are multiplexers, 63..126 are leaves.
    // Node n has children 2n+1 (select = 0) and 2n+2 (select = 1).
    mdpl_t node [127];

    for (genvar g = 0; g < 64; g++) begin : g_leaf
      // Truth table of the leaf: bit k is the output for {a[1], a[0]} = k.
      localparam logic [3:0] F = {SBOX[4*g+3][j], SBOX[4*g+2][j],
                                  SBOX[4*g+1][j], SBOX[4*g][j]};
      mdpl_t l;
      case (F)
        4'b0000: begin : g_c0   assign l = m;    end
        4'b1111: begin : g_c1   assign l = one;  end
        4'b1010: begin : g_a0   assign l = a[0]; end
        4'b0101: begin : g_a0n  assign l = a0_n; end
        4'b1100: begin : g_a1   assign l = a[1]; end
        4'b0011: begin : g_a1n  assign l = a1_n; end
        4'b1000: begin : g_and  mdpl_and  u (.a(a[0]), .b(a[1]), .m(m), .q(l)); end
        4'b0111: begin : g_nand mdpl_nand u (.a(a[0]), .b(a[1]), .m(m), .q(l)); end
        4'b1110: begin : g_or   mdpl_or   u (.a(a[0]), .b(a[1]), .m(m), .q(l)); end
        4'b0001: begin : g_nor  mdpl_nor  u (.a(a[0]), .b(a[1]), .m(m), .q(l)); end
        4'b0110: begin : g_xor  mdpl_xor  u (.a(a[0]), .b(a[1]), .m(m), .q(l)); end
        4'b1001: begin : g_xnor mdpl_xnor u (.a(a[0]), .b(a[1]), .m(m), .q(l)); end
        4'b0010: begin : g_a0b1n mdpl_and u (.a(a[0]), .b(a1_n), .m(m), .q(l)); end
        4'b0100: begin : g_a0na1 mdpl_and u (.a(a0_n), .b(a[1]), .m(m), .q(l)); end
        4'b1011: begin : g_a0oa1n mdpl_or u (.a(a[0]), .b(a1_n), .m(m), .q(l)); end
        default: begin : g_a0noa1 mdpl_or u (.a(a0_n), .b(a[1]), .m(m), .q(l)); end
      endcase
      assign node[63+g] = l;
    end

    for (genvar n = 0; n < 63; n++) begin : g_mux
      localparam int DEPTH = $clog2(n + 2) - 1;   // 0 at the root
      mdpl_mux2 #(.NOR_FORM(DEPTH[0])) u_mux (
        .s (a[7-DEPTH]),
        .hi(node[2*n+2]),
        .lo(node[2*n+1]),
        .m (m),
        .y (node[n])
      );
    end

    assign y[j] = node[0];
  end
endmodule
