// mdpl_keyexp: one step of the AES-128 key expansion, in MDPL gates.
//
// From round key k (word w0 = k[127:96]) and the round constant rcon (an MDPL
// byte) it forms temp = SubWord(RotWord(w3)) with rcon added to its first
// byte, using four MDPL S-boxes, then the next round key
// w0' = w0^temp, w1' = w1^w0', w2' = w2^w1', w3' = w3^w2'. A helper of this
// design. Combinational.
module mdpl_keyexp
  import mdpl_pkg::*;
(
  input  mdpl_t [127:0] k,
  input  mdpl_t [7:0]   rcon,
  input  mdpl_t         m,
  output mdpl_t [127:0] nk
);
  mdpl_t [3:0][31:0] w, nw;      // w[3] = w0 (most significant word)
  mdpl_t [3:0][7:0]  rot, sub;   // rot[3] = first byte
  mdpl_t [31:0]      temp;

  assign w = k;
  assign rot = {w[0][23:0], w[0][31:24]};   // RotWord(w3)

  for (genvar i = 0; i < 4; i++) begin : g_sub
    mdpl_sbox u_sbox (.a(rot[i]), .m(m), .y(sub[i]));
  end

  mdpl_xor_vec #(.W(8)) u_rcon (.a(sub[3]), .b(rcon), .m(m), .y(temp[31:24]));
  assign temp[23:0] = {sub[2], sub[1], sub[0]};

  mdpl_xor_vec #(.W(32)) u_w0 (.a(w[3]), .b(temp),  .m(m), .y(nw[3]));
  mdpl_xor_vec #(.W(32)) u_w1 (.a(w[2]), .b(nw[3]), .m(m), .y(nw[2]));
  mdpl_xor_vec #(.W(32)) u_w2 (.a(w[1]), .b(nw[2]), .m(m), .y(nw[1]));
  mdpl_xor_vec #(.W(32)) u_w3 (.a(w[0]), .b(nw[1]), .m(m), .y(nw[0]));

  assign nk = nw;
endmodule
