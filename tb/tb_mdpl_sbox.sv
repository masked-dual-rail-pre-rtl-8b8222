// tb_mdpl_sbox: exhaustive check of the MDPL AES S-box.
//
// The reference S-box is computed here differently from the design: the
// multiplicative inverse is found by searching for y with x*y = 1 in GF(2^8),
// then the affine map is applied bit by bit, and two FIPS-197 entries are
// checked literally. For all 256 inputs and both mask values the outputs must
// unmask to S(x) with complementary rails, and a pre-charged input word must
// give a pre-charged output word. The number of output rails that rise is
// therefore 8 for every input: the data-independent switching MDPL aims at.
module tb_mdpl_sbox;
  import mdpl_pkg::*;

  mdpl_t [7:0] a, y;
  mdpl_t       m;
  logic  [7:0] ref_tab [256];
  int checks = 0, failures = 0;

  mdpl_sbox dut (.a, .m, .y);

  function automatic logic [7:0] mul(input logic [7:0] p, input logic [7:0] q);
    logic [15:0] prod;
    prod = '0;
    for (int i = 0; i < 8; i++) if (q[i]) prod ^= 16'(p) << i;
    for (int i = 15; i >= 8; i--) if (prod[i]) prod ^= 16'h011b << (i - 8);
    return prod[7:0];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, s;
      inv = '0;
      for (int c = 1; c < 256; c++) if (mul(8'(x), 8'(c)) == 8'h01) inv = 8'(c);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ (8'h63 >> i);
      ref_tab[x] = s;
    end
    checks++;
    if (ref_tab[8'h00] !== 8'h63 || ref_tab[8'h53] !== 8'hed) begin
      failures++;
      $display("FAIL reference table wrong");
    end
    for (int rep = 0; rep < 2; rep++) begin
      for (int x = 0; x < 256; x++) begin
        logic mm;
        mm = 1'(rep) ^ 1'($urandom);
        a = '0; m = MDPL_PRECHARGED;
        #1;
        checks++;
        if (y !== '0) begin
          failures++;
          $display("FAIL pre-charge x=%02h: y not 00", x);
        end
        for (int i = 0; i < 8; i++) a[i] = mdpl_enc(x[i], mm);
        m = mdpl_enc(1'b0, mm);
        #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (y[i].t == y[i].f || mdpl_dec(y[i], mm) !== ref_tab[x][i]) begin
            failures++;
            $display("FAIL x=%02h m=%b bit %0d: y=%b expected %b", x, mm, i, y[i], ref_tab[x][i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
