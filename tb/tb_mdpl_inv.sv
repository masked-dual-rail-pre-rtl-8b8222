// tb_mdpl_inv: the MDPL inverter must invert the unmasked value for both mask
// values, keep the rails complementary, and pass the pre-charge (00) state.
module tb_mdpl_inv;
  import mdpl_pkg::*;
  mdpl_t a, q;
  int checks = 0, failures = 0;

  mdpl_inv dut (.a, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = MDPL_PRECHARGED;
    #1;
    checks++;
    if (q !== MDPL_PRECHARGED) failures++;
    for (int i = 0; i < 4; i++) begin
      logic d, mm;
      {d, mm} = 2'(i);
      a = mdpl_enc(d, mm);
      #1;
      checks++;
      if (mdpl_dec(q, mm) !== ~d || q.t == q.f) begin
        failures++;
        $display("FAIL d=%b m=%b q=%b", d, mm, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
