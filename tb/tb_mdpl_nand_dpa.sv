// tb_mdpl_nand_dpa: the NAND-gate experiment with unbalanced complementary
// wires, reduced to a logic-level power model.
//
// The output pair of an MDPL NAND drives wires of different capacitance: the
// false rail is given 1.5 times the load of the true rail. Each evaluation's
// energy is taken as the load of the rail that rises. Over 4000 random
// inputs and random masks the testbench computes the DPA difference of means
// between evaluations whose unmasked output is 1 and those where it is 0.
// For the MDPL NAND it must be near 0 (|diff| < 0.1): the mask makes the
// rising rail independent of the data. For comparison, the same model is
// applied to an unmasked dual-rail pre-charge NAND (rails q, NOT q, computed
// here in the testbench); there the difference is the full load imbalance.
// The gate's function is checked on every evaluation as well.
module tb_mdpl_nand_dpa;
  import mdpl_pkg::*;

  localparam real C_TRUE  = 1.0;
  localparam real C_FALSE = 1.5;
  localparam int  N       = 4000;

  mdpl_t a, b, m, q;
  int checks = 0, failures = 0;

  mdpl_nand dut (.a, .b, .m, .q);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e_mdpl [2], e_drp [2];
    int  cnt [2];
    real d_mdpl, d_drp;
    e_mdpl = '{0.0, 0.0}; e_drp = '{0.0, 0.0}; cnt = '{0, 0};
    for (int n = 0; n < N; n++) begin
      logic da, db, dm, y;
      da = 1'($urandom); db = 1'($urandom); dm = 1'($urandom);
      y  = ~(da & db);
      a = MDPL_PRECHARGED; b = MDPL_PRECHARGED; m = MDPL_PRECHARGED;
      #1;
      a = mdpl_enc(da, dm); b = mdpl_enc(db, dm); m = mdpl_enc(1'b0, dm);
      #1;
      checks++;
      if (q.t == q.f || mdpl_dec(q, dm) !== y) begin
        failures++;
        $display("FAIL a=%b b=%b m=%b q=%b", da, db, dm, q);
      end
      cnt[y]++;
      e_mdpl[y] += q.t ? C_TRUE : C_FALSE;
      e_drp[y]  += y ? C_TRUE : C_FALSE;
    end
    d_mdpl = e_mdpl[1] / cnt[1] - e_mdpl[0] / cnt[0];
    d_drp  = e_drp[1] / cnt[1] - e_drp[0] / cnt[0];
    $display("difference of means, unbalanced rails: MDPL %f, unmasked dual-rail %f", d_mdpl, d_drp);
    checks++;
    if (d_mdpl > 0.1 || d_mdpl < -0.1) begin
      failures++;
      $display("FAIL MDPL NAND energy depends on its output value");
    end
    checks++;
    if (d_drp < 0.4 && d_drp > -0.4) begin
      failures++;
      $display("FAIL comparison model shows no leakage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
