// tb_mdpl_or: self-checking testbench for the MDPL OR gate.
//
// For every data pair (a, b) and both mask values m it drives the masked
// dual-rail inputs, then checks that the output unmasks to a OR b, that the
// two output rails are complementary (exactly one rail high, so the number of
// rising rails is the same for every input), and that all-00 (pre-charged)
// inputs give a 00 output. The expected value is computed here from the
// Boolean operator, independently of the gate.
module tb_mdpl_or;
  import mdpl_pkg::*;

  mdpl_t a, b, m, q;
  int checks = 0, failures = 0;

  mdpl_or dut (.a(a), .b(b), .m(m), .q(q));

  function automatic logic expected(input logic x, input logic y);
    return x | y;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < 8; i++) begin
        logic da, db, dm;
        {da, db, dm} = 3'(i);
        // pre-charge phase
        a = MDPL_PRECHARGED; b = MDPL_PRECHARGED; m = MDPL_PRECHARGED;
        #1;
        checks++;
        if (q !== MDPL_PRECHARGED) begin
          failures++;
          $display("FAIL precharge: q=%b", q);
        end
        // evaluation phase, inputs arrive one at a time in a varying order
        case ((i + rep) % 3)
          0: begin a = mdpl_enc(da, dm); #1; b = mdpl_enc(db, dm); #1; m = mdpl_enc(1'b0, dm); end
          1: begin m = mdpl_enc(1'b0, dm); #1; b = mdpl_enc(db, dm); #1; a = mdpl_enc(da, dm); end
          default: begin b = mdpl_enc(db, dm); #1; m = mdpl_enc(1'b0, dm); #1; a = mdpl_enc(da, dm); end
        endcase
        #1;
        checks++;
        if (mdpl_dec(q, dm) !== expected(da, db)) begin
          failures++;
          $display("FAIL a=%b b=%b m=%b: q=%b", da, db, dm, q);
        end
        checks++;
        if (q.t == q.f) begin
          failures++;
          $display("FAIL rails not complementary a=%b b=%b m=%b: q=%b", da, db, dm, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
