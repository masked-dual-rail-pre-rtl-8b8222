// tb_cmos_to_mdpl: random CMOS words and masks go in; in evaluation each pair
// must unmask to the input bit with complementary rails, in pre-charge every
// pair must be 00.
module tb_cmos_to_mdpl;
  import mdpl_pkg::*;
  localparam int W = 16;

  logic              prch, m;
  logic  [W-1:0]     x;
  mdpl_t [W-1:0]     y;
  int checks = 0, failures = 0;

  cmos_to_mdpl #(.W(W)) dut (.prch, .m, .x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      x = W'($urandom);
      m = 1'($urandom);
      prch = 1'b1;
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (y[i] !== MDPL_PRECHARGED) begin
          failures++;
          $display("FAIL pre-charge bit %0d: %b", i, y[i]);
        end
      end
      prch = 1'b0;
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (y[i].t !== (x[i] ^ m) || y[i].f !== ~(x[i] ^ m)) begin
          failures++;
          $display("FAIL eval bit %0d: x=%b m=%b y=%b", i, x[i], m, y[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
