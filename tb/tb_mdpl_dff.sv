// tb_mdpl_dff: checks the MDPL flip-flop's mask switching and pre-charge.
//
// The testbench plays the role of mdpl_ctrl: clk toggles every 5 time units,
// each MDPL cycle is a pre-charge clk period followed by an evaluation clk
// period, and the mask m is replaced by a random m_nxt at the end of every
// evaluation. Random data d, masked with m, is applied during evaluation.
// After each capture the output must be 00 in the pre-charge period and, in
// the evaluation period, complementary and equal to the stored data masked
// with the new mask.
module tb_mdpl_dff;
  import mdpl_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, cap = 1'b0, prch = 1'b1, m = 1'b0, m_nxt = 1'b0;
  mdpl_t d, q;
  int checks = 0, failures = 0, cycles = 0;

  mdpl_dff dut (.clk, .rst_n, .cap, .prch, .m, .m_nxt, .d, .q);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic data, prev_data;
    d = MDPL_PRECHARGED;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev_data = 1'b0;
    for (int n = 0; n < 200; n++) begin
      // pre-charge period
      @(negedge clk);
      prch = 1'b1; cap = 1'b0; d = MDPL_PRECHARGED;
      #1;
      checks++;
      if (q !== MDPL_PRECHARGED) begin
        failures++;
        $display("FAIL cycle %0d: output not pre-charged: %b", n, q);
      end
      // evaluation period
      @(negedge clk);
      prch = 1'b0; cap = 1'b1;
      data  = 1'($urandom);
      m_nxt = 1'($urandom);
      d = mdpl_enc(data, m);
      #1;
      if (n > 0) begin
        checks++;
        if (q.t == q.f || mdpl_dec(q, m) !== prev_data) begin
          failures++;
          $display("FAIL cycle %0d: q=%b m=%b expected data %b", n, q, m, prev_data);
        end
      end
      @(posedge clk);
      #1 m = m_nxt;
      prev_data = data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
