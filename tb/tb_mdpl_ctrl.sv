// tb_mdpl_ctrl: checks the mask generator and pre-charge control.
//
// After reset the phases must alternate pre-charge / evaluation every clk
// period, cap must equal the evaluation phase, the mask pair must be 00 in
// pre-charge and (m, NOT m) in evaluation, and the mask must follow an
// independent model of the Galois LFSR: at each capture edge m takes the
// value m_nxt had. The test also requires the mask to change at least a
// quarter of the time.
module tb_mdpl_ctrl;
  import mdpl_pkg::*;

  localparam logic [31:0] SEED = 32'h1357_9BDF;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  prch, cap, m, m_nxt;
  mdpl_t mr;
  int checks = 0, failures = 0, cycles = 0, changes = 0;

  mdpl_ctrl #(.SEED(SEED)) dut (.clk, .rst_n, .prch, .cap, .m, .m_nxt, .mr);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    logic        exp_m, exp_eval;
    model    = SEED;
    exp_m    = 1'b0;
    exp_eval = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    for (int n = 0; n < 2000; n++) begin
      checks++;
      if (prch !== ~exp_eval || cap !== exp_eval || m !== exp_m || m_nxt !== model[0]) begin
        failures++;
        $display("FAIL period %0d: prch=%b cap=%b m=%b m_nxt=%b (exp eval=%b m=%b m_nxt=%b)",
                 n, prch, cap, m, m_nxt, exp_eval, exp_m, model[0]);
      end
      checks++;
      if (exp_eval ? (mr.t !== exp_m || mr.f !== ~exp_m) : (mr !== MDPL_PRECHARGED)) begin
        failures++;
        $display("FAIL period %0d: mask rails %b", n, mr);
      end
      // advance the model across the next rising edge
      if (exp_eval) begin
        if (exp_m != model[0]) changes++;
        exp_m = model[0];
        model = {1'b0, model[31:1]} ^ (model[0] ? 32'h8020_0003 : 32'h0);
      end
      exp_eval = ~exp_eval;
      @(negedge clk);
    end
    checks++;
    if (changes < 250) begin
      failures++;
      $display("FAIL mask changed only %0d times in 1000 cycles", changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
