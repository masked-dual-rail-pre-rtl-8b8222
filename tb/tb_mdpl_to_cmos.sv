// tb_mdpl_to_cmos: drives masked MDPL words through pre-charge / evaluation
// periods and checks that x holds the unmasked word one edge after each
// enabled capture (and keeps its value when en = 0), that err stays 0 for
// legal traffic, and that it is raised and held by a pair that is not 00 in
// pre-charge and, after a reset, by a 00 pair at the end of an evaluation.
module tb_mdpl_to_cmos;
  import mdpl_pkg::*;
  localparam int W = 8;

  logic             clk = 1'b0, rst_n = 1'b0, prch = 1'b1, cap = 1'b0, en = 1'b0, m = 1'b0;
  mdpl_t [W-1:0]    a;
  logic  [W-1:0]    x;
  logic             err;
  int checks = 0, failures = 0, cycles = 0;

  mdpl_to_cmos #(.W(W)) dut (.clk, .rst_n, .prch, .cap, .en, .m, .a, .x, .err);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mdpl_cycle(input logic [W-1:0] data, input logic mm, input logic enable);
    @(negedge clk);
    prch = 1'b1; cap = 1'b0; en = enable; m = mm;
    a = '0;
    @(negedge clk);
    prch = 1'b0; cap = 1'b1;
    for (int i = 0; i < W; i++) a[i] = mdpl_enc(data[i], mm);
  endtask

  initial begin
    logic [W-1:0] last;
    a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    last = '0;
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] data;
      logic enable;
      data   = W'($urandom);
      enable = 1'($urandom);
      mdpl_cycle(data, 1'($urandom), enable);
      if (enable) last = data;
      @(posedge clk);
      #1;
      checks++;
      if (x !== last) begin
        failures++;
        $display("FAIL cycle %0d: x=%h expected %h", n, x, last);
      end
      checks++;
      if (err !== 1'b0) begin
        failures++;
        $display("FAIL cycle %0d: err raised on legal traffic", n);
      end
    end
    // a rail high during pre-charge
    @(negedge clk);
    prch = 1'b1; cap = 1'b0;
    a = '0; a[3].f = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (err !== 1'b1) begin failures++; $display("FAIL err missed a pre-charge violation"); end
    a = '0;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (err !== 1'b1) begin failures++; $display("FAIL err not sticky"); end
    // reset, then an unevaluated pair at capture
    rst_n = 1'b0; #1; rst_n = 1'b1;
    @(negedge clk);
    prch = 1'b0; cap = 1'b1;
    for (int i = 0; i < W; i++) a[i] = mdpl_enc(1'b1, 1'b0);
    a[5] = MDPL_PRECHARGED;
    @(posedge clk); #1;
    checks++;
    if (err !== 1'b1) begin failures++; $display("FAIL err missed an unevaluated pair"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
