// tb_mdpl_aes_dpa: the DPA experiment on the MDPL AES core, as far as a
// logic simulation can carry it.
//
// 256 encryptions under one fixed key, with plaintext byte 0 running through
// all 256 values. In the evaluation period of round 1 the testbench reads the
// output pair of the S-box for byte 0, i.e. the first SubBytes output that a
// DPA attack targets, and checks that:
//   * it unmasks to S(p0 XOR k0) (reference from aes_ref_pkg) and every
//     ciphertext is right;
//   * exactly 8 of its 16 rails rise in every encryption, so a power model
//     that counts rising rails shows no data dependence at all (its
//     difference of means for any predicted bit is exactly 0);
//   * a single-rail view (the true rails alone, as an unbalanced routing of
//     the two rails might expose) is decorrelated by the mask: for output bit
//     0 the fraction of true-rail ones differs by less than 0.3 between the
//     encryptions where that bit is 1 and those where it is 0, while without
//     a mask the difference would be 1.
module tb_mdpl_aes_dpa;
  import mdpl_pkg::*;
  import aes_ref_pkg::*;

  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] plaintext, key, ciphertext;
  logic         busy, done, rail_err;

  int checks = 0, failures = 0, cycles = 0;

  mdpl_aes dut (.clk, .rst_n, .start, .plaintext, .key, .busy, .done, .ciphertext, .rail_err);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample the byte-0 S-box output in the round-1 evaluation period
  mdpl_t [7:0] sb0;
  logic        sb0_m;
  logic        sampled;
  always @(negedge clk) begin
    if (dut.state == 2'd2 && dut.round == 4'd1 && !dut.prch) begin
      sb0     = dut.sb[127:120];
      sb0_m   = dut.m;
      sampled = 1'b1;
    end
  end

  initial begin
    logic [127:0] pt;
    int n1 = 0, n0 = 0, ones1 = 0, ones0 = 0, masked = 0;
    real diff;
    sbox_init();
    key = KEY;
    pt  = {$urandom, $urandom, $urandom, $urandom};
    plaintext = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) begin
      logic [7:0] s;
      int rising;
      pt[127:120] = 8'(i);
      sampled = 1'b0;
      @(negedge clk);
      plaintext = pt;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      wait (done);
      @(negedge clk);
      s = ref_sbox(8'(i) ^ KEY[127:120]);
      checks++;
      if (ciphertext !== ref_aes(pt, KEY)) begin
        failures++;
        $display("FAIL encryption %0d: ct=%h expected %h", i, ciphertext, ref_aes(pt, KEY));
      end
      checks++;
      if (!sampled) begin
        failures++;
        $display("FAIL encryption %0d: round 1 not observed", i);
        continue;
      end
      rising = $countones(sb0);
      checks++;
      if (rising != 8) begin
        failures++;
        $display("FAIL encryption %0d: %0d rails rose", i, rising);
      end
      checks++;
      if (({sb0[7].t, sb0[6].t, sb0[5].t, sb0[4].t, sb0[3].t, sb0[2].t,
                                  sb0[1].t, sb0[0].t} ^ {8{sb0_m}}) !== s) begin
        failures++;
        $display("FAIL encryption %0d: S-box output %b, expected %h", i, sb0, s);
      end
      if (sb0_m) masked++;
      if (s[0]) begin n1++; ones1 += int'(sb0[0].t); end
      else      begin n0++; ones0 += int'(sb0[0].t); end
    end
    diff = real'(ones1) / real'(n1) - real'(ones0) / real'(n0);
    $display("single-rail difference of means for S-box bit 0: %f (n1=%0d n0=%0d), mask=1 in %0d of 256",
             diff, n1, n0, masked);
    checks++;
    if (diff > 0.3 || diff < -0.3) begin
      failures++;
      $display("FAIL true rail correlates with the unmasked bit");
    end
    checks++;
    if (masked == 0 || masked == 256) begin
      failures++;
      $display("FAIL mask never changed between encryptions");
    end
    checks++;
    if (rail_err !== 1'b0) begin
      failures++;
      $display("FAIL rail_err raised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
