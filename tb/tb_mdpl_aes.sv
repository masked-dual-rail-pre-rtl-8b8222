// tb_mdpl_aes: end-to-end test of the MDPL AES-128 core at its default
// parameters.
//
// It encrypts the two FIPS-197 example vectors and a series of random
// plaintext/key pairs and compares every ciphertext with a behavioural AES
// model of aes_ref_pkg. It also checks:
//   * latency: done comes 24 clk periods after a start taken at the end of an
//     evaluation period and 23 after one taken at the end of a pre-charge
//     period (12 MDPL cycles either way); both cases must occur;
//   * pre-charge: all 512 rails of the state and key registers are 0 in every
//     pre-charge period, and exactly 256 of them are 1 in every evaluation
//     period, whatever the data;
//   * masking: the mask changes during the run, and encrypting the same input
//     again leaves a different bit pattern on the state register's true rails
//     at least once;
//   * the last round bypasses MixColumns, the load path is used, and rail_err
//     stays 0.
// Each mechanism is counted, and one that never happened is a failure.
module tb_mdpl_aes;
  import mdpl_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] plaintext, key, ciphertext;
  logic         busy, done, rail_err;

  int checks = 0, failures = 0, cycles = 0;
  int n_enc = 0, n_lat23 = 0, n_lat24 = 0, n_last = 0, n_load = 0;
  int n_prch = 0, n_eval = 0, n_mask_change = 0, n_mask_differs = 0;

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

  // ------------------------------------------------------ monitors
  logic prev_m;
  always @(negedge clk) begin
    if (rst_n) begin
      int ones;
      ones = $countones({dut.st_q, dut.rk_q});
      checks++;
      if (dut.prch) begin
        n_prch++;
        if (ones != 0) begin
          failures++;
          $display("FAIL pre-charge period with %0d register rails high", ones);
        end
      end else begin
        n_eval++;
        if (ones != 256) begin
          failures++;
          $display("FAIL evaluation period with %0d register rails high", ones);
        end
      end
      if (dut.cap && dut.state == 2'd2 && dut.round == 4'd10) n_last++;
      if (dut.cap && dut.state == 2'd1) n_load++;
      if (dut.m != prev_m) n_mask_change++;
      prev_m = dut.m;
    end
  end

  // ------------------------------------------------------ stimulus
  task automatic encrypt(input logic [127:0] pt, input logic [127:0] k,
                         input int skew, output logic [255:0] true_rails);
    int t0, lat, expected_lat;
    repeat (skew) @(negedge clk);
    plaintext = pt;
    key       = k;
    start     = 1'b1;
    expected_lat = dut.cap ? 24 : 23;   // start is sampled at the coming edge
    @(posedge clk);
    #1 start = 1'b0;
    t0 = cycles;
    true_rails = '0;
    while (!done) begin
      @(posedge clk);
      #1;
      if (dut.state == 2'd3 && !dut.prch) for (int i = 0; i < 128; i++) true_rails[i] = dut.st_q[i].t;
    end
    lat = cycles - t0;
    n_enc++;
    if (lat == 23) n_lat23++;
    if (lat == 24) n_lat24++;
    checks++;
    if (lat != expected_lat) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, expected_lat);
    end
    checks++;
    if (ciphertext !== ref_aes(pt, k)) begin
      failures++;
      $display("FAIL pt=%h key=%h ct=%h expected %h", pt, k, ciphertext, ref_aes(pt, k));
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy still high after done");
    end
  endtask

  initial begin
    logic [255:0] r0, r1;
    logic [127:0] pt, k;
    sbox_init();
    checks++;
    if (ref_aes(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("FAIL reference model");
    end

    plaintext = '0; key = '0;
    prev_m = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // FIPS-197 Appendix C.1 and Appendix B
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 1, r0);
    checks++;
    if (ciphertext !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("FAIL FIPS-197 C.1 vector: %h", ciphertext);
    end
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 2, r0);
    checks++;
    if (ciphertext !== 128'h3925841d02dc09fbdc118597196a0b32) begin
      failures++;
      $display("FAIL FIPS-197 B vector: %h", ciphertext);
    end

    // random vectors, alternating the phase at which start arrives
    for (int n = 0; n < 12; n++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      k  = {$urandom, $urandom, $urandom, $urandom};
      encrypt(pt, k, 1 + n % 2, r0);
    end

    // same input repeatedly: the masked register pattern must vary
    pt = {$urandom, $urandom, $urandom, $urandom};
    k  = {$urandom, $urandom, $urandom, $urandom};
    encrypt(pt, k, 1, r0);
    for (int n = 0; n < 8; n++) begin
      encrypt(pt, k, 1 + n % 3, r1);
      if (r1 != r0) n_mask_differs++;
    end

    checks++;
    if (rail_err !== 1'b0) begin
      failures++;
      $display("FAIL rail_err raised");
    end

    $display("mechanisms: encryptions=%0d latency23=%0d latency24=%0d loads=%0d last_rounds=%0d",
             n_enc, n_lat23, n_lat24, n_load, n_last);
    $display("mechanisms: precharge_periods=%0d eval_periods=%0d mask_changes=%0d masked_pattern_differs=%0d",
             n_prch, n_eval, n_mask_change, n_mask_differs);
    checks += 8;
    if (n_enc == 0)          failures++;
    if (n_lat23 == 0)        failures++;
    if (n_lat24 == 0)        failures++;
    if (n_load != n_enc)     failures++;
    if (n_last != n_enc)     failures++;
    if (n_prch == 0 || n_eval == 0) failures++;
    if (n_mask_change == 0)  failures++;
    if (n_mask_differs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
