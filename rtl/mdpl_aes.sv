// mdpl_aes: AES-128 encryption core whose whole datapath is MDPL.
//
// The state and the round key live in 256 MDPL flip-flops. Each MDPL cycle
// (two clk periods: pre-charge, then evaluation; see mdpl_ctrl) the MDPL
// combinational logic computes one full AES round: 16 MDPL S-boxes
// (SubBytes), wiring (ShiftRows), MDPL MixColumns (bypassed in round 10 by an
// MDPL multiplexer), and AddRoundKey with a round key produced by an MDPL key
// expansion (4 more S-boxes). All of it uses the single circuit-wide mask,
// which changes every MDPL cycle; the flip-flops re-mask their contents.
// Plaintext, key and the public round constant and control bits enter through
// cmos_to_mdpl interfaces; the ciphertext leaves through mdpl_to_cmos.
//
// MDPL was evaluated on an AES module, but its architecture was not
// published: the round-per-cycle organisation, the control and the
// interface protocol are this design's choices.
//
// Interface: with busy = 0, a clk cycle with start = 1 takes plaintext and
// key. busy stays high until done pulses for one clk cycle; ciphertext is then
// valid and holds until the next done. Latency from the start edge to done is
// 12 MDPL cycles: 23 or 24 clk periods depending on which clk phase start hits
// (one load cycle, ten rounds, one output cycle). rail_err flags, until reset,
// a state-register rail pair that broke the pre-charge / evaluation rules.
module mdpl_aes
  import mdpl_pkg::*;
#(
  parameter logic [31:0] MASK_SEED = 32'hACE1_2468
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] plaintext,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic [127:0] ciphertext,
  output logic         rail_err
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ROUND, S_OUT} state_e;

  // ---------------------------------------------------------------- control
  logic  prch, cap, m, m_nxt;
  mdpl_t mr;

  mdpl_ctrl #(.SEED(MASK_SEED)) u_ctrl (
    .clk, .rst_n, .prch, .cap, .m, .m_nxt, .mr
  );

  state_e       state;
  logic [3:0]   round;
  logic [127:0] pt_q, key_q;
  logic [7:0]   rcon_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      round  <= '0;
      pt_q   <= '0;
      key_q  <= '0;
      rcon_q <= 8'h01;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pt_q  <= plaintext;
          key_q <= key;
          state <= S_LOAD;
        end
        S_LOAD: if (cap) begin
          round  <= 4'd1;
          rcon_q <= 8'h01;
          state  <= S_ROUND;
        end
        S_ROUND: if (cap) begin
          round  <= round + 4'd1;
          rcon_q <= {rcon_q[6:0], 1'b0} ^ (rcon_q[7] ? 8'h1b : 8'h00);
          if (round == 4'd10) state <= S_OUT;
        end
        S_OUT: if (cap) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ------------------------------------------------------ CMOS -> MDPL inputs
  mdpl_t [127:0] pt_m, key_m;
  mdpl_t [7:0]   rcon_m;
  mdpl_t [1:0]   ctl_m;   // [1] = load, [0] = last round

  cmos_to_mdpl #(.W(128)) u_in_pt  (.prch, .m, .x(pt_q),   .y(pt_m));
  cmos_to_mdpl #(.W(128)) u_in_key (.prch, .m, .x(key_q),  .y(key_m));
  cmos_to_mdpl #(.W(8))   u_in_rc  (.prch, .m, .x(rcon_q), .y(rcon_m));
  cmos_to_mdpl #(.W(2))   u_in_ctl (.prch, .m,
                                    .x({state == S_LOAD, round == 4'd10}),
                                    .y(ctl_m));

  // ------------------------------------------------------- MDPL round logic
  mdpl_t [127:0] st_q, rk_q;           // register outputs
  mdpl_t [127:0] sb, sr, mc, rnd_in, nk, rnd, init, st_d, rk_d;

  // SubBytes
  for (genvar b = 0; b < 16; b++) begin : g_sub
    mdpl_sbox u_sbox (.a(st_q[127-8*b -: 8]), .m(mr), .y(sb[127-8*b -: 8]));
  end

  // ShiftRows: byte (row r, column c) takes byte (r, c + r mod 4)
  for (genvar c = 0; c < 4; c++) begin : g_sr_col
    for (genvar r = 0; r < 4; r++) begin : g_sr_row
      assign sr[127-8*(4*c+r) -: 8] = sb[127-8*(4*(((c+r)%4))+r) -: 8];
    end
  end

  // MixColumns
  for (genvar c = 0; c < 4; c++) begin : g_mc
    mdpl_mixcolumn u_mc (.a(sr[127-32*c -: 32]), .m(mr), .y(mc[127-32*c -: 32]));
  end

  // Round 10 skips MixColumns
  for (genvar i = 0; i < 128; i++) begin : g_last
    mdpl_mux2 u_mux (.s(ctl_m[0]), .hi(sr[i]), .lo(mc[i]), .m(mr), .y(rnd_in[i]));
  end

  // Key expansion and AddRoundKey
  mdpl_keyexp u_keyexp (.k(rk_q), .rcon(rcon_m), .m(mr), .nk(nk));
  mdpl_xor_vec #(.W(128)) u_ark   (.a(rnd_in), .b(nk),    .m(mr), .y(rnd));
  mdpl_xor_vec #(.W(128)) u_ark0  (.a(pt_m),   .b(key_m), .m(mr), .y(init));

  // Load or round result into the registers
  for (genvar i = 0; i < 128; i++) begin : g_sel
    mdpl_mux2 #(.NOR_FORM(1'b1)) u_mux_st (.s(ctl_m[1]), .hi(init[i]),  .lo(rnd[i]), .m(mr), .y(st_d[i]));
    mdpl_mux2 #(.NOR_FORM(1'b1)) u_mux_rk (.s(ctl_m[1]), .hi(key_m[i]), .lo(nk[i]),  .m(mr), .y(rk_d[i]));
  end

  // ------------------------------------------------------ MDPL flip-flops
  for (genvar i = 0; i < 128; i++) begin : g_reg
    mdpl_dff u_st (.clk, .rst_n, .cap, .prch, .m, .m_nxt, .d(st_d[i]), .q(st_q[i]));
    mdpl_dff u_rk (.clk, .rst_n, .cap, .prch, .m, .m_nxt, .d(rk_d[i]), .q(rk_q[i]));
  end

  // ------------------------------------------------------ MDPL -> CMOS output
  mdpl_to_cmos #(.W(128)) u_out (
    .clk, .rst_n, .prch, .cap, .en(state == S_OUT), .m, .a(st_q),
    .x(ciphertext), .err(rail_err)
  );
endmodule
