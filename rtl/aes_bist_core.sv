// aes_bist_core: an iterative AES-128 encryption core (one round per clock cycle, 10
// rounds per block) extended with the SELF_TEST, TPG and ORA modes. The datapath is the
// loop Initial Op -> Select mux -> Round -> R, with R fed back through the SA-gated XOR
// to input 1 of the mux, and R copied to R-out under Write-out. AES has no final
// operation, so R-out takes R directly. Keys come from aes_key_gen; in the test modes
// both the Initial Op and the key schedule use the shadow test key, and the schedule
// runs on from the tenth round key of each encryption.
// Interface: din is the plaintext (MISSION), the initial message (SELF_TEST), the seed
// (TPG) or the circuit response (ORA); key is the mission key. See bist_ctrl for the
// start/stop/din_valid/din_last protocol and timing. r_out holds the ciphertext, the
// signature or the latest pattern; rout_upd strobes the cycle after each write.
module aes_bist_core
  import bist_pkg::*;
#(
  parameter int unsigned    SELFTEST_ENC = 210,
  parameter logic [127:0]   TEST_KEY     = 128'h2b7e151628aed2a6abf7158809cf4f3c
) (
  input  logic         clk,
  input  logic         rst_n,
  input  bist_mode_e   mode,
  input  logic         start,
  input  logic         stop,
  input  logic         diag,
  input  logic [127:0] din,
  input  logic         din_valid,
  input  logic         din_last,
  input  logic [127:0] key,
  input  logic         test_key_load,
  output logic [127:0] r_out,
  output logic         rout_upd,
  output logic         busy,
  output logic         done
);
  import aes_pkg::*;

  logic         select, sa, adv, first, last_rnd, test_key, write_out;
  logic [3:0]   rnd;
  logic [127:0] shadow_key, key_sel, init_out, round_in, round_out, round_key, r_q;

  bist_ctrl #(
    .NR(AES_ROUNDS), .SELFTEST_ENC(SELFTEST_ENC), .KEY_INV_LAST(1'b0)
  ) u_ctrl (
    .clk, .rst_n, .mode, .start, .stop, .diag, .din_valid, .din_last,
    .select, .sa, .adv, .first, .rnd, .last_rnd, .key_inv(), .test_key, .write_out,
    .rout_upd, .busy, .done
  );

  shadow_key_reg #(.W(128), .TEST_KEY(TEST_KEY)) u_shadow (
    .clk, .rst_n, .load(test_key_load), .key_in(key), .key_out(shadow_key)
  );

  always_comb key_sel = test_key ? shadow_key : key;

  aes_initial_op u_init (.data_in(din), .key(key_sel), .data_out(init_out));

  bist_input_mux #(.W(128)) u_mux (
    .select, .sa, .din, .r(r_q), .init_op(init_out), .round_in
  );

  aes_key_gen u_keygen (
    .clk, .rst_n, .en(adv), .load(first), .key_in(key_sel), .rnd, .round_key
  );

  aes_round u_round (
    .state_in(round_in), .round_key, .last(last_rnd), .state_out(round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q   <= '0;
      r_out <= '0;
    end else begin
      if (adv)       r_q   <= round_out;
      if (write_out) r_out <= r_q;
    end
  end

endmodule
