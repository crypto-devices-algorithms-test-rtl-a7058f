// des_bist_core: an iterative DES encryption core (one Feistel round per clock cycle,
// 16 rounds per block) extended with the SELF_TEST, TPG and ORA modes. The datapath is
// the loop Initial Op (IP) -> Select mux -> Round -> R, with R fed back through the
// SA-gated XOR to input 1 of the mux, and R passed through Final Op (half swap and
// IP^-1) into R-out under Write-out. The key schedule reloads PC-1 of the key at the
// first round of every encryption. In the test modes it takes the shadow test key, and
// during the last SELF_TEST encryption the bitwise inverse of that key, so that every
// key-schedule line is seen at both values.
// Interface and timing as aes_bist_core, with 64-bit data and key (key parity bits are
// ignored, as in the standard).
module des_bist_core
  import bist_pkg::*;
#(
  parameter int unsigned  SELFTEST_ENC = 25,
  parameter logic [63:0]  TEST_KEY     = 64'h133457799bbcdff1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bist_mode_e  mode,
  input  logic        start,
  input  logic        stop,
  input  logic        diag,
  input  logic [63:0] din,
  input  logic        din_valid,
  input  logic        din_last,
  input  logic [63:0] key,
  input  logic        test_key_load,
  output logic [63:0] r_out,
  output logic        rout_upd,
  output logic        busy,
  output logic        done
);
  import des_pkg::*;

  logic        select, sa, adv, key_inv, test_key, write_out;
  logic [3:0]  rnd;
  logic [63:0] shadow_key, key_sel, key_src, init_out, round_in, round_out, r_q, final_out;
  logic [47:0] round_key;

  bist_ctrl #(
    .NR(DES_ROUNDS), .SELFTEST_ENC(SELFTEST_ENC), .KEY_INV_LAST(1'b1)
  ) u_ctrl (
    .clk, .rst_n, .mode, .start, .stop, .diag, .din_valid, .din_last,
    .select, .sa, .adv, .first(), .rnd, .last_rnd(), .key_inv, .test_key, .write_out,
    .rout_upd, .busy, .done
  );

  shadow_key_reg #(.W(64), .TEST_KEY(TEST_KEY)) u_shadow (
    .clk, .rst_n, .load(test_key_load), .key_in(key), .key_out(shadow_key)
  );

  always_comb begin
    key_sel = test_key ? shadow_key : key;
    key_src = key_inv ? ~key_sel : key_sel;
  end

  des_initial_op u_init (.data_in(din), .data_out(init_out));

  bist_input_mux #(.W(64)) u_mux (
    .select, .sa, .din, .r(r_q), .init_op(init_out), .round_in
  );

  des_key_gen u_keygen (
    .clk, .rst_n, .en(adv), .load(rnd == 4'd0), .key_in(key_src), .rnd, .round_key
  );

  des_round u_round (.state_in(round_in), .round_key, .state_out(round_out));

  des_final_op u_final (.data_in(r_q), .data_out(final_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q   <= '0;
      r_out <= '0;
    end else begin
      if (adv)       r_q   <= round_out;
      if (write_out) r_out <= final_out;
    end
  end

endmodule
