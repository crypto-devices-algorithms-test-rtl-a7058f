// crypto_bist_top: the two crypto-cores with built-in test modes, AES-128 and DES, side
// by side. They share only clock and reset; each brings out its own mode, control,
// data, key and result ports (prefix aes_ or des_). Either core can be run in MISSION
// mode to encrypt, in SELF_TEST mode to test itself, in TPG mode as a pseudorandom
// pattern source (aes_r_out / des_r_out change every cycle) or in ORA mode to compact
// the responses of another circuit presented on its din port. Circuits under test are
// outside this module. Timing of each core is that of bist_ctrl.
module crypto_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned  AES_SELFTEST_ENC = 210,
  parameter int unsigned  DES_SELFTEST_ENC = 25,
  parameter logic [127:0] AES_TEST_KEY     = 128'h2b7e151628aed2a6abf7158809cf4f3c,
  parameter logic [63:0]  DES_TEST_KEY     = 64'h133457799bbcdff1
) (
  input  logic         clk,
  input  logic         rst_n,
  // AES crypto-core
  input  bist_mode_e   aes_mode,
  input  logic         aes_start,
  input  logic         aes_stop,
  input  logic         aes_diag,
  input  logic [127:0] aes_din,
  input  logic         aes_din_valid,
  input  logic         aes_din_last,
  input  logic [127:0] aes_key,
  input  logic         aes_test_key_load,
  output logic [127:0] aes_r_out,
  output logic         aes_rout_upd,
  output logic         aes_busy,
  output logic         aes_done,
  // DES crypto-core
  input  bist_mode_e   des_mode,
  input  logic         des_start,
  input  logic         des_stop,
  input  logic         des_diag,
  input  logic [63:0]  des_din,
  input  logic         des_din_valid,
  input  logic         des_din_last,
  input  logic [63:0]  des_key,
  input  logic         des_test_key_load,
  output logic [63:0]  des_r_out,
  output logic         des_rout_upd,
  output logic         des_busy,
  output logic         des_done
);

  aes_bist_core #(.SELFTEST_ENC(AES_SELFTEST_ENC), .TEST_KEY(AES_TEST_KEY)) u_aes (
    .clk, .rst_n,
    .mode(aes_mode), .start(aes_start), .stop(aes_stop), .diag(aes_diag),
    .din(aes_din), .din_valid(aes_din_valid), .din_last(aes_din_last),
    .key(aes_key), .test_key_load(aes_test_key_load),
    .r_out(aes_r_out), .rout_upd(aes_rout_upd), .busy(aes_busy), .done(aes_done)
  );

  des_bist_core #(.SELFTEST_ENC(DES_SELFTEST_ENC), .TEST_KEY(DES_TEST_KEY)) u_des (
    .clk, .rst_n,
    .mode(des_mode), .start(des_start), .stop(des_stop), .diag(des_diag),
    .din(des_din), .din_valid(des_din_valid), .din_last(des_din_last),
    .key(des_key), .test_key_load(des_test_key_load),
    .r_out(des_r_out), .rout_upd(des_rout_upd), .busy(des_busy), .done(des_done)
  );

endmodule
