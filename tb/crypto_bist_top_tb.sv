// crypto_bist_top_tb: runs the whole design end to end with every parameter at its
// default (210 AES and 25 DES self-test encryptions). Expected values come from an
// independent reference model of both cores.
//   1. Both cores encrypt a known-answer vector at the same time (MISSION).
//   2. Both cores run their SELF_TEST concurrently; the DES one with diag set, so all 25
//      intermediate signatures are checked. The DES key-schedule inversion during the
//      last encryption is observed.
//   3. The AES core in TPG mode drives a stand-in circuit under test, defined here as
//      resp = (p[127:64] ^ p[63:0]) + {p[31:0], p[63:32]} (mod 2^64), and the DES core in
//      ORA mode compacts its responses. Every seventh response is held back with
//      din_valid low, so the ORA stall path is used; the signature is checked.
//   4. A new DES test key is written into the shadow register and the DES self-test is
//      repeated; the signature must match the new key.
//   5. The DES core in TPG mode with diag gives one pattern per encryption (new test key).
// Each mechanism is counted and one that never happened counts as a failure.
module crypto_bist_top_tb;
  import bist_pkg::*;
  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end

  localparam logic [63:0] DES_SIG [25] = '{
    64'h4fa1826630ceac29,
    64'hb41fa9e4e88df851,
    64'he2e14805057254a1,
    64'h446fded391a8b22e,
    64'h3dbbeeddfb2a2c07,
    64'h9f639eca00349d08,
    64'hfd07fb66b8e59f8c,
    64'haf7fa16648b4daea,
    64'hadfc1f052ce32d71,
    64'he998edc7adec04df,
    64'hce478ba26615cac5,
    64'h91febadec0e200d0,
    64'h4904b745f992b523,
    64'h5f12be2ac8c3d101,
    64'hf53e723496083e1d,
    64'ha2aa0829733365ed,
    64'h6389914ed989fe1f,
    64'h27c6db4781386b99,
    64'h0261c4e5067eacea,
    64'h4698e93d7e1d99c1,
    64'h03bae634ef1d9cf6,
    64'h136e674215eed691,
    64'heb1cd9e120edf1c5,
    64'h375fe3c503a903d8,
    64'h3db0a6293ac71192
  };

  localparam logic [119:0] KEEP = 120'b111101111110111111011111101111110111111011111101111110111111011111101111110111111011111101111110111111011111101111110111;

  bist_mode_e aes_mode, des_mode;
  logic rst_n;
  logic aes_start, aes_stop, aes_diag, aes_din_valid, aes_din_last, aes_test_key_load;
  logic des_start, des_stop, des_diag, des_din_valid, des_din_last, des_test_key_load;
  logic aes_rout_upd, aes_busy, aes_done, des_rout_upd, des_busy, des_done;
  logic [127:0] aes_din, aes_key, aes_r_out;
  logic [63:0]  des_din, des_key, des_r_out;

  int n_mission, n_selftest, n_keyinv, n_diag, n_tpg, n_ora_stall, n_ora, n_keyload, n_tpg_enc;

  crypto_bist_top dut (.*);

  function automatic logic [63:0] cut(input logic [127:0] p);
    return (p[127:64] ^ p[63:0]) + {p[31:0], p[63:32]};
  endfunction

  always @(posedge clk) if (dut.u_des.key_inv && dut.u_des.busy) n_keyinv++;

  initial begin
    int n, k;
    bit aes_fin, des_fin;
    {n_mission, n_selftest, n_keyinv, n_diag, n_tpg, n_ora_stall, n_ora, n_keyload, n_tpg_enc} = '0;
    rst_n = 1'b0;
    {aes_start, aes_stop, aes_diag, aes_din_valid, aes_din_last, aes_test_key_load} = '0;
    {des_start, des_stop, des_diag, des_din_valid, des_din_last, des_test_key_load} = '0;
    aes_mode = MODE_MISSION; des_mode = MODE_MISSION;
    aes_din = '0; aes_key = '0; des_din = '0; des_key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. MISSION on both cores
    aes_din = 128'h00112233445566778899aabbccddeeff; aes_key = 128'h000102030405060708090a0b0c0d0e0f;
    des_din = 64'h0123456789abcdef; des_key = 64'h133457799bbcdff1;
    aes_start = 1'b1; des_start = 1'b1;
    @(negedge clk);
    aes_start = 1'b0; des_start = 1'b0;
    aes_fin = 0; des_fin = 0;
    while (!(aes_fin && des_fin)) begin
      if (aes_done) begin
        check(aes_r_out == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "AES mission ciphertext");
        aes_fin = 1; n_mission++;
      end
      if (des_done) begin
        check(des_r_out == 64'h85e813540f0ab405, "DES mission ciphertext");
        des_fin = 1; n_mission++;
      end
      @(negedge clk);
    end

    // 2. SELF_TEST on both cores, DES with intermediate signatures
    aes_mode = MODE_SELF_TEST; aes_din = 128'h4a37fa2df2d7d40fc7859faeecc3f80c; aes_key = '0;
    des_mode = MODE_SELF_TEST; des_din = 64'hd46375dce47682e6;  des_key = '0; des_diag = 1'b1;
    aes_start = 1'b1; des_start = 1'b1;
    @(negedge clk);
    aes_start = 1'b0; des_start = 1'b0;
    aes_fin = 0; des_fin = 0; n = 0;
    while (!(aes_fin && des_fin)) begin
      if (des_rout_upd && !des_fin) begin
        check(des_r_out == DES_SIG[n], $sformatf("DES signature %0d", n));
        if (!des_done) n_diag++;
        n++;
      end
      if (des_done) begin
        des_fin = 1; n_selftest++;
        check(n == 25, "25 DES signatures");
      end
      if (aes_done) begin
        check(aes_r_out == 128'h7e59bd02882dfd0d9c34c55217866bfb, "AES self-test signature");
        aes_fin = 1; n_selftest++;
      end
      @(negedge clk);
    end
    des_diag = 1'b0;

    // 3. AES as pattern generator, stand-in circuit, DES as response analyser
    aes_mode = MODE_TPG; aes_din = 128'h4e86c4fa978f18a7045f21da156393d8; aes_start = 1'b1;
    des_mode = MODE_ORA;
    @(negedge clk);
    aes_start = 1'b0;
    n = 0; k = 0;
    while (n < 120) begin
      des_start = 1'b0; des_din_valid = 1'b0; des_din_last = 1'b0;
      if (aes_rout_upd) begin
        n_tpg++;
        des_din = cut(aes_r_out);
        if (KEEP[n]) begin
          des_start     = (k == 0);
          des_din_valid = 1'b1;
          des_din_last  = (n == 119);
          k++;
        end else begin
          n_ora_stall++;
        end
        aes_stop = (n == 119);
        n++;
      end
      @(negedge clk);
    end
    {des_start, des_din_valid, des_din_last, aes_stop} = '0;
    while (!des_done) @(negedge clk);
    check(des_r_out == 64'h4410859f2be531c2, $sformatf("ORA signature %h", des_r_out));
    check(k == 103, "responses sent");
    n_ora++;
    check(!aes_busy, "TPG stopped");

    // 4. New DES test key, self-test again
    des_key = 64'h611244c06c7ab5c9; des_test_key_load = 1'b1;
    @(negedge clk);
    des_test_key_load = 1'b0; des_key = '0; n_keyload++;
    des_mode = MODE_SELF_TEST; des_din = 64'hd46375dce47682e6; des_start = 1'b1;
    @(negedge clk);
    des_start = 1'b0;
    while (!des_done) @(negedge clk);
    check(des_r_out == 64'h6f3208ed0f30aa9e, "DES self-test with the new test key");
    n_selftest++;

    // 5. DES as pattern generator, one pattern per encryption
    des_mode = MODE_TPG; des_din = 64'h5bab1eec87b3d90e; des_diag = 1'b1; des_start = 1'b1;
    @(negedge clk);
    des_start = 1'b0;
    n = 0;
    while (n < 2) begin
      if (des_rout_upd) begin
        check(des_r_out == (n == 0 ? 64'h0cd01b771d6a9ac6 : 64'h404f3b8103c6777e), $sformatf("DES encryption pattern %0d", n));
        n++;
        n_tpg_enc++;
      end
      des_stop = (n == 2);
      @(negedge clk);
    end
    {des_stop, des_diag} = '0;
    check(!des_busy, "DES TPG stopped");

    $display("mechanisms: mission=%0d self_test=%0d key_inversion_cycles=%0d diag_writes=%0d tpg_patterns=%0d ora_stalls=%0d ora_signatures=%0d test_key_loads=%0d tpg_per_encryption=%0d",
             n_mission, n_selftest, n_keyinv, n_diag, n_tpg, n_ora_stall, n_ora, n_keyload, n_tpg_enc);
    check(n_mission == 2, "mission runs");
    check(n_selftest == 3, "self-test runs");
    check(n_keyinv == 32, "DES inverted-key rounds (two self-tests)");
    check(n_diag == 24, "intermediate signatures");
    check(n_tpg == 120, "TPG patterns");
    check(n_ora_stall > 0, "ORA stalls");
    check(n_ora == 1, "ORA signature");
    check(n_keyload == 1, "test key load");
    check(n_tpg_enc == 2, "TPG patterns per encryption");
    finish();
  end
endmodule
