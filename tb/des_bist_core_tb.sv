// des_bist_core_tb: end-to-end test of the DES crypto-core in all four modes at the default
// parameters (25 SELF_TEST encryptions). Expected values come from an independent
// round-level reference model whose full encryptions agree with a library cipher.
//   MISSION    known-answer vectors; the ciphertext must be in R-out 17 cycles after
//              start, and the mission key must be used (the test key differs).
//   SELF_TEST  with diag set, R-out must show the state at the end of each of the
//              25 encryptions, the last being the golden signature.
//   TPG        53 successive patterns, one per cycle; then, with diag, one pattern per
//              encryption (16 cycles apart).
//   ORA        39 responses with idle gaps (din_valid low) folded into one signature.
//   A new test key written through test_key_load must change the self-test signature.
// In SELF_TEST the last encryption runs with the inverted test key, as the reference does.
module des_bist_core_tb;
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
    repeat (3200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end

  localparam logic [63:0] MIS_K [6] = '{
    64'h133457799bbcdff1,
    64'h0e329232ea6d0d73,
    64'h001edc8e367e5d6d,
    64'hdd44fd3645114889,
    64'hf9903b72f88ece64,
    64'h97bdd982cdac6046
  };
  localparam logic [63:0] MIS_P [6] = '{
    64'h0123456789abcdef,
    64'h8787878787878787,
    64'hff769e374ddc74c8,
    64'h050684bfe286852c,
    64'h2ff3600735f11af2,
    64'hfeef16e964ef2ebe
  };
  localparam logic [63:0] MIS_C [6] = '{
    64'h85e813540f0ab405,
    64'h0000000000000000,
    64'h4cfb191c7c188c13,
    64'he47d00436ce6302e,
    64'h9c56f58ac33eaea1,
    64'hff3a59a250e16d54
  };
  localparam logic [63:0] SELF_SIG [25] = '{
    64'h0abe4321367450bd,
    64'h36d0d4e9e1b3b313,
    64'h432d4a2143db2b7e,
    64'h8326bd1b37272c2e,
    64'h43dd6d050483cfa4,
    64'h854e1eb04534d69d,
    64'hbfa7d6429f9d6de6,
    64'h6658e4cd2ab8abc3,
    64'h765acc6f5bda2c2a,
    64'haf3d798a4c57b8dc,
    64'h653e9cae12168815,
    64'h769ae07a998ed681,
    64'hfc9177aeebe9df6a,
    64'hb926c64e54a660b2,
    64'h96007de7cb9ffaf6,
    64'hbb199707d9abf116,
    64'hef5f479f4a3de384,
    64'h629e70ec76f30aef,
    64'h2fdfec0c17de6f85,
    64'ha14e498447986c84,
    64'h6920b540387fbe38,
    64'h34f7fe8f24732567,
    64'h785e921018574e02,
    64'h4d5b6b73dcbd55a2,
    64'h4cb9faa573616ba0
  };
  localparam logic [63:0] TPG_PAT [53] = '{
    64'hd6b3f2cca10e163a,
    64'hb833b4c856596c25,
    64'h34726d81a9e6dc0a,
    64'h2de49a1346c8a845,
    64'h4fd86526dcc145cf,
    64'h9ba49e19ac97dbdf,
    64'h625d7c73493ab3ba,
    64'hc0eee8b3c7743774,
    64'h949884629abc6ba8,
    64'h392448816469c705,
    64'h62489056d9d28b5a,
    64'h95d121a8f6a047b1,
    64'h6be31654a815da33,
    64'hc2936cbd443fe432,
    64'hd473d97b993a9c60,
    64'hbde3f6b763206cc5,
    64'h7f92bc3e8255888e,
    64'hfb757c2840ef541c,
    64'hf7eaed14d19bbd6d,
    64'hff909b7ce2367e8e,
    64'haa7132f98139ec1d,
    64'h01a675b706638d7f,
    64'h5348fb7e1dd60bfe,
    64'he2d0a7fd3afd02bd,
    64'h94a41afe31ee103a,
    64'h785870b9339c3030,
    64'hb0e0b13377793170,
    64'h34842762bbb222f0,
    64'h6d095bd5722111e0,
    64'h8b52f7aaf0473284,
    64'h13a5ba11b0de245c,
    64'h230b357674bd09ed,
    64'h46127ba8bd6f429f,
    64'h8835e2402f9e913f,
    64'h456ed5911e38327b,
    64'hdbd9fb73393170f7,
    64'ha3f6f2e63332b0aa,
    64'h02ede5cd23742444,
    64'h11db8fca47b84998,
    64'h37b75ed59b358770,
    64'h6a3ffdaf277b1ba5,
    64'h943eaa1f0ff6334e,
    64'h697d152f5bed268c,
    64'h82ee7a4ab7ca4c0d,
    64'h51ccf1853f858c5a,
    64'hb788f74f2a5e59a5,
    64'h7a14bedf54e9b21f,
    64'he53d6cbea993256e,
    64'h9a6b987d46224e98,
    64'h30c725fb9900cc70,
    64'h308e4ee7220588e1,
    64'h311ccc8f011e45c6,
    64'h7378d91f4728da89
  };
  localparam logic [63:0] ORA_RESP [39] = '{
    64'h0ac793f519af685d,
    64'h2577c1ecfd42e044,
    64'h7108e02236971e1b,
    64'h027385c9421e7a60,
    64'h9c3ecb54c5cefdd8,
    64'hd48dd9f354366c21,
    64'h62dc08d64bdbf090,
    64'h1304145212ca3f70,
    64'h356f8bd11711eb57,
    64'ha2f7647a952e1b8b,
    64'h03f8670d3e361858,
    64'h5e617f8e99edbce7,
    64'h9f452c075f27ff08,
    64'h20918fa774057241,
    64'h965768e0f589d99a,
    64'hd5157e9d7bd55ee6,
    64'h22bfb8e0931719fd,
    64'h62d74145ddd4a054,
    64'ha0931ed42ecdcc0a,
    64'h4f91540c27756991,
    64'h3a775505e88e752f,
    64'h9c461cb5d15b77f2,
    64'hb9b338eb3fdf2348,
    64'h2891dd3c3096c6c8,
    64'ha104a795bd4aeab0,
    64'h8dce6f52f0be600d,
    64'hafdd87333253b562,
    64'h6361b9f8f33c1a7f,
    64'h7b862eace1d7300f,
    64'h14186ebf9a8137e9,
    64'h0c2282666be49ee7,
    64'h1bea85931a953cca,
    64'h8329c05b09e80319,
    64'h41536363f6724ba0,
    64'hbd65693b3d0840fb,
    64'h64409ddbb45f51c3,
    64'h6bba8d2141c9886e,
    64'he7a28cbdd2df2c20,
    64'h7db224cb98b20411
  };

  bist_mode_e mode;
  logic rst_n, start, stop, diag, din_valid, din_last, test_key_load, rout_upd, busy, done;
  logic [63:0] din, key, r_out;

  des_bist_core dut (
    .clk, .rst_n, .mode, .start, .stop, .diag, .din, .din_valid, .din_last, .key,
    .test_key_load, .r_out, .rout_upd, .busy, .done
  );

  initial begin
    int cyc, n;
    rst_n = 1'b0; start = 1'b0; stop = 1'b0; diag = 1'b0; din_valid = 1'b0; din_last = 1'b0;
    test_key_load = 1'b0; mode = MODE_MISSION; din = '0; key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // MISSION
    for (int i = 0; i < 6; i++) begin
      mode = MODE_MISSION; din = MIS_P[i]; key = MIS_K[i]; start = 1'b1;
      cyc = 0;
      @(negedge clk);
      start = 1'b0; din = '0; key = ~MIS_K[i];  // inputs are only needed in the start cycle
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      check(r_out == MIS_C[i], $sformatf("mission %0d: got %h", i, r_out));
      check(cyc == 16, $sformatf("mission %0d latency %0d cycles after start cycle", i, cyc));
    end

    // SELF_TEST with intermediate signatures
    mode = MODE_SELF_TEST; din = 64'h9a1de24edab871d5; key = '0; diag = 1'b1; start = 1'b1;
    n = 0;
    @(negedge clk);
    start = 1'b0; din = '0;
    forever begin
      if (rout_upd) begin
        check(r_out == SELF_SIG[n], $sformatf("self-test signature %0d: got %h", n, r_out));
        n++;
      end
      if (done) break;
      @(negedge clk);
    end
    check(n == 25, $sformatf("%0d signatures seen", n));
    check(r_out == SELF_SIG[24], "final self-test signature");
    diag = 1'b0;

    // TPG: one pattern per cycle
    mode = MODE_TPG; din = 64'h93b3a3d9a44f576a; start = 1'b1;
    n = 0;
    @(negedge clk);
    start = 1'b0;
    while (n < 53) begin
      if (rout_upd) begin
        check(r_out == TPG_PAT[n], $sformatf("pattern %0d: got %h", n, r_out));
        n++;
      end else if (n > 0) begin
        check(1'b0, "pattern missing in a cycle");
      end
      stop = (n == 52);
      @(negedge clk);
    end
    stop = 1'b0;
    check(!busy, "TPG stopped");

    // TPG with diag: one pattern per encryption
    mode = MODE_TPG; din = 64'h93b3a3d9a44f576a; start = 1'b1; diag = 1'b1;
    n = 0;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (n < 3) begin
      cyc++;
      if (rout_upd) begin
        check(r_out == TPG_PAT[16*n + 15], $sformatf("encryption pattern %0d: got %h", n, r_out));
        check(cyc == 16*(n + 1) + 1, $sformatf("encryption pattern %0d at cycle %0d", n, cyc));
        n++;
      end
      stop = (n == 3);
      @(negedge clk);
    end
    stop = 1'b0; diag = 1'b0;
    check(!busy, "TPG stopped");

    // ORA with gaps in the response stream
    mode = MODE_ORA; start = 1'b1; din = ORA_RESP[0]; din_valid = 1'b1;
    din_last = 1'b0;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (n < 39) begin
      din_valid = ($urandom_range(0, 3) != 0);
      din       = din_valid ? ORA_RESP[n] : ~ORA_RESP[n];
      din_last  = din_valid && (n == 38);
      @(negedge clk);
      if (din_valid) n++;
    end
    din_valid = 1'b0; din_last = 1'b0;
    while (!done) @(negedge clk);
    check(r_out == 64'h191a512db7fc4088, $sformatf("ORA signature: got %h", r_out));

    // Write a new test key into the shadow register: the next self-test must give a
    // different signature.
    key = 64'h852395744b1e943e; test_key_load = 1'b1;
    @(negedge clk);
    test_key_load = 1'b0; key = '0;
    mode = MODE_SELF_TEST; din = 64'h9a1de24edab871d5; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(r_out != SELF_SIG[24], "new test key changes the signature");
    finish();
  end
endmodule
