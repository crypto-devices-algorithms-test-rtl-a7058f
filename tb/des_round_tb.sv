// des_round_tb: checks des_round on the first round of the classic worked DES example
// (key 133457799BBCDFF1, plaintext 0123456789ABCDEF) and on 24 random state/round-key
// pairs computed with an independent reference model.
module des_round_tb;
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

  localparam logic [63:0] S_IN [24] = '{
    64'haec6f0245bd86d40,
    64'h616499c9e25a7605,
    64'h3b1287fff52ddf5d,
    64'h153e7c2a26a2c0bd,
    64'h26bb7dbd2d1c9af0,
    64'ha8948c893b618676,
    64'h0316909e3bbbe9ea,
    64'hd4c28c2e7c26847f,
    64'h2eae05cf96d0cc5f,
    64'h482c9cbc43435cc5,
    64'h254b0c4e010c4759,
    64'h88daf4016b4013ef,
    64'h9c1caaf75e8766ed,
    64'h519088f590fbbd11,
    64'h20203626f3fe39c0,
    64'hdbf4a8b2b0c4312d,
    64'hf341e07a83f73f16,
    64'ha7abe1c29e1a8ef4,
    64'hbd628881ad1b72db,
    64'h74e69a5d0dd27a65,
    64'hdef88334e647cb8f,
    64'hf3aed0b6c7ac1491,
    64'hae3a2b7fdfe01893,
    64'h8f2c6ec8cc4169a3
  };
  localparam logic [47:0] K_IN [24] = '{
    48'h65e76472f1a3,
    48'h64e566237a04,
    48'h7b451a81682c,
    48'h6683a260cd0b,
    48'h30cb0fef7928,
    48'hfc13113db17d,
    48'h70cc3571810a,
    48'h1c24298cb3a5,
    48'h99c9570dc195,
    48'h1a350d75985d,
    48'h9118000f49c8,
    48'h895f26b94c7f,
    48'hf2ee19f9919c,
    48'h9d1d5d158a2f,
    48'h1200068739fa,
    48'h353cdfd43f37,
    48'h60509d33a01c,
    48'ha2682607679d,
    48'hf4994093f6de,
    48'h9a2e58ee8571,
    48'h79615d39d0a8,
    48'h1d871f7296ab,
    48'h7cf2d953ee26,
    48'hfa52fe3bfada
  };
  localparam logic [63:0] S_OUT [24] = '{
    64'h5bd86d40ca529f65,
    64'he25a7605119cf8e8,
    64'hf52ddf5dd0391fbe,
    64'h26a2c0bd4f75c28b,
    64'h2d1c9af025618e49,
    64'h3b61867696fd8f32,
    64'h3bbbe9eab6044d65,
    64'h7c26847f2f756dc5,
    64'h96d0cc5f74c7d6af,
    64'h43435cc5b0f3a3fb,
    64'h010c4759918ca585,
    64'h6b4013efb8f5b59a,
    64'h5e8766edbea89d94,
    64'h90fbbd11ec7341a9,
    64'hf3fe39c051f17b9c,
    64'hb0c4312df6fabd5a,
    64'h83f73f16ea76bbde,
    64'h9e1a8ef42ef9d0ce,
    64'had1b72dbbc13bb6d,
    64'h0dd27a6571e33631,
    64'he647cb8ffd898332,
    64'hc7ac149100354499,
    64'hdfe0189329bac5e3,
    64'hcc4169a3d235e294
  };

  logic [63:0] state_in, state_out;
  logic [47:0] round_key;

  des_round dut (.state_in, .round_key, .state_out);

  initial begin
    state_in  = 64'hcc00ccfff0aaf0aa;
    round_key = 48'h1b02effc7072;
    #1;
    check(state_out == 64'hf0aaf0aaef4a6544, "worked example round 1");
    check(state_out[63:32] == state_in[31:0], "left half takes old right half");
    for (int i = 0; i < 24; i++) begin
      state_in  = S_IN[i];
      round_key = K_IN[i];
      #1;
      check(state_out == S_OUT[i], $sformatf("vector %0d: got %h", i, state_out));
    end
    finish();
  end
endmodule
