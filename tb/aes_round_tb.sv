// aes_round_tb: checks aes_round against the first round of the FIPS 197 Appendix B
// example and against 24 random (state, round key, last) triples whose results were
// computed with an independent reference model of the cipher (every third one a final
// round without MixColumns).
module aes_round_tb;
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

  localparam logic [127:0] S_IN [24] = '{
    128'h6513270e269e0d37f2a74de452e6b438,
    128'hd23f0824128b2f330c5c7fd0a6a3a450,
    128'h9531985d5d9dc9f81818e811892f902b,
    128'h36f675cc81e74ef5e8e25d940ed90475,
    128'h6b0d549b6f03675a1600a35a099950d8,
    128'h8d116ece1738f7d93d9c172411e20b8f,
    128'h90c192cfd3ac94af0f21ddb66cad4a26,
    128'ha170b33839263059f28c105d1fb17c23,
    128'h0fd630f1f29d0da9953f48f1a09f76b5,
    128'h0cb1e29c658cda1495e60af593bd04cf,
    128'h8e81973e0becd7b03898d190f9ebdacc,
    128'h6b4cb2424a23d5962217beaddbc496cb,
    128'h922766581e27a1c08a6a63ec24ede6a4,
    128'hae97ba94d0eda82f8f6d05584ef8aa38,
    128'h923a736994e3bf911a61dbe22e44158b,
    128'h18f135d25f557203301850c5a38fd547,
    128'h907a70c31012f037b64ce4228c38fb29,
    128'h7f15052434b9b5df9e7769b10f4205b4,
    128'hc6f877186d76b07e881ed162ae2eb154,
    128'hec66a78795e761d17731af10506bf2ef,
    128'h3f98e2774cbd87ad5c90a9587403e430,
    128'hc7a2ea20b2f14c942e05319acb5c7427,
    128'h4cdd2055930d6eaf14f4733f3e7d1bfb,
    128'h57ee05cde00902c77ebff20686734721
  };
  localparam logic [127:0] K_IN [24] = '{
    128'h9be4bcfc49b64a0872e6cc3ababced20,
    128'h830e07bc1e398f1012bd4acefaecbd38,
    128'h5790f82ec1d3fcff2a3af4d46b0a18e8,
    128'h6bf46c697d2caf82eeeacbe226e87555,
    128'h13deef86ab1031d0f646e1f40a097c97,
    128'hca02135e92b1d3f28ede0d7ac3baea9e,
    128'h571242425051c1ccd17f9acae01f5057,
    128'h7f26144b98289fcd59a54a7bb1fee08f,
    128'h119a72d174c9df6acc011cdd9474031b,
    128'h451abd81f1d69ed617f5e837d70820fe,
    128'h10a3d6b2aa05e11ab2715945795e8229,
    128'h4f426dcbb394fb36bb2d420f0f88080b,
    128'hae658f33fe3b890b93f448b3a5aa3c81,
    128'hb774eb5248db40af72158370d269a9a5,
    128'h58d5563dab2cd31ee315128862c33a4f,
    128'h5affb2297631a992f0ce583505c6af07,
    128'h7e62aa0a1df9fd789c6539382b0537e6,
    128'h49952399c4aaeac137dc76fb0f17a300,
    128'h65dc9f503f63af83bd0561e6211c70cf,
    128'h7f1b103cdf1582b0eab477d26415479c,
    128'h66d2287672fdf2022a96fb1a14a0f9e7,
    128'h230d977ee22571594720771f8ca81811,
    128'h8cdb305fdd2e16096e36aab0d1bc52d9,
    128'hfc891b4a6a50df4db4d66a3a47469a4d
  };
  localparam logic [127:0] S_OUT [24] = '{
    128'hf8862ecd7ede0696a4bdfdd7834d9e58,
    128'h34ffc5313689c43f18c48070486d56d4,
    128'h7dce63df8d7e9cb3872fb295cccdc56a,
    128'h178bd99f6f4d196ae741752ba094a49a,
    128'h0b285cb4029f602bcf18d194519762a1,
    128'h9705e32d626ff879a946924f413882a8,
    128'h09e42847dc3d6842af906c78a497ee61,
    128'hf582346c07c5c081b5db97d391dcad19,
    128'h67c42004fdbce7cbe6da180e7482d4ba,
    128'he30f6c94ce4fdbdaaf6286448640abc9,
    128'h1e34a0ffd3e9ef09f3db8ef82aadab5b,
    128'h3064c3d465646b1a2831759fb6a10b9e,
    128'hcdf63a47f8ae40c519cfd0387a87eba2,
    128'hf7808555621e29ebb6f67d7aa77a2f4a,
    128'h17c4ef0089c38ae7410e9d09534332d7,
    128'hf7e4be31a90f090780f6952a0ff375af,
    128'h3295255bc85e7247c24c679389d22421,
    128'h9bc3da14dc5f81f73cf01d65794e76c8,
    128'h407a0fd1b455863c7b546b887ce2e511,
    128'hf9b2c23d473d5faef8650789b2c0a73a,
    128'h13a8fb725b9d9bf760ed638f86e6ee8d,
    128'h470c2aca14ded08c5e357fc56d00bc48,
    128'h3cc2da62f7812f855592511f1c589ba0,
    128'ha78892b78b587ff0475901fc036eed22
  };
  localparam logic [23:0] LAST = 24'b100100100100100100100100;

  logic [127:0] state_in, round_key, state_out;
  logic         last;

  aes_round dut (.state_in, .round_key, .last, .state_out);

  initial begin
    state_in  = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    round_key = 128'ha0fafe1788542cb123a339392a6c7605;
    last      = 1'b0;
    #1;
    check(state_out == 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS 197 round 1");
    for (int i = 0; i < 24; i++) begin
      state_in  = S_IN[i];
      round_key = K_IN[i];
      last      = LAST[i];
      #1;
      check(state_out == S_OUT[i], $sformatf("vector %0d: got %h", i, state_out));
    end
    finish();
  end
endmodule
