// des_key_gen_tb: runs three 16-round key schedules (worked-example key, the same key
// again without reload, which must repeat since the rotations total 28, and a random
// key loaded at round 0) and compares every round key with a reference model.
// Round key 1 of the worked example is 1B02EFFC7072. Also checks the hold on en low.
module des_key_gen_tb;
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
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
  localparam logic [47:0] KS [48] = '{
    48'h1b02effc7072,
    48'h79aed9dbc9e5,
    48'h55fc8a42cf99,
    48'h72add6db351d,
    48'h7cec07eb53a8,
    48'h63a53e507b2f,
    48'hec84b7f618bc,
    48'hf78a3ac13bfb,
    48'he0dbebede781,
    48'hb1f347ba464f,
    48'h215fd3ded386,
    48'h7571f59467e9,
    48'h97c5d1faba41,
    48'h5f43b7f2e73a,
    48'hbf918d3d3f0a,
    48'hcb3d8b0e17f5,
    48'h1b02effc7072,
    48'h79aed9dbc9e5,
    48'h55fc8a42cf99,
    48'h72add6db351d,
    48'h7cec07eb53a8,
    48'h63a53e507b2f,
    48'hec84b7f618bc,
    48'hf78a3ac13bfb,
    48'he0dbebede781,
    48'hb1f347ba464f,
    48'h215fd3ded386,
    48'h7571f59467e9,
    48'h97c5d1faba41,
    48'h5f43b7f2e73a,
    48'hbf918d3d3f0a,
    48'hcb3d8b0e17f5,
    48'hb1fe4cb697ac,
    48'hb43c9e0f74ce,
    48'h7626746cf1e5,
    48'hcedc34a2ccef,
    48'hcea37ece9f93,
    48'haed62b9f4779,
    48'heb1b6a5bdb40,
    48'ha8fad9d0e53c,
    48'hbd50d695dcdd,
    48'h364bdc0bb6f1,
    48'h1e7135bbed25,
    48'h8f0d7d2a4f96,
    48'hcf62addd6197,
    48'h9b9fa8e742c9,
    48'hd83aebd2b34f,
    48'h39aab67d851f
  };

  logic        rst_n, en, load;
  logic [63:0] key_in;
  logic [47:0] round_key;
  logic [3:0]  rnd;

  des_key_gen dut (.clk, .rst_n, .en, .load, .key_in, .rnd, .round_key);

  initial begin
    rst_n = 1'b0; en = 1'b0; load = 1'b0; key_in = '0; rnd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 48; t++) begin
      key_in = (t < 32) ? 64'h133457799bbcdff1 : 64'h7afb2c68774b15d7;
      load   = (t == 0) || (t == 32);
      rnd    = 4'(t % 16);
      en     = 1'b1;
      #1;
      check(round_key == KS[t], $sformatf("round key %0d: got %h", t, round_key));
      @(negedge clk);
      if (t == 5) begin
        en = 1'b0; load = 1'b0;
        repeat (3) @(negedge clk);
      end
    end
    finish();
  end
endmodule
