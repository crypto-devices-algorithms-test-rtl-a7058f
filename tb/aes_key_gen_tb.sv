// aes_key_gen_tb: loads the FIPS 197 Appendix A.1 cipher key and checks the ten round
// keys, one per cycle (the last one is the standard's w[40..43]). It then lets the
// generator run on without a reload, which must give the round keys of the tenth round
// key taken as a new cipher key, and checks that en low holds the register.
module aes_key_gen_tb;
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
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
  localparam logic [127:0] KS [20] = '{
    128'ha0fafe1788542cb123a339392a6c7605,
    128'hf2c295f27a96b9435935807a7359f67f,
    128'h3d80477d4716fe3e1e237e446d7a883b,
    128'hef44a541a8525b7fb671253bdb0bad00,
    128'hd4d1c6f87c839d87caf2b8bc11f915bc,
    128'h6d88a37a110b3efddbf98641ca0093fd,
    128'h4e54f70e5f5fc9f384a64fb24ea6dc4f,
    128'head27321b58dbad2312bf5607f8d292f,
    128'hac7766f319fadc2128d12941575c006e,
    128'hd014f9a8c9ee2589e13f0cc8b6630ca6,
    128'h2aeadde6e304f86f023bf4a7b458f801,
    128'h42aba16ba1af5904a394ada317cc55a2,
    128'h0d579b9bacf8c29f0f6c6f3c18a03a9e,
    128'he5d79036492f52a946433d955ee3070b,
    128'he412bb6ead3de9c7eb7ed452b59dd359,
    128'h9a7470bb3749997cdc374d2e69aa9e77,
    128'h767f854241361c3e9d015110f4abcf67,
    128'h94f500fdd5c31cc348c24dd3bc6982b4,
    128'h76e68d98a325915bebe7dc88578e5e3c,
    128'h59be66c3fa9bf798117c2b1046f2752c
  };

  logic         rst_n, en, load;
  logic [127:0] key_in, round_key;
  logic [3:0]   rnd;

  aes_key_gen dut (.clk, .rst_n, .en, .load, .key_in, .rnd, .round_key);

  initial begin
    rst_n = 1'b0; en = 1'b0; load = 1'b0; key_in = '0; rnd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    key_in = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int t = 0; t < 20; t++) begin
      load = (t == 0);
      rnd  = 4'(t % 10);
      en   = 1'b1;
      #1;
      check(round_key == KS[t], $sformatf("round key %0d: got %h", t, round_key));
      @(negedge clk);
      if (t == 12) begin
        // hold for two cycles: the next key must not move
        en = 1'b0; load = 1'b0; rnd = 4'd3;
        @(negedge clk);
        @(negedge clk);
        #1;
        check(round_key == KS[13], "key held while en is low");
      end
    end
    finish();
  end
endmodule
