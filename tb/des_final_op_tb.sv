// des_final_op_tb: half swap followed by IP^-1. Checked on the worked example (the state
// after 16 rounds gives ciphertext 85E813540F0AB405), on random words against a reference
// model, and through the identity final_op(ip(x) with halves swapped) = x.
module des_final_op_tb;
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

  localparam logic [63:0] X [20] = '{
    64'h4fd58dbe7bdc968b,
    64'h24e4e25a15fc899e,
    64'hbfeaa1551a28f7b3,
    64'hbd87a86557b6fb7e,
    64'h7a86f7a243c71b9a,
    64'hb12aa1f6d42fddbb,
    64'h842e7fc229540a6e,
    64'h3488f87605e999f3,
    64'hf3b7a50df373ca53,
    64'h5c9bcf35873be078,
    64'hb0a844e52587be6b,
    64'hea0575438b0d590b,
    64'hc215a82a06ec41ad,
    64'h4c4f9b0687322e25,
    64'ha49636a2fa7f0eab,
    64'h174c77a2dd02de92,
    64'hd86f40f6b239f3c7,
    64'h84b5a81842d87208,
    64'he883a1d45de00997,
    64'h5b0ee76f2ac34446
  };
  localparam logic [63:0] Y [20] = '{
    64'he9c7bedb7642f03f,
    64'h440bf11753b83a3d,
    64'h8fe586f0c7bd26ad,
    64'he675f38dd59f47bc,
    64'h5cff38858d8ad83b,
    64'h9d335635c7bb46cf,
    64'h482fb96d18691b82,
    64'h5503c23c8f9b1b3d,
    64'hfbf52a06f1f8d5ec,
    64'h7a78cab9b3178d6c,
    64'h53155e2584e70bb6,
    64'h7fc338d50c888ec0,
    64'h25c2711b201b9499,
    64'h697ee7ac1815a048,
    64'h117fbc5578db50e3,
    64'hc89fec64cd0a6c47,
    64'h356723b0d676afc7,
    64'h2044a01b362c54b8,
    64'h6d2143c44398d2bb,
    64'h9afb2fe2804a9f18
  };

  logic [63:0] data_in, data_out;

  des_final_op dut (.data_in, .data_out);

  initial begin
    data_in = 64'h434232340a4cd995;
    #1;
    check(data_out == 64'h85e813540f0ab405, "worked example");
    for (int i = 0; i < 20; i++) begin
      data_in = X[i];
      #1;
      check(data_out == Y[i], $sformatf("vector %0d", i));
    end
    data_in = 64'h0f550f5533ff3300;
    #1;
    check(data_out == 64'hfedcba9876543210, "inverse of IP");
    finish();
  end
endmodule
