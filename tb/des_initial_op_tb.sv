// des_initial_op_tb: the initial permutation IP, checked on the worked example
// (0123456789ABCDEF -> CC00CCFFF0AAF0AA) and on random words against a reference model,
// and bit by bit: a single set input bit must land on exactly one output bit.
module des_initial_op_tb;
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
    64'h337a6f97ee18bdd9,
    64'h2eb8b350e627e88c,
    64'h4ad949cdc7e733d3,
    64'hd8f1bb5b67edc5f2,
    64'h35c52674ae0dc1ff,
    64'h58d978e5ddafe2aa,
    64'hac24a7140996d6ce,
    64'haccd19f0e6ad6688,
    64'hf1b30ebf573748f3,
    64'hc5ab1d3e56e8a736,
    64'h8c417cb86bdbc2e0,
    64'h4d4426fe1105f199,
    64'h6102b2c2a5acac19,
    64'h0324db9614e0477e,
    64'h303667a09bbdf0fe,
    64'h56d55715d80c52ed,
    64'hcf798ae2d97a23da,
    64'h706a03022746ac50,
    64'h399898d6af255182,
    64'hed01ce2d241c1bbf
  };

  logic [63:0] data_in, data_out;

  des_initial_op dut (.data_in, .data_out);

  initial begin
    data_in = 64'h0123456789abcdef;
    #1;
    check(data_out == 64'hcc00ccfff0aaf0aa, "worked example");
    for (int i = 0; i < 20; i++) begin
      data_in = X[i];
      #1;
      check(data_out == Y[i], $sformatf("vector %0d", i));
    end
    for (int b = 0; b < 64; b++) begin
      data_in = 64'd1 << b;
      #1;
      check($countones(data_out) == 1, "one-hot stays one-hot");
    end
    finish();
  end
endmodule
