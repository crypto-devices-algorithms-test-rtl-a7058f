// aes_initial_op_tb: the initial AddRoundKey must be the bitwise XOR of data and key;
// checked on the FIPS 197 Appendix B input and on random words (expected value built
// bit by bit from the definition of XOR).
module aes_initial_op_tb;
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

  logic [127:0] data_in, key, data_out, exp;

  aes_initial_op dut (.data_in, .key, .data_out);

  initial begin
    data_in = 128'h3243f6a8885a308d313198a2e0370734;
    key     = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    check(data_out == 128'h193de3bea0f4e22b9ac68d2ae9f84808, "FIPS 197 Appendix B");
    for (int i = 0; i < 50; i++) begin
      data_in = {$urandom, $urandom, $urandom, $urandom};
      key     = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 128; b++) exp[b] = (data_in[b] != key[b]);
      #1;
      check(data_out == exp, "random XOR");
    end
    finish();
  end
endmodule
