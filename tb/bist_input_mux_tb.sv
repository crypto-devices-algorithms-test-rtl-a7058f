// bist_input_mux_tb: exercises all four (Select, SA) combinations with random words.
// Select = 0 must give the Initial Op word; Select = 1 with SA = 0 must give R itself
// (the XOR is transparent); Select = 1 with SA = 1 must give R XOR din.
module bist_input_mux_tb;
  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        select, sa;
  logic [63:0] din, r, init_op, round_in, exp;

  bist_input_mux #(.W(64)) dut (.select, .sa, .din, .r, .init_op, .round_in);

  initial begin
    for (int i = 0; i < 80; i++) begin
      select  = i[0];
      sa      = i[1];
      din     = {$urandom, $urandom};
      r       = {$urandom, $urandom};
      init_op = {$urandom, $urandom};
      if (!select)  exp = init_op;
      else if (!sa) exp = r;
      else          exp = r ^ din;
      #1;
      check(round_in == exp, $sformatf("select=%0b sa=%0b", select, sa));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
