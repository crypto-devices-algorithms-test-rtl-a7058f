// shadow_key_reg_tb: the test-key register must come out of reset holding TEST_KEY,
// ignore key_in while load is low, and take key_in on a clock edge with load high.
module shadow_key_reg_tb;
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

  localparam logic [63:0] TK = 64'h0e329232ea6d0d73;
  logic        rst_n, load;
  logic [63:0] key_in, key_out, model;

  shadow_key_reg #(.W(64), .TEST_KEY(TK)) dut (.clk, .rst_n, .load, .key_in, .key_out);

  initial begin
    rst_n = 1'b0; load = 1'b0; key_in = 64'hffff_ffff_ffff_ffff;
    repeat (2) @(negedge clk);
    check(key_out == TK, "reset value is the test key");
    rst_n = 1'b1;
    model = TK;
    for (int i = 0; i < 40; i++) begin
      key_in = {$urandom, $urandom};
      load   = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (load) model = key_in;
      @(negedge clk);
      check(key_out == model, $sformatf("cycle %0d", i));
    end
    finish();
  end
endmodule
