// bist_ctrl_tb: drives the controller (NR = 4 rounds, 3 self-test encryptions, key
// inversion on) through one run of every mode and checks, cycle by cycle, Select, SA,
// the advance enable, the round index, key_inv, test_key, Write-out and done against
// the sequences worked out by hand from the mode descriptions:
//   MISSION    Select 0 then 1,1,1; Write-out on cycle 4; done on cycle 5.
//   SELF_TEST  12 rounds; key_inv in rounds 8..11; with diag, Write-out after rounds
//              4 and 8 and the final write on cycle 12.
//   TPG        Write-out on every cycle after the first, until stop; with diag, only
//              after rounds 4 and 8.
//   ORA        SA 1 after the first cycle; no advance while din_valid is low; the cycle
//              after din_last writes R-out.
module bist_ctrl_tb;
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
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end

  bist_mode_e mode;
  logic rst_n, start, stop, diag, din_valid, din_last;
  logic select, sa, adv, first, last_rnd, key_inv, test_key, write_out, rout_upd, busy, done;
  logic [3:0] rnd;

  bist_ctrl #(.NR(4), .SELFTEST_ENC(3), .KEY_INV_LAST(1'b1)) dut (
    .clk, .rst_n, .mode, .start, .stop, .diag, .din_valid, .din_last,
    .select, .sa, .adv, .first, .rnd, .last_rnd, .key_inv, .test_key, .write_out,
    .rout_upd, .busy, .done
  );

  // Expected values of one cycle; 'x' fields are checked only when the flag is set.
  task automatic expect_cycle(input string tag, input int cyc, input bit e_sel, input bit e_sa,
                              input bit e_adv, input int e_rnd, input bit e_kinv,
                              input bit e_wr, input bit e_done);
    #1;
    check(select == e_sel,  $sformatf("%s c%0d select", tag, cyc));
    check(sa == e_sa,       $sformatf("%s c%0d sa", tag, cyc));
    check(adv == e_adv,     $sformatf("%s c%0d adv", tag, cyc));
    if (e_adv) check(int'(rnd) == e_rnd, $sformatf("%s c%0d rnd=%0d", tag, cyc, rnd));
    check(key_inv == e_kinv, $sformatf("%s c%0d key_inv", tag, cyc));
    check(write_out == e_wr, $sformatf("%s c%0d write_out", tag, cyc));
    check(done == e_done,   $sformatf("%s c%0d done", tag, cyc));
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; stop = 1'b0; diag = 1'b0; din_valid = 1'b0; din_last = 1'b0;
    mode = MODE_MISSION;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // MISSION: 4 rounds, write, done
    mode = MODE_MISSION; start = 1'b1;
    #1 check(test_key == 1'b0, "mission uses the mission key");
    for (int c = 0; c < 4; c++) expect_cycle("mission", c, c != 0, 0, 1, c, 0, 0, 0);
    expect_cycle("mission", 4, 1, 0, 0, 0, 0, 1, 0);
    check(busy == 1'b0 && done == 1'b1, "mission done after write");
    @(negedge clk);

    // SELF_TEST with diag: 12 rounds, intermediate writes after rounds 4 and 8
    mode = MODE_SELF_TEST; start = 1'b1; diag = 1'b1;
    #1 check(test_key == 1'b1, "self-test uses the test key");
    for (int c = 0; c < 12; c++)
      expect_cycle("self", c, c != 0, 0, 1, c % 4, c >= 8, (c == 4) || (c == 8), 0);
    expect_cycle("self", 12, 1, 0, 0, 0, 0, 1, 0);
    check(done == 1'b1, "self-test done");
    diag = 1'b0;
    @(negedge clk);

    // TPG: run 7 cycles, then stop
    mode = MODE_TPG; start = 1'b1;
    for (int c = 0; c < 7; c++) begin
      stop = (c == 6);
      expect_cycle("tpg", c, c != 0, 0, 1, c % 4, 0, c != 0, 0);
    end
    stop = 1'b0;
    #1 check(done == 1'b1 && busy == 1'b0, "tpg stopped");
    @(negedge clk);

    // TPG with diag: one pattern per encryption, after rounds 4 and 8
    mode = MODE_TPG; start = 1'b1; diag = 1'b1;
    for (int c = 0; c < 10; c++) begin
      stop = (c == 9);
      expect_cycle("tpg/enc", c, c != 0, 0, 1, c % 4, 0, (c == 4) || (c == 8), 0);
    end
    stop = 1'b0; diag = 1'b0;
    #1 check(done == 1'b1 && busy == 1'b0, "tpg/enc stopped");
    @(negedge clk);

    // ORA: responses with a gap, last one at cycle 6
    mode = MODE_ORA; start = 1'b1; din_valid = 1'b1;
    begin
      int r;
      r = 0;
      for (int c = 0; c < 7; c++) begin
        din_valid = (c != 2) && (c != 3);
        din_last  = (c == 6);
        expect_cycle("ora", c, c != 0, c != 0, din_valid, r % 4, 0, 0, 0);
        if (din_valid) r++;
      end
    end
    din_valid = 1'b0; din_last = 1'b0;
    expect_cycle("ora", 7, 1, 0, 0, 0, 0, 1, 0);
    check(done == 1'b1, "ora done");
    @(negedge clk);
    check(busy == 1'b0, "idle again");
    finish();
  end
endmodule
