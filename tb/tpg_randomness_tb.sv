// tpg_randomness_tb: the pattern-generator workload. Both cores of crypto_bist_top, at
// their default parameters, run in TPG mode (one pattern per round) for 1,500,000
// cycles, the stream length used to judge the randomness of round-by-round cipher
// output. On the fly the testbench applies two tests of the NIST SP 800-22 suite at
// significance 0.01:
//   frequency (monobit): |#ones - #zeros| <= 2.5758 * sqrt(n), applied to the rightmost
//     AES bit, to each of the 128 AES bit streams (at least 124 must pass, the lower
//     edge of the NIST proportion interval for 128 sequences), to the stream of
//     concatenated 128-bit AES vectors, and to the 32 DES bit streams of the round's
//     right half (r_out[0], r_out[2], ..., r_out[62]; at least 30 must pass);
//   runs: on the rightmost AES bit, erfc argument |V - 2n p(1-p)| / (2 sqrt(2n) p(1-p))
//     must not exceed 1.8214.
// It also compares patterns 10,000 and 1,500,000 of both cores, and the exact number of
// ones in the rightmost AES bit stream, with an independent reference model.
module tpg_randomness_tb;
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

  localparam int N = 1_500_000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end

  bist_mode_e aes_mode, des_mode;
  logic rst_n;
  logic aes_start, aes_stop, aes_diag, aes_din_valid, aes_din_last, aes_test_key_load;
  logic des_start, des_stop, des_diag, des_din_valid, des_din_last, des_test_key_load;
  logic aes_rout_upd, aes_busy, aes_done, des_rout_upd, des_busy, des_done;
  logic [127:0] aes_din, aes_key, aes_r_out;
  logic [63:0]  des_din, des_key, des_r_out;

  crypto_bist_top dut (.*);

  int unsigned aes_ones [128];
  int unsigned des_ones [32];
  longint unsigned aes_ones_all;
  int unsigned runs;
  logic prev_bit;

  function automatic bit monobit_ok(input longint unsigned ones, input longint unsigned n);
    real s;
    s = (2.0 * real'(ones)) - real'(n);
    if (s < 0.0) s = -s;
    return s <= 2.5758 * $sqrt(real'(n));
  endfunction

  initial begin
    int n, pass_aes, pass_des;
    real pi, dev;
    rst_n = 1'b0;
    {aes_start, aes_stop, aes_diag, aes_din_valid, aes_din_last, aes_test_key_load} = '0;
    {des_start, des_stop, des_diag, des_din_valid, des_din_last, des_test_key_load} = '0;
    aes_mode = MODE_TPG; des_mode = MODE_TPG;
    aes_din = 128'h0123456789abcdeffedcba9876543210; aes_key = '0;
    des_din = 64'h0f1e2d3c4b5a6978; des_key = '0;
    foreach (aes_ones[i]) aes_ones[i] = 0;
    foreach (des_ones[i]) des_ones[i] = 0;
    aes_ones_all = 0; runs = 0; prev_bit = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    aes_start = 1'b1; des_start = 1'b1;
    @(negedge clk);
    aes_start = 1'b0; des_start = 1'b0;
    n = 0;
    while (n < N) begin
      if (aes_rout_upd) begin
        if (!des_rout_upd) check(1'b0, "both generators deliver a pattern each cycle");
        for (int b = 0; b < 128; b++) aes_ones[b] += 32'(aes_r_out[b]);
        aes_ones_all += 64'($countones(aes_r_out));
        for (int b = 0; b < 32; b++) des_ones[b] += 32'(des_r_out[2*b]);
        if (n == 0 || aes_r_out[0] != prev_bit) runs++;
        prev_bit = aes_r_out[0];
        n++;
        if (n == 10_000) begin
          check(aes_r_out == 128'hce5c60b6531310633d4839c7ae802641, "AES pattern 10,000");
          check(des_r_out == 64'h68d04ac51c0c1877, "DES pattern 10,000");
        end
        if (n == N) begin
          check(aes_r_out == 128'h99867f8037d9052bebb497d18e7822bb, "AES pattern 1,500,000");
          check(des_r_out == 64'hebceb63789274703, "DES pattern 1,500,000");
          aes_stop = 1'b1; des_stop = 1'b1;
        end
      end
      @(negedge clk);
    end
    aes_stop = 1'b0; des_stop = 1'b0;
    @(negedge clk);
    check(!aes_busy && !des_busy, "generators stopped");

    check(aes_ones[0] == 750872, $sformatf("ones in the rightmost AES bit stream: %0d", aes_ones[0]));
    check(aes_ones_all == 64'd95993808, "ones in the AES vector stream");
    check(monobit_ok(64'(aes_ones[0]), 64'(N)), "frequency test, rightmost AES bit");
    check(monobit_ok(aes_ones_all, 64'(N) * 128), "frequency test, AES vector stream");
    pass_aes = 0;
    for (int b = 0; b < 128; b++) if (monobit_ok(64'(aes_ones[b]), 64'(N))) pass_aes++;
    pass_des = 0;
    for (int b = 0; b < 32; b++) if (monobit_ok(64'(des_ones[b]), 64'(N))) pass_des++;
    check(pass_aes >= 124, $sformatf("AES bit streams passing the frequency test: %0d of 128", pass_aes));
    check(pass_des >= 30, $sformatf("DES right-half streams passing the frequency test: %0d of 32", pass_des));
    pi  = real'(aes_ones[0]) / real'(N);
    dev = real'(runs) - 2.0 * real'(N) * pi * (1.0 - pi);
    if (dev < 0.0) dev = -dev;
    check(dev / (2.0 * $sqrt(2.0 * real'(N)) * pi * (1.0 - pi)) <= 1.8214,
          $sformatf("runs test, rightmost AES bit: %0d runs", runs));
    $display("frequency test passed by %0d of 128 AES and %0d of 32 DES streams; %0d runs",
             pass_aes, pass_des, runs);
    finish();
  end
endmodule
