// selftest_length_tb: the self-test workloads at the lengths given by the coupon-collector
// bound rather than the defaults: a DES self-test of 28 and of 34 encryptions (440 and 540
// patterns for the 64 inputs of a DES S-box) and an AES self-test of 240 and of 260
// encryptions (2400 and 2593 patterns rounded up, for the 256 inputs of an AES S-box).
// Each length is a separate instance of crypto_bist_top with its SELFTEST_ENC parameters
// set; both cores of each instance run at once. The signatures are compared with an
// independent reference model and the run length with SELFTEST_ENC x rounds + 1 cycles.
module selftest_length_tb;
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
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end

  localparam int AES_N [2] = '{240, 260};
  localparam int DES_N [2] = '{28, 34};
  localparam logic [127:0] AES_SIG [2] = '{128'h18aedb3f23b7d925b7b06160f93fe863, 128'h0ca3b0d83213622e89ee47eaf7222948};
  localparam logic [63:0]  DES_SIG [2] = '{64'hf2715aae68bea466, 64'h106bb480f7d178ba};

  logic rst_n;
  bist_mode_e mode;
  logic start;
  logic [1:0] aes_done, des_done, aes_busy, des_busy;
  logic [127:0] aes_r_out [2];
  logic [63:0]  des_r_out [2];

  for (genvar g = 0; g < 2; g++) begin : g_len
    crypto_bist_top #(.AES_SELFTEST_ENC(AES_N[g]), .DES_SELFTEST_ENC(DES_N[g])) dut (
      .clk, .rst_n,
      .aes_mode(mode), .aes_start(start), .aes_stop(1'b0), .aes_diag(1'b0),
      .aes_din(128'h00112233445566778899aabbccddeeff), .aes_din_valid(1'b0), .aes_din_last(1'b0),
      .aes_key('0), .aes_test_key_load(1'b0),
      .aes_r_out(aes_r_out[g]), .aes_rout_upd(), .aes_busy(aes_busy[g]), .aes_done(aes_done[g]),
      .des_mode(mode), .des_start(start), .des_stop(1'b0), .des_diag(1'b0),
      .des_din(64'h0123456789abcdef), .des_din_valid(1'b0), .des_din_last(1'b0),
      .des_key('0), .des_test_key_load(1'b0),
      .des_r_out(des_r_out[g]), .des_rout_upd(), .des_busy(des_busy[g]), .des_done(des_done[g])
    );
  end

  initial begin
    int cyc;
    bit [1:0] a_seen, d_seen;
    rst_n = 1'b0; start = 1'b0; mode = MODE_SELF_TEST;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    a_seen = '0; d_seen = '0;
    while (!(&a_seen && &d_seen)) begin
      for (int g = 0; g < 2; g++) begin
        if (aes_done[g]) begin
          a_seen[g] = 1'b1;
          check(aes_r_out[g] == AES_SIG[g], $sformatf("AES signature after %0d encryptions", AES_N[g]));
          check(cyc == 10 * AES_N[g] + 1, $sformatf("AES %0d encryptions took %0d cycles", AES_N[g], cyc));
        end
        if (des_done[g]) begin
          d_seen[g] = 1'b1;
          check(des_r_out[g] == DES_SIG[g], $sformatf("DES signature after %0d encryptions", DES_N[g]));
          check(cyc == 16 * DES_N[g] + 1, $sformatf("DES %0d encryptions took %0d cycles", DES_N[g], cyc));
        end
      end
      @(negedge clk);
      cyc++;
    end
    check(aes_busy == '0 && des_busy == '0, "all idle");
    finish();
  end
endmodule
