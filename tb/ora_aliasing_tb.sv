// ora_aliasing_tb: the response-analyser workload. Both cores of crypto_bist_top, at
// their default parameters, compact a sequence of L = 200 circuit responses in ORA mode
// (AES: 128-bit responses, DES: 64-bit). The fault-free responses come from an xorshift64
// generator and their signatures are compared with an independent reference model.
// Then 300 faulty sequences are compacted, each with 1 to 4 responses corrupted at random
// positions by random non-zero error words. An m-bit signature should miss such an error
// sequence with probability about 2^-m, so every faulty signature must differ from the
// fault-free one. A single corrupted response can never alias: the rounds are bijective.
// Responses arrive with random idle cycles (din_valid low) to exercise the ORA stall.
module ora_aliasing_tb;
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

  localparam int L      = 200;
  localparam int TRIALS = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((TRIALS + 2) * L * 3) @(posedge clk);
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

  logic [127:0] ra [L];
  logic [63:0]  rd [L];
  logic [127:0] ea [L];
  logic [63:0]  ed [L];

  function automatic logic [63:0] xorshift(input logic [63:0] x);
    x ^= x << 13;
    x ^= x >> 7;
    x ^= x << 17;
    return x;
  endfunction

  // Compacts ra^ea on the AES core and rd^ed on the DES core, both in parallel.
  task automatic compact(output logic [127:0] sig_a, output logic [63:0] sig_d);
    int i;
    aes_mode = MODE_ORA; des_mode = MODE_ORA;
    i = 0;
    while (i < L) begin
      bit v;
      v = (i == 0) || ($urandom_range(0, 4) != 0);
      aes_start = (i == 0); des_start = (i == 0);
      aes_din_valid = v; des_din_valid = v;
      aes_din_last = v && (i == L - 1); des_din_last = v && (i == L - 1);
      aes_din = ra[i] ^ ea[i]; des_din = rd[i] ^ ed[i];
      @(negedge clk);
      if (v) i++;
    end
    {aes_start, des_start, aes_din_valid, des_din_valid, aes_din_last, des_din_last} = '0;
    while (!(aes_done && des_done)) begin
      check(!(aes_done ^ des_done), "both cores finish together");
      @(negedge clk);
    end
    sig_a = aes_r_out;
    sig_d = des_r_out;
  endtask

  initial begin
    logic [63:0]  x;
    logic [127:0] good_a, sig_a;
    logic [63:0]  good_d, sig_d;
    int aliased_a, aliased_d;
    rst_n = 1'b0;
    {aes_start, aes_stop, aes_diag, aes_din_valid, aes_din_last, aes_test_key_load} = '0;
    {des_start, des_stop, des_diag, des_din_valid, des_din_last, des_test_key_load} = '0;
    aes_mode = MODE_ORA; des_mode = MODE_ORA;
    aes_din = '0; aes_key = '0; des_din = '0; des_key = '0;
    x = 64'h9e3779b97f4a7c15;
    for (int i = 0; i < L; i++) begin
      x = xorshift(x); ra[i][127:64] = x;
      x = xorshift(x); ra[i][63:0]   = x;
      x = xorshift(x); rd[i]         = x;
      ea[i] = '0; ed[i] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    compact(good_a, good_d);
    check(good_a == 128'hda91e0ecbed8565aaf6789fec6219bd9, $sformatf("fault-free AES signature %h", good_a));
    check(good_d == 64'hba3a7094c6ba9c8d, $sformatf("fault-free DES signature %h", good_d));

    aliased_a = 0; aliased_d = 0;
    for (int t = 0; t < TRIALS; t++) begin
      int k;
      for (int i = 0; i < L; i++) begin ea[i] = '0; ed[i] = '0; end
      k = 1 + (t % 4);
      for (int j = 0; j < k; j++) begin
        int pos;
        pos = $urandom_range(0, L - 1);
        do ea[pos] = {$urandom, $urandom, $urandom, $urandom}; while (ea[pos] == '0);
        do ed[pos] = {$urandom, $urandom}; while (ed[pos] == '0);
      end
      compact(sig_a, sig_d);
      check(sig_a != good_a, $sformatf("trial %0d: AES signature aliased", t));
      check(sig_d != good_d, $sformatf("trial %0d: DES signature aliased", t));
      if (sig_a == good_a) aliased_a++;
      if (sig_d == good_d) aliased_d++;
    end
    $display("%0d faulty sequences: %0d aliased on AES, %0d on DES", TRIALS, aliased_a, aliased_d);
    finish();
  end
endmodule
