// des_sbox_tb: one des_sbox per box S1..S8, all 64 inputs each, compared with the
// FIPS 46 tables held here as one string of nibbles (box b, index 16*row+column at
// nibble 64*b+index). The row/column split of the input is done in the testbench.
module des_sbox_tb;
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

  localparam logic [2047:0] S_REF = 2048'he4d12fb83a6c59070f74e2d1a6cb953841e8d62bfc973a50fc8249175b3ea06df18e6b34972dc05a3d47f28ec01a69b50e7ba4d158c6932fd8a13f42b67c05e9a09e63f51dc7b428d709346a285ecbf1d6498f30b12c5ae71ad069874fe3b52c7de3069a1285bc4fd8b56f03472c1ae9a690cb7df13e52843f06a1d8945bc72e2c417ab6853fd0e9eb2c47d150fa3986421bad78f9c5630eb8c71e2d6f09a453c1af92680d34e75baf427c9561de0b389ef528c3704a1db6432c95fabe17608d4b2ef08d3c975a61d0b7491ae35c2f8614bdc37eaf6805926bd814a7950fe23cd2846fb1a93e50c71fd8a374c56b0e927b419ce206adf35821e74a8dfc90356b;
  logic [5:0] a;
  logic [3:0] y [8];

  for (genvar b = 0; b < 8; b++) begin : g_box
    des_sbox #(.BOX(b)) dut (.a, .y(y[b]));
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      int idx;
      a = 6'(i);
      idx = 16 * ((a[5] ? 2 : 0) + (a[0] ? 1 : 0)) + int'(a[4:1]);
      #1;
      for (int b = 0; b < 8; b++)
        check(y[b] == S_REF[2047 - 4*(64*b + idx) -: 4], $sformatf("S%0d(%0d)", b + 1, i));
    end
    finish();
  end
endmodule
