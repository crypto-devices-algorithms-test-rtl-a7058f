// aes_sbox_tb: applies all 256 byte values to aes_sbox and compares each output with
// the S-box table of FIPS 197 (entry a at bits 2047-8a .. 2040-8a of SB_REF).
module aes_sbox_tb;
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

  localparam logic [2047:0] SB_REF = 2048'h637c777bf26b6fc53001672bfed7ab76ca82c97dfa5947f0add4a2af9ca472c0b7fd9326363ff7cc34a5e5f171d8311504c723c31896059a071280e2eb27b27509832c1a1b6e5aa0523bd6b329e32f8453d100ed20fcb15b6acbbe394a4c58cfd0efaafb434d338545f9027f503c9fa851a3408f929d38f5bcb6da2110fff3d2cd0c13ec5f974417c4a77e3d645d197360814fdc222a908846eeb814de5e0bdbe0323a0a4906245cc2d3ac629195e479e7c8376d8dd54ea96c56f4ea657aae08ba78252e1ca6b4c6e8dd741f4bbd8b8a703eb5664803f60e613557b986c11d9ee1f8981169d98e949b1e87e9ce5528df8ca1890dbfe6426841992d0fb054bb16;
  logic [7:0] a, y;

  aes_sbox dut (.a, .y);

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      check(y == SB_REF[2047-8*i -: 8], $sformatf("sbox(%02x) = %02x", a, y));
    end
    finish();
  end
endmodule
