// shadow_key_reg: the register that holds the key used in the test modes (SELF_TEST,
// TPG, ORA), kept apart from the mission key. The test scheme calls for such a register for
// security and a test key common to all circuits, so that one fault simulation serves
// every chip. Here it resets to the TEST_KEY parameter and can be rewritten through
// key_in with load; it has no read path other than the crypto-core's key selection.
// The write port and the reset value are this design's choices.
module shadow_key_reg #(
  parameter int unsigned    W        = 128,
  parameter logic [W-1:0]   TEST_KEY = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] key_in,
  output logic [W-1:0] key_out
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    key_out <= TEST_KEY;
    else if (load) key_out <= key_in;
endmodule
