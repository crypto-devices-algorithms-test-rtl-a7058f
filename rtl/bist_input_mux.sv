// bist_input_mux: the grey-shaded input logic of the crypto-core plus its Select mux.
// The data input (plaintext, or a circuit response in ORA mode) is gated by SA and XORed
// with the round register R; Select chooses between that sum (1) and the Initial Op
// result (0). With SA = 0 the XOR passes R unchanged, as in the mission, SELF_TEST and
// TPG modes; with SA = 1 (ORA) each response is folded into the running state.
// The gate is modelled as an AND with SA, which is what makes SA = 0 transparent.
module bist_input_mux #(
  parameter int unsigned W = 128
) (
  input  logic         select,
  input  logic         sa,
  input  logic [W-1:0] din,
  input  logic [W-1:0] r,
  input  logic [W-1:0] init_op,
  output logic [W-1:0] round_in
);
  always_comb round_in = select ? (r ^ (din & {W{sa}})) : init_op;
endmodule
