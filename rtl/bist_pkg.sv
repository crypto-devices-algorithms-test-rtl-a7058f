// bist_pkg: types shared by the crypto-core test controller and the two crypto-cores.
// A crypto-core runs in one of four modes. MISSION is normal encryption. SELF_TEST
// loops the round on its own output for a fixed number of encryptions and leaves the
// final state (the signature) in R-out. TPG runs the same loop but copies the round
// register to R-out every clock cycle, so R-out is a pseudorandom pattern source. ORA
// XORs one response of an external circuit into the loop each cycle and leaves the
// compacted signature in R-out. The two-bit encoding is this design's own choice.
package bist_pkg;

  typedef enum logic [1:0] {
    MODE_MISSION   = 2'd0,
    MODE_SELF_TEST = 2'd1,
    MODE_TPG       = 2'd2,
    MODE_ORA       = 2'd3
  } bist_mode_e;

  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,  // waiting for start
    ST_RUN   = 2'd1,  // rounds looping through R
    ST_WRITE = 2'd2   // final result copied to R-out
  } bist_state_e;

endpackage
