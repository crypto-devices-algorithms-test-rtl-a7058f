// bist_ctrl: the controller of an iterative crypto-core extended with the test modes.
// It counts rounds (rnd = 0..NR-1) and encryptions and drives the Select and SA
// signals, the key-generation load, the advance enable of R and of the key register,
// and Write-out, the load enable of R-out.
//
// A run starts with start high in IDLE; mode, plaintext/seed and key must be valid in
// that same cycle, which is the first round: Select = 0 loads Initial Op(din). Every
// later round has Select = 1, including the first round of later encryptions in the
// looping modes. Per mode:
//   MISSION    NR rounds, then one WRITE cycle loads R-out; done follows. Ciphertext in
//              R-out NR+1 cycles after start.
//   SELF_TEST  SELFTEST_ENC encryptions back to back (the round fed by its own output),
//              then WRITE. With diag high, R-out also takes the state at the end of every
//              encryption (intermediate signatures, rout_upd strobes).
//   TPG        rounds run until stop; R-out is loaded every cycle after the first round
//              (one pattern per round), or with diag high only at the end of every
//              encryption (one pattern per encryption).
//   ORA        SA = 1 after the first round, so each cycle with din_valid folds one
//              response into the state; R and the key schedule hold while din_valid is
//              low. The first response is taken with start. The cycle with din_last
//              absorbs the last response, then WRITE loads the signature. diag as above.
// key_inv is high during the last SELF_TEST encryption when KEY_INV_LAST is set (used by
// DES to exercise its key wiring with the inverted key). test_key selects the shadow
// test key in every mode but MISSION. rout_upd is high the cycle after R-out was
// written; done is high the cycle after the final write of a run.
// Mode encoding, handshake and the stop input are this design's choices.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned NR           = 10,
  parameter int unsigned SELFTEST_ENC = 210,
  parameter bit          KEY_INV_LAST = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bist_mode_e mode,
  input  logic       start,
  input  logic       stop,
  input  logic       diag,
  input  logic       din_valid,
  input  logic       din_last,
  output logic       select,
  output logic       sa,
  output logic       adv,
  output logic       first,
  output logic [3:0] rnd,
  output logic       last_rnd,
  output logic       key_inv,
  output logic       test_key,
  output logic       write_out,
  output logic       rout_upd,
  output logic       busy,
  output logic       done
);
  bist_state_e state_q;
  bist_mode_e  mode_q, cur_mode;
  logic [3:0]  rnd_q;
  logic [15:0] enc_q, enc;
  logic        enc_end_q;

  always_comb begin
    first    = (state_q == ST_IDLE) && start;
    cur_mode = first ? mode : mode_q;
    rnd      = first ? 4'd0 : rnd_q;
    enc      = first ? 16'd0 : enc_q;
    last_rnd = (rnd == 4'(NR - 1));
    select   = !first;
    sa       = !first && (state_q == ST_RUN) && (mode_q == MODE_ORA);
    adv      = first || ((state_q == ST_RUN) && ((mode_q != MODE_ORA) || din_valid));
    key_inv  = KEY_INV_LAST && (cur_mode == MODE_SELF_TEST) && (enc == 16'(SELFTEST_ENC - 1));
    test_key = (cur_mode != MODE_MISSION);
    busy     = (state_q != ST_IDLE);
    write_out = (state_q == ST_WRITE)
             || ((state_q == ST_RUN) && (mode_q == MODE_TPG) && (!diag || enc_end_q))
             || ((state_q == ST_RUN) && diag && enc_end_q
                 && ((mode_q == MODE_SELF_TEST) || (mode_q == MODE_ORA)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= ST_IDLE;
      mode_q    <= MODE_MISSION;
      rnd_q     <= '0;
      enc_q     <= '0;
      enc_end_q <= 1'b0;
      rout_upd  <= 1'b0;
      done      <= 1'b0;
    end else begin
      rout_upd <= write_out;
      done     <= 1'b0;
      if (first) mode_q <= mode;
      if (adv) begin
        rnd_q     <= last_rnd ? 4'd0 : rnd + 4'd1;
        enc_q     <= last_rnd ? enc + 16'd1 : enc;
        enc_end_q <= last_rnd;
      end else if (write_out) begin
        enc_end_q <= 1'b0;
      end
      unique case (state_q)
        ST_IDLE:
          if (start) begin
            if ((mode == MODE_ORA) && din_last)                               state_q <= ST_WRITE;
            else if ((mode == MODE_MISSION) && last_rnd)                      state_q <= ST_WRITE;
            else if ((mode == MODE_SELF_TEST) && last_rnd && (SELFTEST_ENC == 1)) state_q <= ST_WRITE;
            else                                                              state_q <= ST_RUN;
          end
        ST_RUN:
          unique case (mode_q)
            MODE_MISSION:   if (last_rnd) state_q <= ST_WRITE;
            MODE_SELF_TEST: if (last_rnd && (enc == 16'(SELFTEST_ENC - 1))) state_q <= ST_WRITE;
            MODE_TPG:       if (stop) begin
                              state_q <= ST_IDLE;
                              done    <= 1'b1;
                            end
            MODE_ORA:       if (din_valid && din_last) state_q <= ST_WRITE;
            default: ;
          endcase
        ST_WRITE: begin
          state_q <= ST_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  // The ORA input is only marked last together with a valid response, and the round
  // counter stays inside one encryption.
  a_last_valid: assert property (@(posedge clk) disable iff (!rst_n)
      (busy && mode_q == MODE_ORA && din_last) |-> din_valid);
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n) int'(rnd_q) < int'(NR));

endmodule
