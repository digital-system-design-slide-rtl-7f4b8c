// des_control: control-path state machine of the iterative DES decryption circuit.
//
// A block takes 16 clock cycles, one Feistel round per cycle. In cycle 1 the
// machine raises loaddata_s1, which steers the new ciphertext and key into
// the datapath and key unit while round 1 is computed. In cycles 2 to 16 it
// raises shifttwo_s1 for the rounds whose key halves rotate by two places
// (des_pkg::SHIFTTWO_SCHEDULE): 0,0,1,1,1,1,1,1,0,1,1,1,1,1,1,0 over cycles
// 1..16. After cycle 16 the result waits in DONE with out_valid high until
// out_ready; the cycle in which it is taken can already be cycle 1 of the
// next block, so back-to-back blocks are decrypted every 16 cycles.
//
// Interface: valid/ready on both sides. A block is accepted in a cycle with
// in_valid && in_ready (that cycle has loaddata_s1); out_valid rises 16
// cycles later. round_en enables the datapath and key registers; round is the
// 0-based number of the round being computed.
// The loaddata_s1 and shifttwo_s1 timing follows the lab's control table,
// except for cycle 2 (see the schedule in des_pkg); the valid/ready handshake
// and the DONE hold state are this design's own.
module des_control
  import des_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       loaddata_s1,
  output logic       shifttwo_s1,
  output logic       round_en,
  output logic [3:0] round
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_ROUND,
    S_DONE
  } state_t;

  state_t     state_q, state_d;
  logic [3:0] round_q, round_d;

  always_comb begin
    state_d     = state_q;
    round_d     = round_q;
    in_ready    = 1'b0;
    out_valid   = 1'b0;
    loaddata_s1 = 1'b0;
    shifttwo_s1 = 1'b0;
    round_en    = 1'b0;
    round       = 4'd0;
    unique case (state_q)
      S_IDLE: begin
        in_ready = 1'b1;
      end
      S_ROUND: begin
        round       = round_q;
        round_en    = 1'b1;
        shifttwo_s1 = SHIFTTWO_SCHEDULE[round_q];
        if (round_q == 4'(ROUNDS - 1)) begin
          state_d = S_DONE;
        end else begin
          round_d = round_q + 4'd1;
        end
      end
      S_DONE: begin
        out_valid = 1'b1;
        in_ready  = out_ready;
        if (out_ready) state_d = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
    // Round 1 of a new block, from IDLE or overlapping the DONE hand-over.
    if (in_valid && in_ready) begin
      loaddata_s1 = 1'b1;
      round_en    = 1'b1;
      round       = 4'd0;
      round_d     = 4'd1;
      state_d     = S_ROUND;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      round_q <= 4'd0;
    end else begin
      state_q <= state_d;
      round_q <= round_d;
    end
  end

  // A result that is not taken stays offered.
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid);
  // The key rotation is never changed while a block is being loaded.
  a_load_no_shift: assert property (@(posedge clk) disable iff (!rst_n)
    loaddata_s1 |-> !shifttwo_s1);

endmodule
