// track_ctrl - single-track grade-crossing controller.
//
// A four-state Moore machine that follows one train through the signalling
// block around a road crossing and decides whether the crossing bell must
// ring. It sees two track indicators: blk (a train is somewhere in the block)
// and gcr (a train is in, or very near, the grade crossing).
//
//   NO_TRAIN      --blk--------------> IN_BLOCK
//   IN_BLOCK      --!blk-------------> NO_TRAIN       (train backed out of the block)
//   IN_BLOCK      --blk & gcr--------> AT_CROSSING
//   AT_CROSSING   --!gcr-------------> PAST_CROSSING
//   PAST_CROSSING --blk & gcr--------> AT_CROSSING    (train came back into the crossing)
//   PAST_CROSSING --!blk-------------> NO_TRAIN
//   any other input: stay in the current state
//
// bell is high in IN_BLOCK and AT_CROSSING. It is decoded from the state
// register alone, so it changes one clock edge after the input that caused the
// transition. With the intended 5 s clock this meets "bell within 5 s of the
// train entering the block".
//
// The states, transitions and bell decode follow the original design exactly.
// The synchronous active-high reset into NO_TRAIN, and the recovery of any
// non-one-hot state into NO_TRAIN, are this design's own additions: the
// original had no reset and simply assumed the machine starts in NO_TRAIN.
// The indicators are taken as active-high logic levels; on the track they are
// "asserted" by being grounded, so a level inversion sits outside this module.
//
// Ports
//   clk   in   controller clock (5 s period in the intended application)
//   rst   in   synchronous reset, active high, forces NO_TRAIN
//   blk   in   train present in the block, expected to be synchronous to clk
//   gcr   in   train present in the grade crossing, synchronous to clk
//   bell  out  ring the bell (Moore output)
//   state out  current one-hot state, for observation
module track_ctrl
  import grade_crossing_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         blk,
  input  logic         gcr,
  output logic         bell,
  output track_state_t state
);

  track_state_t state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      NO_TRAIN:      if (blk)        state_d = IN_BLOCK;
      IN_BLOCK:      if (!blk)       state_d = NO_TRAIN;
                     else if (gcr)   state_d = AT_CROSSING;
      AT_CROSSING:   if (!gcr)       state_d = PAST_CROSSING;
      PAST_CROSSING: if (!blk)       state_d = NO_TRAIN;
                     else if (gcr)   state_d = AT_CROSSING;
      default:                       state_d = NO_TRAIN;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state_q <= NO_TRAIN;
    else     state_q <= state_d;
  end

  assign bell  = (state_q == IN_BLOCK) || (state_q == AT_CROSSING);
  assign state = state_q;

  // Out of reset the state register always holds exactly one state.
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(state_q))
    else $error("track_ctrl: state register not one-hot: %b", state_q);

endmodule
