// Shared types for the railroad grade-crossing controller.
//
// track_state_t names the four states of the single-track controller. The
// encoding is one-hot, one flip-flop per state, the same structure as the
// original state-machine implementation, which kept one state variable per
// state. The bit positions are this design's own choice.
package grade_crossing_pkg;

  typedef enum logic [3:0] {
    NO_TRAIN      = 4'b0001, // no train anywhere in the block
    IN_BLOCK      = 4'b0010, // train in the block, not yet at the crossing: bell on
    AT_CROSSING   = 4'b0100, // train occupies the crossing: bell on
    PAST_CROSSING = 4'b1000  // crossing cleared, train still in the block: bell off
  } track_state_t;

endpackage
