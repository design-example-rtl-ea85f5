// two_track - grade-crossing controller for a road crossing several tracks.
//
// The crossing has one set of bells and one set of arms shared by all tracks.
// Each track gets its own track_ctrl single-track controller; the crossing
// needs warning whenever any track does, so the bell output is the OR of the
// per-track bell requests. The arms must come down one clock period (5 s with
// the intended clock) after the bells start, so arm is the same OR passed
// through one flip-flop. When the last train clears its crossing the bell
// stops at once and the arms rise one clock later.
//
// Timing, from a blk input rising: the track's controller leaves NO_TRAIN at
// the next clock edge, so bellout rises after one edge and arm after two.
//
// The replication of the single-track controller, the OR of the bells and the
// one-clock register on the arm follow the original design, which had two
// tracks. Making the number of tracks a parameter, and the synchronous
// active-high reset (arm low, every controller in NO_TRAIN), are this design's
// own choices.
//
// Ports (index t is the track; the default build has track 0 = west-bound,
// BLK1/GCR1, and track 1 = east-bound, BLK2/GCR2)
//   clk         in   controller clock, 5 s period in the intended application
//   rst         in   synchronous reset, active high
//   blk[t]      in   train present in track t's block
//   gcr[t]      in   train present in the grade crossing on track t
//   bellout     out  ring the crossing bells (combinational from the state registers)
//   arm         out  lower the crossing arms (registered, one clock behind bellout)
//   track_bell  out  per-track bell requests, for observation
//   track_state out  per-track controller states, for observation
module two_track
  import grade_crossing_pkg::*;
#(
  parameter int unsigned NUM_TRACKS = 2
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic         [NUM_TRACKS-1:0] blk,
  input  logic         [NUM_TRACKS-1:0] gcr,
  output logic                         bellout,
  output logic                         arm,
  output logic         [NUM_TRACKS-1:0] track_bell,
  output track_state_t [NUM_TRACKS-1:0] track_state
);

  for (genvar t = 0; t < NUM_TRACKS; t++) begin : g_track
    track_ctrl u_track (
      .clk   (clk),
      .rst   (rst),
      .blk   (blk[t]),
      .gcr   (gcr[t]),
      .bell  (track_bell[t]),
      .state (track_state[t])
    );
  end

  assign bellout = |track_bell;

  always_ff @(posedge clk) begin
    if (rst) arm <= 1'b0;
    else     arm <= |track_bell;
  end

endmodule
