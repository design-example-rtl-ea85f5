// tb_two_track - end-to-end testbench of the two-track crossing controller,
// run at the default parameters (two tracks).
//
// Each track is modelled independently by a next-state table written out from
// the state diagram; the expected bell is the OR of the modelled per-track
// bells and the expected arm is that OR one clock earlier. Inputs change on the
// falling clock edge and every output is compared after every rising edge.
//
// Stimulus: the overlapping-trains scenario (a west-bound train on track 0 is
// in the crossing when an east-bound train enters track 1's block, and the
// bells stop only when the last train has cleared), a train that backs out of
// its block, a train that re-enters the crossing, then random trains on both
// tracks and purely random indicator values. The test counts, and requires at
// least once: every transition on each track, both tracks requesting the bell
// at the same time, the bell held by one track alone (on each track), the arm
// falling one clock after the bell, and the arm coming down one clock after
// the bell starts.
module tb_two_track;
  import grade_crossing_pkg::*;

  localparam int N = 2;
  // model state indices
  localparam int NT = 0, IB = 1, AC = 2, PC = 3;

  logic clk = 1'b0;
  logic rst;
  logic [N-1:0] blk, gcr;
  logic bellout, arm;
  logic [N-1:0] track_bell;
  track_state_t [N-1:0] track_state;

  int unsigned checks = 0, failures = 0;

  int m_state [N];          // model state per track
  logic m_arm;              // model arm register
  logic prev_bell;
  logic pend_up, pend_down; // arm edge due at the next clock

  // mechanism counters
  int unsigned cov_tr [N][4][4];   // [track][from][to]
  int unsigned cov_both = 0, cov_alone [N], cov_arm_down = 0, cov_arm_up = 0;

  two_track dut (
    .clk(clk), .rst(rst), .blk(blk), .gcr(gcr),
    .bellout(bellout), .arm(arm), .track_bell(track_bell), .track_state(track_state)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // next state of one track, from the state diagram
  function automatic int next_state(int s, logic b, logic g);
    case (s)
      NT: return b ? IB : NT;
      IB: return !b ? NT : (g ? AC : IB);
      AC: return g ? AC : PC;
      PC: return !b ? NT : (g ? AC : PC);
      default: return NT;
    endcase
  endfunction

  function automatic track_state_t enc(int s);
    case (s)
      NT: return NO_TRAIN;
      IB: return IN_BLOCK;
      AC: return AT_CROSSING;
      default: return PAST_CROSSING;
    endcase
  endfunction

  function automatic logic model_bell(int s);
    return (s == IB) || (s == AC);
  endfunction

  task automatic step(input logic [N-1:0] b, input logic [N-1:0] g);
    logic any_bell, exp_bell;
    int ns;
    @(negedge clk);
    blk = b; gcr = g;
    any_bell = 1'b0;
    for (int t = 0; t < N; t++) any_bell |= model_bell(m_state[t]);
    @(posedge clk);
    #1;
    // the arm register samples the bells of the state before this edge
    m_arm = any_bell;
    exp_bell = 1'b0;
    for (int t = 0; t < N; t++) begin
      ns = next_state(m_state[t], b[t], g[t]);
      if (ns != m_state[t]) cov_tr[t][m_state[t]][ns]++;
      m_state[t] = ns;
      exp_bell |= model_bell(ns);
      check(track_state[t] == enc(ns),
            $sformatf("track %0d state %b expected %b", t, track_state[t], enc(ns)));
      check(track_bell[t] == model_bell(ns), $sformatf("track %0d bell wrong", t));
    end
    check(bellout == exp_bell, $sformatf("bellout %b expected %b", bellout, exp_bell));
    check(arm == m_arm, $sformatf("arm %b expected %b", arm, m_arm));
    if (model_bell(m_state[0]) && model_bell(m_state[1])) cov_both++;
    for (int t = 0; t < N; t++)
      if (exp_bell && model_bell(m_state[t]) && !model_bell(m_state[1-t])) cov_alone[t]++;
    // the arm lags the bell by exactly one clock, in both directions
    if (pend_up) begin
      check(arm == 1'b1, "arm not down one clock after the bell started");
      cov_arm_up++;
    end
    if (pend_down) begin
      check(arm == 1'b0, "arm not up one clock after the bell stopped");
      cov_arm_down++;
    end
    pend_up = 1'b0;
    pend_down = 1'b0;
    if (exp_bell && !prev_bell) begin
      check(arm == 1'b0, "arm came down together with the bell");
      pend_up = 1'b1;
    end else if (!exp_bell && prev_bell) begin
      check(arm == 1'b1, "arm rose together with the bell stopping");
      pend_down = 1'b1;
    end
    prev_bell = exp_bell;
  endtask

  task automatic hold(input logic [N-1:0] b, input logic [N-1:0] g, input int n);
    repeat (n) step(b, g);
  endtask

  initial begin
    foreach (cov_tr[t, f, s]) cov_tr[t][f][s] = 0;
    foreach (cov_alone[t]) cov_alone[t] = 0;
    rst = 1'b1; blk = '0; gcr = '0;
    repeat (3) @(posedge clk);
    #1;
    check(bellout == 1'b0 && arm == 1'b0, "reset leaves bell or arm active");
    check(track_state[0] == NO_TRAIN && track_state[1] == NO_TRAIN, "reset state not NO_TRAIN");
    @(negedge clk);
    rst = 1'b0;
    foreach (m_state[t]) m_state[t] = NT;
    m_arm = 1'b0;
    prev_bell = 1'b0;
    pend_up = 1'b0;
    pend_down = 1'b0;

    // overlapping trains: west-bound on track 0, east-bound on track 1
    hold(2'b00, 2'b00, 2);
    hold(2'b01, 2'b00, 2);   // west-bound enters its block
    hold(2'b01, 2'b01, 1);   // west-bound in the crossing
    hold(2'b11, 2'b01, 1);   // east-bound enters its block
    hold(2'b11, 2'b00, 2);   // west-bound clears the crossing
    hold(2'b10, 2'b00, 1);   // west-bound leaves its block
    hold(2'b10, 2'b10, 2);   // east-bound in the crossing
    check(bellout == 1'b1 && arm == 1'b1, "east-bound alone does not hold bell and arm");
    hold(2'b10, 2'b00, 1);   // east-bound clears the crossing
    check(bellout == 1'b0, "bell still ringing after the last train cleared the crossing");
    hold(2'b00, 2'b00, 3);
    check(bellout == 1'b0 && arm == 1'b0, "bell or arm active with no trains");

    // east-bound train backs out of its block
    hold(2'b10, 2'b00, 4);
    hold(2'b00, 2'b00, 3);
    // west-bound train re-enters the crossing
    hold(2'b01, 2'b00, 2);
    hold(2'b01, 2'b01, 2);
    hold(2'b01, 2'b00, 3);
    hold(2'b01, 2'b01, 2);
    hold(2'b01, 2'b00, 2);
    hold(2'b00, 2'b00, 3);

    // random trains on both tracks
    for (int i = 0; i < 3000; i++) begin
      logic [N-1:0] b, g;
      b = 2'($urandom);
      g = b & 2'($urandom);
      hold(b, g, 1 + $urandom_range(0, 3));
    end
    // purely random indicators
    for (int i = 0; i < 3000; i++) step(2'($urandom), 2'($urandom));

    // every mechanism must have happened
    for (int t = 0; t < N; t++) begin
      check(cov_tr[t][NT][IB] > 0, $sformatf("track %0d: NO_TRAIN->IN_BLOCK never", t));
      check(cov_tr[t][IB][NT] > 0, $sformatf("track %0d: IN_BLOCK->NO_TRAIN never", t));
      check(cov_tr[t][IB][AC] > 0, $sformatf("track %0d: IN_BLOCK->AT_CROSSING never", t));
      check(cov_tr[t][AC][PC] > 0, $sformatf("track %0d: AT_CROSSING->PAST_CROSSING never", t));
      check(cov_tr[t][PC][AC] > 0, $sformatf("track %0d: PAST_CROSSING->AT_CROSSING never", t));
      check(cov_tr[t][PC][NT] > 0, $sformatf("track %0d: PAST_CROSSING->NO_TRAIN never", t));
      check(cov_alone[t] > 0, $sformatf("track %0d never rang the bell alone", t));
    end
    check(cov_both > 0, "the two tracks never requested the bell together");
    check(cov_arm_up > 0, "arm never came down after the bell started");
    check(cov_arm_down > 0, "arm never rose after the bell stopped");
    $display("mechanisms: both=%0d alone0=%0d alone1=%0d arms_lowered=%0d arms_raised=%0d",
             cov_both, cov_alone[0], cov_alone[1], cov_arm_up, cov_arm_down);
    for (int t = 0; t < N; t++)
      $display("track %0d: nt->ib=%0d ib->nt=%0d ib->ac=%0d ac->pc=%0d pc->ac=%0d pc->nt=%0d", t,
               cov_tr[t][NT][IB], cov_tr[t][IB][NT], cov_tr[t][IB][AC],
               cov_tr[t][AC][PC], cov_tr[t][PC][AC], cov_tr[t][PC][NT]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
