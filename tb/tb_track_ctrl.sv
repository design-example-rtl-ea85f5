// tb_track_ctrl - self-checking testbench for the single-track controller.
//
// A reference model written as one sum-of-products equation per state
// flip-flop (the gate-level form of the state diagram, independent of the
// case statement in the design) is stepped alongside the design. Inputs change
// on the falling clock edge; state and bell are compared after every rising
// edge. Stimulus: the three train movements of the single-track scenarios
// (normal passage, backing out of the block, leaving and re-entering the
// crossing), then purely random indicator values. Every transition of the
// state diagram must be seen at least once, and the bell must rise exactly one
// clock after blk rises in NO_TRAIN.
module tb_track_ctrl;
  import grade_crossing_pkg::*;

  // one-hot bit of each state, as encoded in grade_crossing_pkg
  localparam int S_NO_TRAIN_BIT = 0, S_IN_BLOCK_BIT = 1, S_AT_CROSSING_BIT = 2, S_PAST_CROSSING_BIT = 3;

  logic clk = 1'b0;
  logic rst, blk, gcr;
  logic bell;
  track_state_t state;

  int unsigned checks = 0, failures = 0;
  int unsigned cycles = 0;

  // reference model state: one flag per state
  logic m_nt, m_ib, m_ac, m_pc;

  // transition coverage
  int unsigned cov_nt_ib = 0, cov_ib_nt = 0, cov_ib_ac = 0, cov_ac_pc = 0;
  int unsigned cov_pc_ac = 0, cov_pc_nt = 0, cov_bell_latency = 0;

  track_ctrl dut (.clk(clk), .rst(rst), .blk(blk), .gcr(gcr), .bell(bell), .state(state));

  always #5 clk = ~clk;

  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // One clock: apply inputs at the falling edge, step the model, compare.
  task automatic step(input logic b, input logic g);
    logic n_nt, n_ib, n_ac, n_pc, exp_bell;
    logic was_nt;
    @(negedge clk);
    blk = b; gcr = g;
    was_nt = m_nt;
    n_ac = (g & m_ac) | (b & g & m_ib) | (b & g & m_pc);
    n_ib = (!g & b & m_ib) | (b & m_nt);
    n_nt = (!b & m_ib) | (!b & m_nt) | (!b & m_pc);
    n_pc = (!g & m_ac) | (b & !g & m_pc);
    if (m_nt & n_ib) cov_nt_ib++;
    if (m_ib & n_nt) cov_ib_nt++;
    if (m_ib & n_ac) cov_ib_ac++;
    if (m_ac & n_pc) cov_ac_pc++;
    if (m_pc & n_ac) cov_pc_ac++;
    if (m_pc & n_nt) cov_pc_nt++;
    @(posedge clk);
    #1;
    m_nt = n_nt; m_ib = n_ib; m_ac = n_ac; m_pc = n_pc;
    exp_bell = m_ib | m_ac;
    check(state[S_NO_TRAIN_BIT] == m_nt && state[S_IN_BLOCK_BIT] == m_ib &&
          state[S_AT_CROSSING_BIT] == m_ac && state[S_PAST_CROSSING_BIT] == m_pc,
          $sformatf("state %b, expected nt=%b ib=%b ac=%b pc=%b (blk=%b gcr=%b)",
                    state, m_nt, m_ib, m_ac, m_pc, b, g));
    check(bell == exp_bell, $sformatf("bell %b expected %b", bell, exp_bell));
    // latency: one clock after blk is seen in NO_TRAIN the bell is ringing
    if (was_nt && b) begin
      check(bell == 1'b1, "bell not ringing one clock after blk rose");
      cov_bell_latency++;
    end
  endtask

  task automatic hold(input logic b, input logic g, input int n);
    repeat (n) step(b, g);
  endtask

  initial begin
    rst = 1'b1; blk = 1'b0; gcr = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(state == NO_TRAIN && bell == 1'b0, "reset does not give NO_TRAIN with bell off");
    @(negedge clk);
    rst = 1'b0;
    m_nt = 1'b1; m_ib = 1'b0; m_ac = 1'b0; m_pc = 1'b0;

    // normal passage: block, crossing, clear crossing, leave block
    hold(0, 0, 2);
    hold(1, 0, 4);
    hold(1, 1, 3);
    hold(1, 0, 4);
    hold(0, 0, 3);
    check(state == NO_TRAIN && bell == 1'b0, "normal passage does not end in NO_TRAIN");

    // train enters the block and backs out onto a siding
    hold(1, 0, 5);
    check(bell == 1'b1, "bell silent while train sits in the block");
    hold(0, 0, 3);
    check(bell == 1'b0, "bell still ringing after the train backed out");

    // train enters the crossing, leaves it, comes back, then leaves normally
    hold(1, 0, 2);
    hold(1, 1, 2);
    hold(1, 0, 3);
    check(state == PAST_CROSSING && bell == 1'b0, "bell ringing after crossing cleared");
    hold(1, 1, 2);
    check(state == AT_CROSSING && bell == 1'b1, "re-entry into the crossing not detected");
    hold(1, 0, 2);
    hold(0, 0, 2);

    // a very short train: gcr drops with blk in the same clock
    hold(1, 0, 1);
    hold(1, 1, 1);
    hold(0, 0, 3);
    check(state == NO_TRAIN, "short train does not end in NO_TRAIN");

    // random indicators
    for (int i = 0; i < 4000; i++) begin
      step(1'($urandom), 1'($urandom));
    end
    // random trains with realistic dwell times
    for (int k = 0; k < 100; k++) begin
      hold(1, 0, 1 + $urandom_range(0, 4));
      hold(1, 1, 1 + $urandom_range(0, 4));
      hold(1, 0, 1 + $urandom_range(0, 4));
      if ($urandom_range(0, 3) == 0) begin
        hold(1, 1, 1 + $urandom_range(0, 2));
        hold(1, 0, 1 + $urandom_range(0, 2));
      end
      hold(0, 0, 1 + $urandom_range(0, 4));
    end

    check(cov_nt_ib > 0, "NO_TRAIN->IN_BLOCK never seen");
    check(cov_ib_nt > 0, "IN_BLOCK->NO_TRAIN never seen");
    check(cov_ib_ac > 0, "IN_BLOCK->AT_CROSSING never seen");
    check(cov_ac_pc > 0, "AT_CROSSING->PAST_CROSSING never seen");
    check(cov_pc_ac > 0, "PAST_CROSSING->AT_CROSSING never seen");
    check(cov_pc_nt > 0, "PAST_CROSSING->NO_TRAIN never seen");
    check(cov_bell_latency > 0, "bell latency never measured");
    $display("coverage: nt->ib=%0d ib->nt=%0d ib->ac=%0d ac->pc=%0d pc->ac=%0d pc->nt=%0d latency=%0d",
             cov_nt_ib, cov_ib_nt, cov_ib_ac, cov_ac_pc, cov_pc_ac, cov_pc_nt, cov_bell_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
