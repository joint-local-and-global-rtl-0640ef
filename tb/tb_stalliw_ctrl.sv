// tb_stalliw_ctrl: self-checking test of the StallIW window-size controller.
// A per-edge script drives youngest-segment issues, total commits and
// avoidable-stall reports, and checks the requested segment count and the
// MaxOverlap value at the edges where the algorithm must act: shrinking on
// fewer than 40 youngest-segment issues, growing on 20 avoidable stall
// cycles only once 40 youngest-segment issues were seen, restarting the
// period after a growth, clearing the stall sum at period ends, the
// 2-segment floor, the global ceiling, and MaxOverlap =
// deactivated entries x 200 / commits of the last period (saturated to 15).
// A second instance in PeriodicIW mode (shrink only on no youngest-segment
// issue, growth every fifth period since the last resize) gets the same
// inputs and is checked at its own period ends.
module tb_stalliw_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] ysc_cnt, commit_cnt, avoid_cycles, max_overlap;
  logic avoid_valid, inc_evt, dec_evt;
  logic [4:0] max_segs, target;
  int checks = 0, failures = 0;
  int edge_no = 0;
  int n_inc = 0, n_dec = 0;
  logic [4:0] p_target;
  logic [3:0] p_mo;
  logic p_inc, p_dec;
  int p_n_inc = 0, p_n_dec = 0;

  stalliw_ctrl dut (.clk, .rst_n, .ysc_cnt, .commit_cnt, .avoid_valid, .avoid_cycles,
                    .max_segs, .target_segs(target), .max_overlap, .inc_evt, .dec_evt);
  stalliw_ctrl #(.DEC_THR(1), .PERIODIC(1'b1), .GROW_PER(5)) dut_p (
    .clk, .rst_n, .ysc_cnt, .commit_cnt, .avoid_valid, .avoid_cycles, .max_segs,
    .target_segs(p_target), .max_overlap(p_mo), .inc_evt(p_inc), .dec_evt(p_dec));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at edge %0d: %s (segs=%0d mo=%0d)", edge_no, what, target, max_overlap);
    end
  endtask

  function automatic void drive(int e);
    ysc_cnt = 0; avoid_valid = 0; avoid_cycles = 0;
    max_segs = 16;
    if (e > 640 && e <= 1240) max_segs = 4;
    // commits per cycle in each stretch
    if (e <= 200) commit_cnt = 4;
    else if (e <= 400) commit_cnt = 2;
    else if (e <= 440) commit_cnt = 3;
    else if (e <= 640) commit_cnt = 8;
    else commit_cnt = 0;
    // youngest-segment issues
    if (e > 200 && e <= 240) ysc_cnt = 1;        // exactly 40: no shrink
    if (e > 400 && e <= 450) ysc_cnt = 1;        // 40 reached at edge 440
    if (e > 1240) ysc_cnt = 1;
    if (e == 700) ysc_cnt = 1;                   // a single one: PeriodicIW keeps its size
    // avoidable stall reports
    if (e == 405 || e == 410) begin avoid_valid = 1; avoid_cycles = 10; end
    if (e == 1300 || e == 1450) begin avoid_valid = 1; avoid_cycles = 15; end
    if (e == 1470) begin avoid_valid = 1; avoid_cycles = 5; end
  endfunction

  initial begin
    drive(1);
    repeat (3) @(negedge clk);
    check(target == 16 && max_overlap == 0, "reset state");
    rst_n = 1'b1;
    for (int e = 1; e <= 2200; e++) begin
      drive(e);
      @(posedge clk); #1; edge_no = e;
      n_inc += int'(inc_evt); n_dec += int'(dec_evt);
      p_n_inc += int'(p_inc); p_n_dec += int'(p_dec);
      case (e)
        199:  check(p_target == 16, "periodic: full window during first period");
        200:  check(p_target == 15 && p_dec, "periodic: no youngest issue: shrink");
        400:  check(p_target == 15, "periodic: youngest issues: keep");
        641:  check(p_target == 4, "periodic: ceiling lowered");
        800:  check(p_target == 4, "periodic: one youngest issue keeps the size");
        1000: check(p_target == 3 && p_dec, "periodic: shrink");
        1200: check(p_target == 2 && p_dec, "periodic: shrink to floor");
        2000: check(p_target == 2, "periodic: four periods since resize: no growth");
        2199: check(p_target == 2, "periodic: before fifth period end");
        2200: check(p_target == 3 && p_inc, "periodic: grow after five periods");
        default: ;
      endcase
      case (e)
        199:  check(target == 16, "full window during first period");
        200:  check(target == 15 && dec_evt, "no youngest issues: shrink");
        230:  check(max_overlap == 2, "MaxOverlap 8*200/800 = 2");
        400:  check(target == 15, "40 youngest issues: keep");
        430:  check(max_overlap == 4, "MaxOverlap 8*200/400 = 4");
        439:  check(target == 15, "20 avoidable cycles but only 39 youngest issues");
        440:  check(target == 16 && inc_evt, "grow once 40 youngest issues seen");
        470:  check(max_overlap == 0, "no deactivated entries: MaxOverlap 0");
        600:  check(target == 16, "period restarted at growth: no shrink at 600");
        640:  check(target == 15, "shrink at end of restarted period");
        641:  check(target == 4, "ceiling lowered to 4 segments");
        720:  check(max_overlap == 0, "at ceiling: MaxOverlap 0");
        840:  check(target == 3, "shrink below ceiling");
        870:  check(max_overlap == 15, "no commits: MaxOverlap saturates");
        1040: check(target == 2, "shrink to floor");
        1240: check(target == 2, "floor of 2 segments holds");
        1300: check(target == 2, "15 avoidable cycles: no growth");
        1460: check(target == 2, "stall sum cleared at period end");
        1479: check(target == 2, "20 reached, 39 youngest issues");
        1480: check(target == 3 && inc_evt, "grow after 40th youngest issue");
        default: ;
      endcase
    end
    check(n_inc == 2 && n_dec == 4, $sformatf("event counts inc=%0d dec=%0d", n_inc, n_dec));
    check(p_n_inc == 1 && p_n_dec == 3,
          $sformatf("periodic event counts inc=%0d dec=%0d", p_n_inc, p_n_dec));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
