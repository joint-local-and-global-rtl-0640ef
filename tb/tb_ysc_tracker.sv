// tb_ysc_tracker: self-checking test of both youngest-segment counting
// modes. Random issues (with random youngest-segment flags) and commits of
// random entries run for several thousand cycles through two instances: one
// counting at issue, one keeping a bit per entry and counting at commit. The
// counts are compared with a reference array of flags kept in the testbench.
module tb_ysc_tracker;
  localparam int unsigned E = 128, ISS = 12, RET = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ISS-1:0] issue_valid, issue_young;
  logic [ISS-1:0][6:0] issue_idx;
  logic [RET-1:0] commit_valid;
  logic [RET-1:0][6:0] commit_idx;
  logic [3:0] cnt_i, ysc_i, cnt_c, ysc_c;
  int checks = 0, failures = 0;
  bit ref_young [E];

  ysc_tracker #(.AT_COMMIT(1'b0)) dut_issue (.clk, .rst_n, .issue_valid, .issue_idx, .issue_young,
    .commit_valid, .commit_idx, .commit_cnt(cnt_i), .ysc_cnt(ysc_i));
  ysc_tracker #(.AT_COMMIT(1'b1)) dut_commit (.clk, .rst_n, .issue_valid, .issue_idx, .issue_young,
    .commit_valid, .commit_idx, .commit_cnt(cnt_c), .ysc_cnt(ysc_c));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    issue_valid = '0; issue_young = '0; issue_idx = '0; commit_valid = '0; commit_idx = '0;
    foreach (ref_young[e]) ref_young[e] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      int ec, ey, ei;
      bit used [E];
      foreach (used[e]) used[e] = 0;
      // distinct entries issue in one cycle
      ei = 0;
      for (int i = 0; i < ISS; i++) begin
        int idx;
        idx = $urandom % E;
        issue_valid[i] = ($urandom % 2) && !used[idx];
        if (issue_valid[i]) used[idx] = 1;
        issue_idx[i] = 7'(idx);
        issue_young[i] = $urandom % 2;
        if (issue_valid[i] && issue_young[i]) ei++;
      end
      for (int r = 0; r < RET; r++) begin
        commit_valid[r] = ($urandom % 3) != 0;
        commit_idx[r] = 7'($urandom);
      end
      // expected commit-mode count: same-cycle issue flag wins over the stored bit
      ec = 0; ey = 0;
      for (int r = 0; r < RET; r++)
        if (commit_valid[r]) begin
          bit b;
          b = ref_young[commit_idx[r]];
          for (int i = 0; i < ISS; i++)
            if (issue_valid[i] && issue_idx[i] == commit_idx[r]) b = issue_young[i];
          ec++; ey += int'(b);
        end
      #1;
      check(cnt_i == 4'(ec) && ysc_i == 4'(ei),
            $sformatf("issue mode cycle %0d: cnt %0d/%0d ysc %0d/%0d", n, cnt_i, ec, ysc_i, ei));
      check(cnt_c == 4'(ec) && ysc_c == 4'(ey),
            $sformatf("commit mode cycle %0d: cnt %0d/%0d ysc %0d/%0d", n, cnt_c, ec, ysc_c, ey));
      for (int i = 0; i < ISS; i++) if (issue_valid[i]) ref_young[issue_idx[i]] = issue_young[i];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
