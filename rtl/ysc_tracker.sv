// ysc_tracker: counts, per cycle, the instructions issued from the youngest
// active window segment (ysc_cnt) and the committed instructions
// (commit_cnt). These are what the window-size controller compares against
// its 40-instruction threshold each period and uses for the period's IPC.
//
// Two ways of counting the youngest-segment instructions are provided:
//   * AT_COMMIT = 0 (default): count each instruction as it issues from the
//     youngest segment. This is how the StallIW rule is stated ("issued less
//     than 40 instructions from the youngest segment"), and it needs no
//     storage in the window.
//   * AT_COMMIT = 1: keep one bit per window entry, written at issue with
//     "issued from the youngest segment", and count the committed
//     instructions whose bit is set. This is the earlier published shrink rule
//     (committed instructions that issued from the youngest segment), at a
//     cost of one bit per entry; squashed instructions are then not counted.
//
// The core says per issue whether the entry lies in the youngest active
// segment (issue_young). Port counts (ISS issues: all 12 units; RET commits:
// the retire width of 8) follow the simulated machine. Reporting the counts
// combinationally in the issue/commit cycle is this implementation's
// choice. With AT_COMMIT = 1, an entry that issues and commits in the same
// cycle is counted with the issue's flag.
module ysc_tracker #(
  parameter int unsigned ENTRIES   = 128,
  parameter int unsigned ISS       = 12,
  parameter int unsigned RET       = 8,
  parameter bit          AT_COMMIT = 1'b0,
  localparam int unsigned IW       = $clog2(ENTRIES),
  localparam int unsigned CW       = $clog2(((ISS > RET) ? ISS : RET) + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [ISS-1:0]         issue_valid,
  input  logic [ISS-1:0][IW-1:0] issue_idx,
  input  logic [ISS-1:0]         issue_young,
  input  logic [RET-1:0]         commit_valid,
  input  logic [RET-1:0][IW-1:0] commit_idx,
  output logic [CW-1:0]          commit_cnt,
  output logic [CW-1:0]          ysc_cnt
);
  always_comb begin
    commit_cnt = '0;
    for (int unsigned r = 0; r < RET; r++) commit_cnt = commit_cnt + CW'(commit_valid[r]);
  end

  if (AT_COMMIT) begin : g_commit
    logic [ENTRIES-1:0] young;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        young <= '0;
      end else begin
        for (int unsigned i = 0; i < ISS; i++)
          if (issue_valid[i]) young[issue_idx[i]] <= issue_young[i];
      end
    end

    always_comb begin
      ysc_cnt = '0;
      for (int unsigned r = 0; r < RET; r++) begin
        logic bit_now;
        bit_now = young[commit_idx[r]];
        for (int unsigned i = 0; i < ISS; i++)
          if (issue_valid[i] && issue_idx[i] == commit_idx[r]) bit_now = issue_young[i];
        ysc_cnt = ysc_cnt + CW'(commit_valid[r] & bit_now);
      end
    end
  end else begin : g_issue
    always_comb begin
      ysc_cnt = '0;
      for (int unsigned i = 0; i < ISS; i++) ysc_cnt = ysc_cnt + CW'(issue_valid[i] & issue_young[i]);
    end
  end
endmodule
