// iwtag_tracker: per-entry IWtag bookkeeping of the StallIW window-growth
// algorithm.
//
// Every instruction window entry carries a TAG_W-bit (4-bit) tag estimating
// how many more cycles of overlap the instruction could have had if the
// window were fully activated:
//   * entry: an instruction that enters the window with all operands ready
//     gets tag = MaxOverlap (supplied by stalliw_ctrl); otherwise tag = 0;
//   * completion: the producer's tag, reduced by the cycles S the producer
//     itself stalled at the head of the window (floored at 0), is copied to
//     every consumer for which it produced the last missing operand;
//   * retirement: when the head instruction retires after stalling S cycles
//     at the head, min(tag, S) stall cycles are reported as avoidable.
// The tracker measures S itself: it counts the cycles `head_stall` is high
// (head valid but not complete) until the head retires, saturating at the
// tag range since min(tag, S) never needs more.
//
// These rules follow the published algorithm. Port counts (DISP entries and
// CPL completions per cycle), the consumer-mask form in which the core
// reports "last operand" dependences, and one-cycle-late reporting of the
// avoidable stall are this implementation's choices. A dispatch write wins
// over a completion write to the same entry in the same cycle.
//
// Timing: tags update on the clock edge after the event; avoid_valid and
// avoid_cycles are registered and appear one cycle after retire_head.
module iwtag_tracker #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned TAG_W   = 4,
  parameter int unsigned DISP    = 8,
  parameter int unsigned CPL     = 4,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [TAG_W-1:0]                max_overlap,
  // entry of instructions into the window
  input  logic [DISP-1:0]                 disp_valid,
  input  logic [DISP-1:0][IW-1:0]         disp_idx,
  input  logic [DISP-1:0]                 disp_ready,
  // completion of producers, with the entries they release
  input  logic [CPL-1:0]                  cpl_valid,
  input  logic [CPL-1:0][IW-1:0]          cpl_idx,
  input  logic [CPL-1:0][ENTRIES-1:0]     cpl_last_consumers,
  // window head
  input  logic [IW-1:0]                   head_idx,
  input  logic                            head_stall,
  input  logic                            retire_head,
  // avoidable stall cycles of a retired head
  output logic                            avoid_valid,
  output logic [TAG_W-1:0]                avoid_cycles
);
  logic [TAG_W-1:0] tags [ENTRIES];
  logic [TAG_W-1:0] stall_cnt;

  logic [CPL-1:0][TAG_W-1:0] pass_tag;

  // tag handed on by each completing producer
  always_comb begin
    for (int unsigned c = 0; c < CPL; c++) begin
      logic [TAG_W-1:0] s;
      s = (cpl_idx[c] == head_idx) ? stall_cnt : '0;
      pass_tag[c] = (tags[cpl_idx[c]] > s) ? tags[cpl_idx[c]] - s : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < ENTRIES; e++) tags[e] <= '0;
    end else begin
      for (int unsigned e = 0; e < ENTRIES; e++) begin
        for (int unsigned c = 0; c < CPL; c++)
          if (cpl_valid[c] && cpl_last_consumers[c][e]) tags[e] <= pass_tag[c];
        for (int unsigned d = 0; d < DISP; d++)
          if (disp_valid[d] && disp_idx[d] == IW'(e))
            tags[e] <= disp_ready[d] ? max_overlap : '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall_cnt    <= '0;
      avoid_valid  <= 1'b0;
      avoid_cycles <= '0;
    end else begin
      avoid_valid  <= 1'b0;
      if (retire_head) begin
        avoid_valid  <= 1'b1;
        avoid_cycles <= (tags[head_idx] < stall_cnt) ? tags[head_idx] : stall_cnt;
        stall_cnt    <= '0;
      end else if (head_stall && stall_cnt != '1) begin
        stall_cnt <= stall_cnt + TAG_W'(1);
      end
    end
  end
endmodule
