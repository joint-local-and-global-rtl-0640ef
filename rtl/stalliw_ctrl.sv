// stalliw_ctrl: StallIW local controller for the active instruction window
// size, in segments of SEG_ENTRIES (8) entries.
//
// Time is divided into PERIOD-cycle (200) periods.
//   * Decrease: at the end of a period, if fewer than DEC_THR (40)
//     instructions issued from the youngest active segment during the period
//     (ysc_cnt, counted by ysc_tracker), the window shrinks by one segment
//     (never below MIN_SEGS = 2).
//   * Increase (avoidable stalls): the avoidable stall cycles reported by
//     iwtag_tracker are summed; as soon as the sum reaches INC_THR (20) while
//     at least DEC_THR youngest-segment issues have been seen in the period
//     (so that a pending decrease wins), the window grows by one segment, the
//     sum is cleared and a new period starts. The sum is also cleared at
//     every period end.
//   * MaxOverlap, the tag given to instructions entering with ready operands,
//     is (deactivated entries) / (IPC of the last full period)
//     = deactivated x PERIOD / commits, saturated to the tag range. It is
//     recomputed with a multi-cycle divider every second period and whenever
//     the window is resized or its ceiling changes.
//   * The window never exceeds `max_segs`, the ceiling chosen by the global
//     controller; deactivated entries are counted up to that ceiling.
//
// PERIODIC = 1 turns the controller into the PeriodicIW baseline: the same
// period-end shrink test (used with DEC_THR = 1, i.e. shrink only if no
// instruction issued from the youngest segment), and growth by one segment
// at the end of every GROW_PER-th (5th) period since the last resize,
// instead of growth on avoidable stalls. Shrinking wins over a due growth.
//
// The algorithm, its thresholds, the period, the 4-bit tag and the
// recompute rate follow the published design; the text states the increase
// test both as "counter > threshold" and as "reaches 20", and this design
// uses "reaches" (>=). Counting deactivated entries against the global
// ceiling rather than against the full 128 entries, and reset to the full
// window, are this implementation's choices.
//
// Ports: ysc_cnt (instructions this cycle counted as issued from the
// youngest segment), commit_cnt (all committed instructions this cycle),
// avoid_valid/avoid_cycles (from iwtag_tracker), max_segs in; target_segs
// (requested active segments; activation delay applied outside),
// max_overlap, inc_evt/dec_evt (one-cycle pulses) out.
module stalliw_ctrl #(
  parameter int unsigned IW_SEGS     = 16,
  parameter int unsigned SEG_ENTRIES = 8,
  parameter int unsigned MIN_SEGS    = 2,
  parameter int unsigned TAG_W       = 4,
  parameter int unsigned CNT_W       = 4,
  parameter int unsigned PERIOD      = 200,
  parameter int unsigned DEC_THR     = 40,
  parameter int unsigned INC_THR     = 20,
  parameter bit          PERIODIC    = 1'b0,
  parameter int unsigned GROW_PER    = 5
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [CNT_W-1:0]             ysc_cnt,
  input  logic [CNT_W-1:0]             commit_cnt,
  input  logic                         avoid_valid,
  input  logic [TAG_W-1:0]             avoid_cycles,
  input  logic [$clog2(IW_SEGS+1)-1:0] max_segs,
  output logic [$clog2(IW_SEGS+1)-1:0] target_segs,
  output logic [TAG_W-1:0]             max_overlap,
  output logic                         inc_evt,
  output logic                         dec_evt
);
  localparam int unsigned SW = $clog2(IW_SEGS + 1);
  localparam int unsigned PW = $clog2(PERIOD + 1);
  localparam int unsigned YW = $clog2(DEC_THR + 1);
  localparam int unsigned AW = $clog2(INC_THR + 1);
  localparam int unsigned GW = $clog2(GROW_PER + 1);
  localparam int unsigned YN = ((YW > CNT_W) ? YW : CNT_W) + 1;     // youngest-segment sum
  localparam int unsigned MW = $clog2((1 << CNT_W) * PERIOD + 1);   // commits per period
  localparam int unsigned DW = (MW > $clog2(IW_SEGS * SEG_ENTRIES * PERIOD + 1))
                             ? MW : $clog2(IW_SEGS * SEG_ENTRIES * PERIOD + 1);

  logic [PW-1:0] cyc;
  logic [YW-1:0] ysc;          // youngest-segment issues, saturating at DEC_THR
  logic [AW-1:0] avoid_sum;    // avoidable stall cycles, saturating at INC_THR
  logic [MW-1:0] commits;      // commits in the running period
  logic [MW-1:0] last_commits; // commits in the last full period
  logic          odd_period;
  logic          recompute;    // MaxOverlap refresh pending
  logic [SW-1:0] prev_max;
  logic [GW-1:0] since_change; // PeriodicIW: periods since the last resize

  logic [YN-1:0] ysc_next;
  logic [AW:0]   avoid_next;
  logic          end_of_period, grow;

  assign ysc_next      = YN'(ysc) + YN'(ysc_cnt);
  assign avoid_next    = {1'b0, avoid_sum} + (avoid_valid ? (AW + 1)'(avoid_cycles) : '0);
  assign end_of_period = (cyc == PW'(PERIOD - 1));
  assign grow          = !PERIODIC && (avoid_next >= (AW + 1)'(INC_THR))
                         && (ysc_next >= YN'(DEC_THR)) && (target_segs < max_segs);

  // divider for MaxOverlap
  logic          div_start, div_busy, div_done;
  logic [DW-1:0] div_q, div_r, deact_x_period;

  assign deact_x_period = (max_segs > target_segs)
                        ? DW'(max_segs - target_segs) * DW'(SEG_ENTRIES) * DW'(PERIOD) : '0;
  assign div_start      = recompute && !div_busy && !div_done;

  seq_div #(.W(DW)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (deact_x_period),
    .divisor  (DW'(last_commits)),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      target_segs  <= SW'(IW_SEGS);
      cyc          <= '0;
      ysc          <= '0;
      avoid_sum    <= '0;
      commits      <= '0;
      last_commits <= '0;
      odd_period   <= 1'b0;
      recompute    <= 1'b0;
      prev_max     <= SW'(IW_SEGS);
      since_change <= '0;
      max_overlap  <= '0;
      inc_evt      <= 1'b0;
      dec_evt      <= 1'b0;
    end else begin
      inc_evt   <= 1'b0;
      dec_evt   <= 1'b0;
      prev_max  <= max_segs;
      cyc       <= cyc + PW'(1);
      ysc       <= (ysc_next >= YN'(DEC_THR)) ? YW'(DEC_THR) : ysc_next[YW-1:0];
      avoid_sum <= (avoid_next >= (AW + 1)'(INC_THR)) ? AW'(INC_THR) : avoid_next[AW-1:0];
      commits   <= commits + MW'(commit_cnt);

      if (div_start) recompute <= 1'b0;
      if (div_done)
        max_overlap <= (div_q > DW'((1 << TAG_W) - 1)) ? '1 : div_q[TAG_W-1:0];
      if (max_segs != prev_max) recompute <= 1'b1;

      if (target_segs > max_segs) begin
        target_segs <= max_segs;                  // global ceiling lowered
        recompute   <= 1'b1;
        since_change <= '0;
      end else if (grow) begin
        // grow now and start a new period
        target_segs <= target_segs + SW'(1);
        inc_evt     <= 1'b1;
        recompute   <= 1'b1;
        cyc         <= '0;
        ysc         <= '0;
        avoid_sum   <= '0;
        commits     <= '0;
      end else if (end_of_period) begin
        cyc          <= '0;
        ysc          <= '0;
        avoid_sum    <= '0;
        commits      <= '0;
        last_commits <= commits + MW'(commit_cnt);
        odd_period   <= !odd_period;
        if (odd_period) recompute <= 1'b1;
        if (since_change < GW'(GROW_PER)) since_change <= since_change + GW'(1);
        if (ysc_next < YN'(DEC_THR) && target_segs > SW'(MIN_SEGS)) begin
          target_segs  <= target_segs - SW'(1);
          dec_evt      <= 1'b1;
          recompute    <= 1'b1;
          since_change <= '0;
        end else if (PERIODIC && since_change + GW'(1) >= GW'(GROW_PER)
                     && target_segs < max_segs) begin
          // PeriodicIW: grow every GROW_PER periods since the last resize
          target_segs  <= target_segs + SW'(1);
          inc_evt      <= 1'b1;
          recompute    <= 1'b1;
          since_change <= '0;
        end
      end
    end
  end
endmodule
