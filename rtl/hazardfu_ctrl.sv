// hazardfu_ctrl: HazardFU local controller for the number of active
// functional units of one type (and with it that type's share of the issue
// width).
//
// Increase: the structural hazards reported for this unit type are summed
// over the current period; as soon as the sum reaches HAZ_THR (80) the
// requested unit count rises by one and the sum restarts. Decrease: at the
// end of each PERIOD-cycle (200) period, if the last active unit was used on
// at most IDLE_MAX (4) cycles, the count falls by one. The last remaining
// unit of a type that may be fully switched off (MIN_UNITS = 0, the FPUs) is
// only switched off if it was not used at all in the period, and it is
// switched back on as soon as an instruction of this type is fetched
// (`fetch_hit`). The count never goes below MIN_UNITS (one ALU always stays
// on) nor above `max_units`, the ceiling set by the global controller; a
// lowered ceiling applies at once.
//
// UTIL = 1 turns the controller into the UtilFU baseline: hazards are
// ignored, and the count rises by one at a period end if the last active
// unit was busy on at least UTIL_PCT (86%) of the period's cycles. The
// period-end decrease is the same, except that the last unit of a type that
// may be fully switched off goes off after LAST_IDLE (3) unused cycles in a
// row. That run only counts once a newly requested unit has powered up
// (WAKE_HOLD cycles, the activation delay), and it is restarted by an FP
// fetch as well as by use, so a unit woken by a fetch is not dropped before
// it could be used.
//
// Those rules and numbers follow the published HazardFU and UtilFU algorithms. This
// implementation's own choices: a decrease is skipped at the end of a period
// in which an increase already happened; the hazard sum keeps accumulating
// (saturating) while the count is at its ceiling; reset requests RESET_UNITS.
//
// Ports: hazards (per-cycle hazard count), last_used (the last active unit
// issued this cycle), fetch_hit, max_units in; target (requested count; the
// activation delay is applied outside), inc_evt/dec_evt/wake_evt (one-cycle
// pulses when the count changes for each reason) out.
module hazardfu_ctrl #(
  parameter int unsigned N           = 6,
  parameter int unsigned MIN_UNITS   = 1,
  parameter int unsigned RESET_UNITS = 6,
  parameter int unsigned REQ_W       = 4,
  parameter int unsigned PERIOD      = 200,
  parameter int unsigned HAZ_THR     = 80,
  parameter int unsigned IDLE_MAX    = 4,
  parameter bit          UTIL        = 1'b0,
  parameter int unsigned UTIL_PCT    = 86,
  parameter int unsigned LAST_IDLE   = 3,
  parameter int unsigned WAKE_HOLD   = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [REQ_W-1:0]       hazards,
  input  logic                   last_used,
  input  logic                   fetch_hit,
  input  logic [$clog2(N+1)-1:0] max_units,
  output logic [$clog2(N+1)-1:0] target,
  output logic                   inc_evt,
  output logic                   dec_evt,
  output logic                   wake_evt
);
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned PW = $clog2(PERIOD + 1);
  localparam int unsigned HW = $clog2(HAZ_THR + 1);
  localparam int unsigned UTIL_THR = (UTIL_PCT * PERIOD + 99) / 100;   // 172 of 200 cycles
  localparam int unsigned RW = $clog2(LAST_IDLE + 1);
  localparam int unsigned KW = $clog2(WAKE_HOLD + 1);

  logic [PW-1:0] cyc;
  logic [PW-1:0] used;
  logic [HW-1:0] haz_sum;
  logic          inc_seen;
  logic [RW-1:0] idle_run;     // UtilFU: cycles in a row the last unit was unused
  logic [KW-1:0] settle;       // UtilFU: cycles until a newly requested unit is on

  logic [HW:0]   haz_next;
  logic          end_of_period;
  logic          idle_enough;
  logic          last_alone;   // the one remaining unit of a type that can be fully off
  logic          haz_grow, util_grow, shrink, run_off;

  assign haz_next      = {1'b0, haz_sum} + (HW + 1)'(hazards);
  assign end_of_period = (cyc == PW'(PERIOD - 1));
  assign last_alone    = (MIN_UNITS == 0) && (target == CW'(1));
  // HazardFU: the single remaining unit of a type that can be fully gated must be unused
  assign idle_enough   = last_alone ? (used == '0) : (used <= PW'(IDLE_MAX));
  assign haz_grow      = !UTIL && (haz_next >= (HW + 1)'(HAZ_THR));
  assign util_grow     = UTIL && end_of_period && (used + PW'(last_used) >= PW'(UTIL_THR));
  // UtilFU drops the last such unit after LAST_IDLE unused cycles in a row instead
  assign shrink        = end_of_period && !inc_seen && idle_enough && !(UTIL && last_alone);
  assign run_off       = UTIL && last_alone && !last_used && !fetch_hit && (settle == '0)
                         && (idle_run + RW'(1) >= RW'(LAST_IDLE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      target   <= CW'(RESET_UNITS);
      cyc      <= '0;
      used     <= '0;
      haz_sum  <= '0;
      inc_seen <= 1'b0;
      idle_run <= '0;
      settle   <= '0;
      inc_evt  <= 1'b0;
      dec_evt  <= 1'b0;
      wake_evt <= 1'b0;
    end else begin
      inc_evt  <= 1'b0;
      dec_evt  <= 1'b0;
      wake_evt <= 1'b0;
      cyc      <= end_of_period ? '0 : cyc + PW'(1);
      used     <= end_of_period ? '0 : used + PW'(last_used);
      idle_run <= (last_used || fetch_hit || !last_alone || run_off || settle != '0) ? '0
                : (idle_run == RW'(LAST_IDLE)) ? idle_run : idle_run + RW'(1);
      if (settle != '0) settle <= settle - KW'(1);
      haz_sum  <= (haz_next >= (HW + 1)'(HAZ_THR)) ? HW'(HAZ_THR) : haz_next[HW-1:0];
      if (end_of_period) begin
        haz_sum  <= '0;
        inc_seen <= 1'b0;
      end

      if (target > max_units) begin
        target <= max_units;                       // global ceiling lowered
      end else if (target == '0 && fetch_hit && max_units != '0) begin
        target   <= CW'(1);                        // wake on fetch
        wake_evt <= 1'b1;
        settle   <= KW'(WAKE_HOLD);
      end else if ((haz_grow || util_grow) && target < max_units) begin
        target   <= target + CW'(1);
        inc_evt  <= 1'b1;
        settle   <= KW'(WAKE_HOLD);
        haz_sum  <= '0;
        inc_seen <= !end_of_period;
      end else if ((shrink || run_off) && target > CW'(MIN_UNITS)) begin
        target  <= target - CW'(1);
        dec_evt <= 1'b1;
      end
    end
  end
endmodule
