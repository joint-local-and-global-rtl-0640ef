// adapt_top: joint global + local energy adaptation controller for an
// out-of-order processor.
//
// Two control loops run side by side. The global loop (global_ctrl) works
// once per frame of a real-time multimedia application: it profiles every
// candidate configuration per frame type, keeps the one with the smallest
// P/IPC^3, and sets the DVS frequency so the frame just meets its deadline.
// The configuration it picks is not imposed directly: it becomes the ceiling
// for the local loops, which run continuously inside the frame and switch off
// whatever is under-used without slowing execution:
//   * instruction window: stalliw_ctrl + iwtag_tracker + ysc_tracker
//     (StallIW) choose the number of active 8-entry segments, wake_delay
//     applies the 5-cycle power-up latency, and seg_en tells the window
//     which segments are on;
//   * functional units: one hazardfu_ctrl per type (ALU, FPU) chooses how
//     many units are on, wake_delay applies the power-up latency, and
//     fu_select hands ready instructions to the active units in fixed priority
//     order and reports structural hazards and use of the last active unit.
// The global choice also shrinks the register files with the window.
//
// IW_PERIODIC and FU_UTIL swap in the PeriodicIW and UtilFU baseline
// controllers (timer-based window growth, utilization-based unit growth)
// for comparison; the defaults are StallIW and HazardFU. Youngest-segment
// instructions are counted at issue for StallIW and with one bit per window
// entry at commit for PeriodicIW (YSC_AT_COMMIT follows IW_PERIODIC), which
// matches the per-entry storage each algorithm is charged with.
//
// The partition into a global loop setting ceilings and local loops obeying
// them follows the published joint algorithm. Issue width is reported as the
// number of active ALUs and FPUs plus the two address generators, which are
// never switched off (that they count is this implementation's reading).
// alu_en/fpu_en give one power enable per unit; the published design gates a
// unit's selection logic, result-bus slice, window wake-up port and
// register-file ports together with the unit.
//
// The processor itself (window, register files, units, caches, clock
// generator and power monitor) is outside this module; its side of each
// interface is brought out as ports. All ports are synchronous to clk;
// rst_n is an asynchronous, active-low reset.
module adapt_top
  import adapt_pkg::*;
#(
  parameter int unsigned NUM_TYPES = 3,
  parameter int unsigned DISP      = 8,
  parameter int unsigned CPL       = 4,
  parameter int unsigned REQ_W     = 4,
  parameter int unsigned ISS       = NUM_ALU + NUM_FPU + 2,
  parameter int unsigned RET       = 8,
  parameter bit          IW_PERIODIC   = 1'b0,
  parameter bit          FU_UTIL       = 1'b0,
  parameter bit          YSC_AT_COMMIT = IW_PERIODIC,
  parameter int unsigned PERIOD_C  = PERIOD,
  parameter int unsigned N_CFG     = NUM_CFG,
  localparam int unsigned TW       = (NUM_TYPES > 1) ? $clog2(NUM_TYPES) : 1,
  localparam int unsigned IW       = $clog2(IW_ENTRIES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // frame interface (from software) and frame statistics (from counters)
  input  logic                          frame_start,
  input  logic [TW-1:0]                 frame_type,
  input  logic [31:0]                   deadline_ns,
  input  logic                          frame_end,
  input  logic [31:0]                   frame_instr,
  input  logic [31:0]                   frame_cycles,
  input  logic [31:0]                   frame_energy,
  output logic                          glob_ready,
  output logic                          profiling,
  output arch_cfg_t                     glob_cfg,
  output logic                          freq_valid,
  output logic [9:0]                    freq_mhz,
  output logic [7:0]                    rf_int_active,
  output logic [7:0]                    rf_fp_active,
  // instruction window events
  input  logic [DISP-1:0]               disp_valid,
  input  logic [DISP-1:0][IW-1:0]       disp_idx,
  input  logic [DISP-1:0]               disp_ready,
  input  logic [CPL-1:0]                cpl_valid,
  input  logic [CPL-1:0][IW-1:0]        cpl_idx,
  input  logic [CPL-1:0][IW_ENTRIES-1:0] cpl_last_consumers,
  input  logic [IW-1:0]                 head_idx,
  input  logic                          head_stall,
  input  logic                          retire_head,
  input  logic [ISS-1:0]                issue_valid,
  input  logic [ISS-1:0][IW-1:0]        issue_idx,
  input  logic [ISS-1:0]                issue_young,
  input  logic [RET-1:0]                commit_valid,
  input  logic [RET-1:0][IW-1:0]        commit_idx,
  output logic [IW_SEGS-1:0]            seg_en,
  output logic [4:0]                    iw_segs_active,
  output logic [TAG_W-1:0]              max_overlap,
  // functional unit issue
  input  logic [REQ_W-1:0]              alu_req,
  input  logic [NUM_ALU-1:0]            alu_busy,
  input  logic [REQ_W-1:0]              fpu_req,
  input  logic [NUM_FPU-1:0]            fpu_busy,
  input  logic                          fp_fetch,
  output logic [NUM_ALU-1:0]            alu_grant,
  output logic [NUM_FPU-1:0]            fpu_grant,
  output logic [NUM_ALU-1:0]            alu_en,
  output logic [NUM_FPU-1:0]            fpu_en,
  output logic [2:0]                    alus_active,
  output logic [2:0]                    fpus_active,
  output logic [3:0]                    issue_width,
  // monitoring
  output adapt_events_t                 events
);
  arch_cfg_t  gcfg;
  logic [5:0] gcfg_idx;

  assign glob_cfg = gcfg;
  logic       prof_done_evt, clamp_evt, in_frame;

  global_ctrl #(.NUM_TYPES(NUM_TYPES), .N_CFG(N_CFG)) u_global (
    .clk, .rst_n,
    .frame_start, .frame_type, .deadline_ns,
    .frame_end, .frame_instr, .frame_cycles, .frame_energy,
    .ready(glob_ready), .in_frame, .profiling,
    .cfg(gcfg), .cfg_idx(gcfg_idx),
    .freq_valid, .freq_mhz, .rf_int_active, .rf_fp_active,
    .prof_done_evt, .clamp_evt
  );

  // ---------------- instruction window (StallIW) ----------------
  localparam int unsigned CW = $clog2(((ISS > RET) ? ISS : RET) + 1);
  logic [CW-1:0]    commit_cnt, ysc_cnt;
  logic             avoid_valid;
  logic [TAG_W-1:0] avoid_cycles;
  logic [4:0]       iw_target;
  logic             iw_grow, iw_shrink, iw_waking;

  iwtag_tracker #(.ENTRIES(IW_ENTRIES), .TAG_W(TAG_W), .DISP(DISP), .CPL(CPL)) u_tags (
    .clk, .rst_n, .max_overlap,
    .disp_valid, .disp_idx, .disp_ready,
    .cpl_valid, .cpl_idx, .cpl_last_consumers,
    .head_idx, .head_stall, .retire_head,
    .avoid_valid, .avoid_cycles
  );

  ysc_tracker #(.ENTRIES(IW_ENTRIES), .ISS(ISS), .RET(RET), .AT_COMMIT(YSC_AT_COMMIT)) u_ysc (
    .clk, .rst_n, .issue_valid, .issue_idx, .issue_young, .commit_valid, .commit_idx,
    .commit_cnt, .ysc_cnt
  );

  stalliw_ctrl #(
    .IW_SEGS(IW_SEGS), .SEG_ENTRIES(SEG_ENTRIES), .MIN_SEGS(MIN_SEGS), .TAG_W(TAG_W),
    .CNT_W(CW), .PERIOD(PERIOD_C), .DEC_THR(IW_PERIODIC ? PIW_DEC_THR : IW_DEC_THR),
    .INC_THR(IW_INC_THR), .PERIODIC(IW_PERIODIC), .GROW_PER(PIW_GROW_PER)
  ) u_iw (
    .clk, .rst_n, .ysc_cnt, .commit_cnt, .avoid_valid, .avoid_cycles,
    .max_segs(gcfg.iw_segs), .target_segs(iw_target), .max_overlap,
    .inc_evt(iw_grow), .dec_evt(iw_shrink)
  );

  wake_delay #(.W(5), .DELAY(WAKE_DELAY), .RESET_VAL(IW_SEGS)) u_iw_wake (
    .clk, .rst_n, .target(iw_target), .active(iw_segs_active), .waking(iw_waking)
  );

  always_comb
    for (int unsigned s = 0; s < IW_SEGS; s++) seg_en[s] = (5'(s) < iw_segs_active);

  // ---------------- functional units (HazardFU) ----------------
  logic [2:0]       alu_target, fpu_target;
  logic [REQ_W-1:0] alu_haz, fpu_haz;
  logic             alu_last, fpu_last, alu_waking, fpu_waking;
  logic [2:0]       alu_gcnt, fpu_gcnt;

  hazardfu_ctrl #(.N(NUM_ALU), .MIN_UNITS(1), .RESET_UNITS(NUM_ALU), .REQ_W(REQ_W),
                  .PERIOD(PERIOD_C), .HAZ_THR(FU_HAZ_THR), .IDLE_MAX(FU_IDLE_MAX),
                  .UTIL(FU_UTIL), .UTIL_PCT(UFU_UTIL_PCT), .LAST_IDLE(UFU_FP_IDLE),
                  .WAKE_HOLD(WAKE_DELAY)) u_alu_ctl (
    .clk, .rst_n, .hazards(alu_haz), .last_used(alu_last), .fetch_hit(1'b0),
    .max_units(gcfg.alus), .target(alu_target),
    .inc_evt(events.alu_inc), .dec_evt(events.alu_dec), .wake_evt()
  );

  hazardfu_ctrl #(.N(NUM_FPU), .MIN_UNITS(0), .RESET_UNITS(NUM_FPU), .REQ_W(REQ_W),
                  .PERIOD(PERIOD_C), .HAZ_THR(FU_HAZ_THR), .IDLE_MAX(FU_IDLE_MAX),
                  .UTIL(FU_UTIL), .UTIL_PCT(UFU_UTIL_PCT), .LAST_IDLE(UFU_FP_IDLE),
                  .WAKE_HOLD(WAKE_DELAY)) u_fpu_ctl (
    .clk, .rst_n, .hazards(fpu_haz), .last_used(fpu_last), .fetch_hit(fp_fetch),
    .max_units(gcfg.fpus), .target(fpu_target),
    .inc_evt(events.fpu_inc), .dec_evt(events.fpu_dec), .wake_evt(events.fpu_wake)
  );

  wake_delay #(.W(3), .DELAY(WAKE_DELAY), .RESET_VAL(NUM_ALU)) u_alu_wake (
    .clk, .rst_n, .target(alu_target), .active(alus_active), .waking(alu_waking)
  );

  wake_delay #(.W(3), .DELAY(WAKE_DELAY), .RESET_VAL(NUM_FPU)) u_fpu_wake (
    .clk, .rst_n, .target(fpu_target), .active(fpus_active), .waking(fpu_waking)
  );

  fu_select #(.N(NUM_ALU), .REQ_W(REQ_W)) u_alu_sel (
    .req_cnt(alu_req), .busy(alu_busy), .active(alus_active),
    .grant(alu_grant), .grant_cnt(alu_gcnt), .hazards(alu_haz), .last_used(alu_last)
  );

  fu_select #(.N(NUM_FPU), .REQ_W(REQ_W)) u_fpu_sel (
    .req_cnt(fpu_req), .busy(fpu_busy), .active(fpus_active),
    .grant(fpu_grant), .grant_cnt(fpu_gcnt), .hazards(fpu_haz), .last_used(fpu_last)
  );

  assign issue_width = 4'(alus_active) + 4'(fpus_active) + 4'd2;

  // per-unit power enables: a disabled unit's selection logic, result-bus
  // slice, window wake-up port and register-file ports are gated with it
  always_comb begin
    for (int unsigned u = 0; u < NUM_ALU; u++) alu_en[u] = (3'(u) < alus_active);
    for (int unsigned u = 0; u < NUM_FPU; u++) fpu_en[u] = (3'(u) < fpus_active);
  end

  assign events.iw_grow    = iw_grow;
  assign events.iw_shrink  = iw_shrink;
  assign events.prof_done  = prof_done_evt;
  assign events.freq_clamp = clamp_evt;
endmodule
