// tb_baselines: the end-to-end test of tb_adapt_top, run on the controller
// built with the baseline local algorithms (IW_PERIODIC = 1: PeriodicIW
// window control; FU_UTIL = 1: UtilFU unit control) and every other
// parameter at its default.
//
// The same behavioural core, frames and deadlines are used, and the same
// things are checked: floors and global ceilings every cycle, segment and
// unit enables, grants, issue width, register-file sizes, the 5-cycle
// activation delay of every growth, the DVS frequency of every adapted
// frame, and that each adaptation mechanism occurs at least once.
module tb_baselines;
  import adapt_pkg::*;
  localparam int PHASE_LEN = 250;
  localparam int FRAME_LEN = 4 * PHASE_LEN;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start, frame_end;
  logic [1:0] frame_type;
  logic [31:0] deadline_ns, frame_instr, frame_cycles, frame_energy;
  logic glob_ready, profiling, freq_valid;
  arch_cfg_t glob_cfg;
  logic [9:0] freq_mhz;
  logic [7:0] rf_int, rf_fp;
  logic [7:0] disp_valid, disp_ready;
  logic [7:0][6:0] disp_idx;
  logic [3:0] cpl_valid;
  logic [3:0][6:0] cpl_idx;
  logic [3:0][127:0] cpl_mask;
  logic [6:0] head_idx;
  logic head_stall, retire_head;
  logic [11:0] issue_valid, issue_young;
  logic [11:0][6:0] issue_idx;
  logic [7:0] commit_valid;
  logic [7:0][6:0] commit_idx;
  logic [3:0] commit_cnt;
  int   young_mode;
  logic [6:0] issue_base;
  logic [15:0] seg_en;
  logic [4:0] iw_segs;
  logic [3:0] max_overlap;
  logic [3:0] alu_req, fpu_req;
  logic [5:0] alu_busy, alu_grant;
  logic [3:0] fpu_busy, fpu_grant;
  logic [5:0] alu_en;
  logic [3:0] fpu_en;
  logic fp_fetch;
  logic [2:0] alus, fpus;
  logic [3:0] issue_width;
  adapt_events_t ev;

  adapt_top #(.IW_PERIODIC(1'b1), .FU_UTIL(1'b1)) dut (
    .clk, .rst_n, .frame_start, .frame_type, .deadline_ns, .frame_end, .frame_instr,
    .frame_cycles, .frame_energy, .glob_ready, .profiling, .glob_cfg, .freq_valid, .freq_mhz,
    .rf_int_active(rf_int), .rf_fp_active(rf_fp),
    .disp_valid, .disp_idx, .disp_ready, .cpl_valid, .cpl_idx, .cpl_last_consumers(cpl_mask),
    .head_idx, .head_stall, .retire_head, .issue_valid, .issue_idx, .issue_young,
    .commit_valid, .commit_idx,
    .seg_en, .iw_segs_active(iw_segs), .max_overlap,
    .alu_req, .alu_busy, .fpu_req, .fpu_busy, .fp_fetch, .alu_grant, .fpu_grant, .alu_en, .fpu_en,
    .alus_active(alus), .fpus_active(fpus), .issue_width, .events(ev));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_iw_grow = 0, n_iw_shrink = 0, n_alu_inc = 0, n_alu_dec = 0, n_fpu_inc = 0;
  int n_fpu_dec = 0, n_fpu_wake = 0, n_prof_done = 0, n_clamp = 0, n_ceiling = 0;
  int n_wake_checked = 0, n_freq_checked = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- behavioural core ----------------
  bit   in_frame_model = 0;
  int   frame_cyc = 0;
  longint frame_commits = 0, frame_energy_acc = 0;
  int   cfg_stable = 0;
  arch_cfg_t prev_cfg;

  function automatic int phase_of(int c);
    return (c / PHASE_LEN) % 4;
  endfunction

  // inputs for the next clock edge
  always @(negedge clk) if (rst_n) begin
    int ph;
    ph = phase_of(frame_cyc);
    disp_valid = '0; disp_ready = '0; disp_idx = '0;
    cpl_valid = '0; cpl_idx = '0; cpl_mask = '0;
    head_stall = 0; retire_head = 0; young_mode = 0;
    alu_req = 0; fpu_req = 0; fp_fetch = 0;
    alu_busy = '0; fpu_busy = '0;
    if (in_frame_model) begin
      unique case (ph)
        0: begin                                   // integer heavy
          alu_req = 4'(5 + $urandom % 4);
          young_mode = 1;
        end
        1: begin                                   // quiet
          alu_req = 4'($urandom % 2);
        end
        2: begin                                   // memory bound
          alu_req = 4'($urandom % 2);
          head_stall = 1;
          retire_head = ($urandom % 12) == 0;
          young_mode = 2;
          for (int d = 0; d < 8; d++) begin
            disp_valid[d] = 1; disp_idx[d] = 7'(d * 16 + ($urandom % 16)); disp_ready[d] = 1;
          end
        end
        default: begin                             // floating point heavy
          alu_req = 4'(1 + $urandom % 2);
          fpu_req = 4'(2 + $urandom % 4);
          fp_fetch = 1;
          young_mode = 1;
        end
      endcase
      head_idx = 7'($urandom);
      if (($urandom % 3) == 0) begin
        cpl_valid[0] = 1; cpl_idx[0] = 7'($urandom); cpl_mask[0][$urandom % 128] = 1'b1;
      end
    end
  end

  // every granted instruction issues into a window entry (entries handed out
  // round robin); young_mode 0: none from the youngest segment, 1: about
  // half, 2: all. Each issued instruction commits one cycle later, at most
  // eight per cycle.
  logic [11:0] young_rand;
  always @(negedge clk) young_rand = 12'($urandom);
  always_comb begin
    int n;
    n = $countones(alu_grant) + $countones(fpu_grant);
    for (int i = 0; i < 12; i++) begin
      issue_valid[i] = i < n;
      issue_idx[i]   = issue_base + 7'(i);
      issue_young[i] = (young_mode == 2) || (young_mode == 1 && young_rand[i]);
    end
  end
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      issue_base <= '0; commit_valid <= '0; commit_idx <= '0;
    end else begin
      issue_base   <= issue_base + 7'($countones(issue_valid));
      commit_valid <= issue_valid[7:0];
      commit_idx   <= issue_idx[7:0];
    end
  always_comb commit_cnt = 4'($countones(commit_valid));

  // ---------------- per-cycle checks and counters ----------------
  int grow_age_iw = -1, grow_age_alu = -1, grow_age_fpu = -1;
  int iw_before, alu_before, fpu_before;

  always @(posedge clk) if (rst_n) begin
    #1;
    n_iw_grow   += int'(ev.iw_grow);
    n_iw_shrink += int'(ev.iw_shrink);
    n_alu_inc   += int'(ev.alu_inc);
    n_alu_dec   += int'(ev.alu_dec);
    n_fpu_inc   += int'(ev.fpu_inc);
    n_fpu_dec   += int'(ev.fpu_dec);
    n_fpu_wake  += int'(ev.fpu_wake);
    n_prof_done += int'(ev.prof_done);
    n_clamp     += int'(ev.freq_clamp);

    cfg_stable = (glob_cfg == prev_cfg) ? cfg_stable + 1 : 0;
    if (glob_cfg != prev_cfg && (iw_segs > glob_cfg.iw_segs || alus > glob_cfg.alus
                                 || fpus > glob_cfg.fpus)) n_ceiling++;
    prev_cfg = glob_cfg;

    if (in_frame_model) begin
      frame_cyc++;
      frame_commits += longint'(commit_cnt);
      frame_energy_acc += 20 + 2 * iw_segs + 5 * alus + 6 * fpus;
    end

    check(iw_segs >= 5'(MIN_SEGS) && alus >= 1, "floors");
    if (cfg_stable >= 3)
      check(iw_segs <= glob_cfg.iw_segs && alus <= glob_cfg.alus && fpus <= glob_cfg.fpus,
            $sformatf("ceiling iw=%0d/%0d alu=%0d/%0d fpu=%0d/%0d", iw_segs, glob_cfg.iw_segs,
                      alus, glob_cfg.alus, fpus, glob_cfg.fpus));
    check(seg_en == 16'((32'd1 << iw_segs) - 1), "segment enables");
    check(issue_width == 4'(alus) + 4'(fpus) + 4'd2, "issue width");
    check(alu_en == 6'((1 << alus) - 1) && fpu_en == 4'((1 << fpus) - 1), "unit enables");
    check(rf_int == 8'(64 + 8 * int'(glob_cfg.iw_segs)) && rf_fp == rf_int, "register files");
    begin
      int ag, fg;
      ag = (int'(alu_req) < int'(alus)) ? int'(alu_req) : int'(alus);
      fg = (int'(fpu_req) < int'(fpus)) ? int'(fpu_req) : int'(fpus);
      check(alu_grant == 6'((1 << ag) - 1) && fpu_grant == 4'((1 << fg) - 1),
            $sformatf("grants alu %b (req %0d act %0d) fpu %b (req %0d act %0d)",
                      alu_grant, alu_req, alus, fpu_grant, fpu_req, fpus));
    end

    // activation delay: each growth shows up exactly 5 cycles after the request
    if (grow_age_iw >= 0) begin
      grow_age_iw++;
      if (grow_age_iw == 4) check(iw_segs == 5'(iw_before), "window not yet grown at 4");
      if (grow_age_iw == 5) begin
        check(iw_segs == 5'(iw_before + 1), "window grown after 5 cycles");
        n_wake_checked++; grow_age_iw = -1;
      end
    end
    if (grow_age_alu >= 0) begin
      grow_age_alu++;
      if (grow_age_alu == 4) check(alus == 3'(alu_before), "ALU not yet on at 4");
      if (grow_age_alu == 5) begin
        check(alus == 3'(alu_before + 1), "ALU on after 5 cycles");
        n_wake_checked++; grow_age_alu = -1;
      end
    end
    if (grow_age_fpu >= 0) begin
      grow_age_fpu++;
      if (grow_age_fpu == 5) begin
        check(fpus == 3'(fpu_before + 1), "FPU on after 5 cycles");
        n_wake_checked++; grow_age_fpu = -1;
      end
    end
    if (ev.iw_grow && cfg_stable >= 3)  begin grow_age_iw = 0;  iw_before = int'(iw_segs); end
    if (ev.alu_inc && cfg_stable >= 3)  begin grow_age_alu = 0; alu_before = int'(alus); end
    if ((ev.fpu_inc || ev.fpu_wake) && cfg_stable >= 3) begin
      grow_age_fpu = 0; fpu_before = int'(fpus);
    end
  end

  // ---------------- frames ----------------
  longint prev_instr [2], prev_ipc [2];
  longint prof_ipc [2][NUM_CFG];
  bit     first_adapt [2] = '{1, 1};

  task automatic run_frame(input int t, input int dl, input bit expect_profile, input int k);
    while (!glob_ready) @(negedge clk);
    @(negedge clk);
    frame_start = 1; frame_type = 2'(t); deadline_ns = dl;
    @(negedge clk);
    frame_start = 0;
    while (!freq_valid) @(negedge clk);
    check(profiling == expect_profile, "profiling flag");
    if (!expect_profile) begin
      longint q;
      int ef;
      if (first_adapt[t]) begin
        // first adapted frame: profiled IPC of the configuration now chosen
        for (int k = 0; k < NUM_CFG; k++)
          if (cfg_of_index(6'(k)) == glob_cfg) prev_ipc[t] = prof_ipc[t][k];
        first_adapt[t] = 0;
      end
      q = (prev_instr[t] * 3200000) / (longint'(dl) * prev_ipc[t] * 12);
      ef = (q > 1000) ? 1000 : (q < 100 ? 100 : int'(q));
      check(freq_mhz == 10'(ef), $sformatf("type %0d frequency %0d expected %0d", t, freq_mhz, ef));
      n_freq_checked++;
    end else begin
      check(freq_mhz == 10'd1000, "profiling at 1 GHz");
    end
    frame_cyc = 0; frame_commits = 0; frame_energy_acc = 0;
    in_frame_model = 1;
    while (frame_cyc < FRAME_LEN) @(negedge clk);
    in_frame_model = 0;
    frame_end = 1; frame_instr = 32'(frame_commits); frame_cycles = 32'(FRAME_LEN);
    frame_energy = 32'(frame_energy_acc);
    prev_instr[t] = frame_commits;
    prev_ipc[t] = (frame_commits * 256) / longint'(FRAME_LEN);
    if (expect_profile) prof_ipc[t][k] = prev_ipc[t];
    @(negedge clk);
    frame_end = 0;
  endtask

  initial begin
    frame_start = 0; frame_end = 0; frame_type = 0; deadline_ns = 0;
    frame_instr = 0; frame_cycles = 1; frame_energy = 0;
    disp_valid = '0; disp_ready = '0; disp_idx = '0; cpl_valid = '0; cpl_idx = '0;
    cpl_mask = '0; head_idx = 0; head_stall = 0; retire_head = 0; young_mode = 0;
    alu_req = 0; fpu_req = 0; alu_busy = '0; fpu_busy = '0; fp_fetch = 0;
    prev_cfg = '0;
    repeat (3) @(negedge clk);
    check(iw_segs == 16 && alus == 6 && fpus == 4, "reset: everything on");
    rst_n = 1'b1;

    // profiling: 54 frames per type, two types interleaved
    for (int k = 0; k < NUM_CFG; k++)
      for (int t = 0; t < 2; t++) run_frame(t, 1000000, 1'b1, k);
    // adaptation: in-range, relaxed (clamped low) and impossible (clamped high) deadlines
    for (int r = 0; r < 3; r++)
      for (int t = 0; t < 2; t++)
        run_frame(t, (r == 0) ? 4000 : (r == 1 ? 100000000 : 200), 1'b0, 0);
    while (!glob_ready) @(negedge clk);
    repeat (10) @(negedge clk);

    $display("events: iw_grow=%0d iw_shrink=%0d alu_inc=%0d alu_dec=%0d fpu_inc=%0d fpu_dec=%0d",
             n_iw_grow, n_iw_shrink, n_alu_inc, n_alu_dec, n_fpu_inc, n_fpu_dec);
    $display("        fpu_wake=%0d prof_done=%0d freq_clamp=%0d ceiling=%0d wake_checked=%0d freq_checked=%0d",
             n_fpu_wake, n_prof_done, n_clamp, n_ceiling, n_wake_checked, n_freq_checked);
    check(n_iw_grow > 0,   "window growth happened");
    check(n_iw_shrink > 0, "window shrink happened");
    check(n_alu_inc > 0,   "ALU growth happened");
    check(n_alu_dec > 0,   "ALU shrink happened");
    check(n_fpu_inc > 0,   "FPU growth happened");
    check(n_fpu_dec > 0,   "FPU shrink happened");
    check(n_fpu_wake > 0,  "FPU wake on fetch happened");
    check(n_prof_done == 2, "both frame types finished profiling");
    check(n_clamp >= 2,    "frequency clamping happened");
    check(n_ceiling > 0,   "a lowered global ceiling cut local sizes");
    check(n_wake_checked > 0, "activation delay observed");
    check(n_freq_checked == 6, "adaptation frequencies checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
