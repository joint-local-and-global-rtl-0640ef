// tb_workloads: the nine multimedia applications of the evaluation (GSM,
// G.728, H.263, MPEG-2 and MP3 decoders/encoders), run through the full
// controller at their real frame sizes and default deadlines.
//
// No core is simulated: for each frame only the frame calls and the frame
// statistics are driven, which is all the global loop sees. Per application
// the frame deadline is its default deadline; a frame holds
// deadline/3 x 1 GHz x base IPC instructions (the default deadline is three
// times the longest frame on the base processor at 1 GHz). Each
// configuration's IPC and power are synthetic, scaled to the application's
// base IPC. Every frame type is profiled over all 54 configurations, then
// three frames per type are adapted with instruction counts varying by
// +-10%. Checked: profiling completes for every type, the chosen
// configuration has the smallest P/IPC^3, the frequency matches the formula,
// and, unless it is pinned at 1 GHz, the predicted frame time at that
// frequency with the predicted IPC fits within the deadline.
module tb_workloads;
  import adapt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start = 0, frame_end = 0;
  logic [1:0] frame_type = 0;
  logic [31:0] deadline_ns = 0, frame_instr = 0, frame_cycles = 1, frame_energy = 0;
  logic glob_ready, profiling, freq_valid;
  arch_cfg_t glob_cfg;
  logic [9:0] freq_mhz;
  adapt_events_t ev;
  int checks = 0, failures = 0;

  adapt_top dut (
    .clk, .rst_n, .frame_start, .frame_type, .deadline_ns, .frame_end, .frame_instr,
    .frame_cycles, .frame_energy, .glob_ready, .profiling, .glob_cfg, .freq_valid, .freq_mhz,
    .rf_int_active(), .rf_fp_active(),
    .disp_valid('0), .disp_idx('0), .disp_ready('0), .cpl_valid('0), .cpl_idx('0),
    .cpl_last_consumers('0), .head_idx('0), .head_stall(1'b0), .retire_head(1'b0),
    .issue_valid('0), .issue_idx('0), .issue_young('0),
    .commit_valid('0), .commit_idx('0), .seg_en(), .iw_segs_active(), .max_overlap(),
    .alu_req('0), .alu_busy('0), .fpu_req('0), .fpu_busy('0), .fp_fetch(1'b0),
    .alu_grant(), .fpu_grant(), .alu_en(), .fpu_en(), .alus_active(), .fpus_active(),
    .issue_width(), .events(ev));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  typedef struct {
    string name;
    int    deadline_ns;
    int    base_ipc_x10;
    int    types;
  } app_t;

  app_t apps [9] = '{
    '{"GSMdec",     50000, 40, 1}, '{"GSMenc",   140000, 48, 1},
    '{"G728dec",    60000, 24, 1}, '{"G728enc",   70000, 22, 1},
    '{"H263dec",  2900000, 35, 2}, '{"H263enc", 40000000, 25, 2},
    '{"MPGdec",   6300000, 38, 3}, '{"MPGenc",  66600000, 27, 3},
    '{"MP3dec",   1400000, 31, 1}};

  // synthetic IPC (x1000) of configuration k: base IPC on the full
  // configuration, falling with fewer resources; power per cycle grows with
  // resources, and grows more slowly for higher frame types
  function automatic longint ipc_x1000(int base_x10, int t, int k);
    arch_cfg_t c = cfg_of_index(6'(k));
    return longint'(base_x10) * 100 * (40 + 2 * int'(c.iw_segs) + 6 * int'(c.alus) + (t + 1) * int'(c.fpus))
           / (40 + 32 + 36 + 4 * (t + 1));
  endfunction
  function automatic int power_pc(int t, int k);
    arch_cfg_t c = cfg_of_index(6'(k));
    return (t == 0) ? 30 + 3 * int'(c.iw_segs) + 6 * int'(c.alus) + 6 * int'(c.fpus)
                    : 200 + int'(c.iw_segs) / t + 2 * int'(c.alus) + int'(c.fpus) + ((k * 5 + t) % 7);
  endfunction

  task automatic frame(input int t, input int dl, input longint instr, input longint cycles,
                       input longint energy);
    while (!glob_ready) @(negedge clk);
    frame_start = 1; frame_type = 2'(t); deadline_ns = dl;
    @(negedge clk);
    frame_start = 0;
    while (!freq_valid) @(negedge clk);
    @(negedge clk);
    frame_end = 1; frame_instr = 32'(instr); frame_cycles = 32'(cycles);
    frame_energy = 32'(energy);
    @(negedge clk);
    frame_end = 0;
  endtask

  initial begin
    foreach (apps[a]) begin
      longint base_instr, ipc_q8 [3][54];
      int best [3], n_done;
      real bestm;
      rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      @(negedge clk);
      // deadline = 3 x longest frame at 1 GHz, so a frame is deadline/3 cycles of base IPC
      base_instr = longint'(apps[a].deadline_ns) / 3 * apps[a].base_ipc_x10 / 10;
      n_done = 0;
      for (int k = 0; k < NUM_CFG; k++)
        for (int t = 0; t < apps[a].types; t++) begin
          longint cyc;
          // instr x 1000 / ipc, ipc scaled so that the full configuration is near base IPC
          cyc = base_instr * 1000 / ipc_x1000(apps[a].base_ipc_x10, t, k);
          if (cyc < 1) cyc = 1;
          ipc_q8[t][k] = base_instr * 256 / cyc;
          frame(t, apps[a].deadline_ns, base_instr, cyc, cyc * power_pc(t, k) / 16);
          n_done += int'(ev.prof_done);
          while (!glob_ready) begin @(negedge clk); n_done += int'(ev.prof_done); end
        end
      check(n_done == apps[a].types, $sformatf("%s: profiling done for %0d types", apps[a].name, n_done));
      for (int t = 0; t < apps[a].types; t++) begin
        longint prev_i, prev_ipc;
        best[t] = 0; bestm = 1.0e30;
        for (int k = 0; k < NUM_CFG; k++) begin
          real m, p;
          longint cyc;
          cyc = base_instr * 256 / ipc_q8[t][k];
          p = real'((longint'(base_instr * 256 / ipc_q8[t][k]) * power_pc(t, k) / 16) * 256 / cyc);
          m = p / (real'(ipc_q8[t][k]) ** 3);
          if (m < bestm) begin bestm = m; best[t] = k; end
        end
        prev_i = base_instr;
        prev_ipc = ipc_q8[t][best[t]];
        for (int r = 0; r < 3; r++) begin
          longint instr, cyc, q;
          int ef;
          real t_us;
          instr = base_instr * (90 + 10 * r) / 100;
          cyc = instr * 256 / ipc_q8[t][best[t]];
          q = prev_i * 3200000 / (longint'(apps[a].deadline_ns) * prev_ipc * 12);
          ef = (q > 1000) ? 1000 : (q < 100 ? 100 : int'(q));
          fork
            begin
              while (!freq_valid) @(negedge clk);
              check(glob_cfg == cfg_of_index(6'(best[t])),
                    $sformatf("%s type %0d: configuration", apps[a].name, t));
              check(freq_mhz == 10'(ef), $sformatf("%s type %0d: %0d MHz expected %0d",
                                                   apps[a].name, t, freq_mhz, ef));
              t_us = real'(prev_i) / (real'(freq_mhz) * real'(prev_ipc) / 256.0);
              check(freq_mhz == 10'd1000 || t_us * 1000.0 <= real'(apps[a].deadline_ns),
                    $sformatf("%s: predicted %0.1f us over deadline", apps[a].name, t_us));
              if (r == 0)
                $display("%-8s type %0d: %0d instr/frame, config %0d (IW %0d ALU %0d FPU %0d), %0d MHz",
                         apps[a].name, t, prev_i, best[t], 8 * int'(glob_cfg.iw_segs),
                         glob_cfg.alus, glob_cfg.fpus, freq_mhz);
            end
          join_none
          frame(t, apps[a].deadline_ns, instr, cyc, cyc * power_pc(t, best[t]) / 16);
          while (!glob_ready) @(negedge clk);
          prev_i = instr;
          prev_ipc = instr * 256 / cyc;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
