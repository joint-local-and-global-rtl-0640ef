// tb_global_ctrl: self-checking test of the frame-level global controller at
// its default size (3 frame types, 54 candidate configurations).
// Frame types 0 and 1 are profiled in alternation with synthetic IPC and
// power for every configuration; the testbench checks the configuration
// sequence, the profiling frequency, the configuration kept (smallest
// P/IPC^3, found here with real arithmetic on the same measured values), the
// register-file sizes that follow from it, the DVS frequency
// I / (D x IPC x 0.96) against a value worked out in the testbench, clamping
// at 100 MHz and 1 GHz, and the frequency latency.
module tb_global_ctrl;
  import adapt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start, frame_end;
  logic [1:0] frame_type;
  logic [31:0] deadline_ns, frame_instr, frame_cycles, frame_energy;
  logic ready, in_frame, profiling, freq_valid, prof_done_evt, clamp_evt;
  arch_cfg_t cfg;
  logic [5:0] cfg_idx;
  logic [9:0] freq_mhz;
  logic [7:0] rf_int, rf_fp;
  int checks = 0, failures = 0;
  int n_prof_done = 0, n_clamp = 0;

  global_ctrl dut (.clk, .rst_n, .frame_start, .frame_type, .deadline_ns, .frame_end,
                   .frame_instr, .frame_cycles, .frame_energy, .ready, .in_frame, .profiling,
                   .cfg, .cfg_idx, .freq_valid, .freq_mhz, .rf_int_active(rf_int),
                   .rf_fp_active(rf_fp), .prof_done_evt, .clamp_evt);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_prof_done += int'(prof_done_evt);
    n_clamp     += int'(clamp_evt);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // synthetic behaviour of configuration k for frame type t
  function automatic int ipc_x100(int t, int k);
    arch_cfg_t c = cfg_of_index(6'(k));
    return 60 + 9 * int'(c.iw_segs) + 25 * int'(c.alus) + (t == 1 ? 30 : 4) * int'(c.fpus);
  endfunction
  function automatic int power_per_cycle(int t, int k);
    arch_cfg_t c = cfg_of_index(6'(k));
    return 40 + 3 * int'(c.iw_segs) + 5 * int'(c.alus) + 6 * int'(c.fpus) + ((k * 7 + t) % 11);
  endfunction

  // measured values as the controller derives them
  int meas_ipc [2][54];
  int meas_p   [2][54];
  int last_instr [2];

  task automatic run_frame(input int t, input int deadline, input int instr, input int cycles,
                           input int energy, output int lat);
    @(negedge clk);
    frame_start = 1; frame_type = 2'(t); deadline_ns = deadline;
    @(negedge clk);
    frame_start = 0;
    lat = 1;
    while (!freq_valid && lat < 500) begin @(negedge clk); lat++; end
    repeat (3) @(negedge clk);
    frame_end = 1; frame_instr = instr; frame_cycles = cycles; frame_energy = energy;
    @(negedge clk);
    frame_end = 0;
    while (!ready || in_frame) @(negedge clk);
    last_instr[t] = instr;
  endtask

  initial begin
    int lat, best [2];
    real bestm [2];
    frame_start = 0; frame_end = 0; frame_type = 0; deadline_ns = 0;
    frame_instr = 0; frame_cycles = 1; frame_energy = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(ready && !in_frame, "idle after reset");

    // profiling, types 0 and 1 alternating
    for (int k = 0; k < 54; k++)
      for (int t = 0; t < 2; t++) begin
        int instr, cycles, energy;
        instr  = 200000 + 1000 * k + t;
        cycles = instr * 100 / ipc_x100(t, k);
        energy = cycles * power_per_cycle(t, k);
        meas_ipc[t][k] = int'((longint'(instr) * 256) / longint'(cycles));
        meas_p[t][k]   = int'((longint'(energy) * 256) / longint'(cycles));
        fork
          begin
            @(negedge clk); @(negedge clk);
            check(profiling && cfg_idx == 6'(k) && freq_mhz == 10'(F_MAX_MHZ),
                  $sformatf("profile frame t=%0d k=%0d cfg=%0d prof=%b f=%0d",
                            t, k, cfg_idx, profiling, freq_mhz));
          end
        join_none
        run_frame(t, 1000000, instr, cycles, energy, lat);
        check(lat == 1, $sformatf("profiling frequency latency %0d", lat));
      end
    @(negedge clk);
    check(n_prof_done == 2, $sformatf("profiling completions %0d", n_prof_done));

    // expected choices
    for (int t = 0; t < 2; t++) begin
      best[t] = 0; bestm[t] = 1.0e30;
      for (int k = 0; k < 54; k++) begin
        real m;
        m = real'(meas_p[t][k]) / (real'(meas_ipc[t][k]) ** 3);
        if (m < bestm[t]) begin bestm[t] = m; best[t] = k; end
      end
      $display("type %0d: expected configuration %0d", t, best[t]);
    end

    // adaptation frames
    for (int t = 0; t < 2; t++) begin
      for (int rep = 0; rep < 4; rep++) begin
        int dl, instr, cycles, exp_f, ipc_prev, lat2;
        longint num, den, q;
        arch_cfg_t ec;
        dl = (rep == 2) ? 2000000000 : (rep == 3 ? 1000 : (rep == 0 ? 150000 : 200000));
        ipc_prev = meas_ipc[t][best[t]];   // profiled IPC first, then the last frame's
        num = longint'(last_instr[t]) * 3200000;
        den = longint'(dl) * ipc_prev * 12;
        q = num / den;
        exp_f = (q > 1000) ? 1000 : (q < 100 ? 100 : int'(q));
        $display("type %0d frame %0d: deadline %0d ns -> %0d MHz", t, rep, dl, exp_f);
        instr = 300000 + 5000 * rep;
        cycles = instr * 100 / ipc_x100(t, best[t]);
        fork
          begin
            while (!freq_valid) @(negedge clk);
            ec = cfg_of_index(6'(best[t]));
            check(!profiling && cfg_idx == 6'(best[t]),
                  $sformatf("t=%0d chosen cfg %0d expected %0d", t, cfg_idx, best[t]));
            check(freq_mhz == 10'(exp_f),
                  $sformatf("t=%0d rep=%0d f=%0d expected %0d", t, rep, freq_mhz, exp_f));
            check(rf_int == 8'(192 - (128 - 8 * int'(ec.iw_segs))) && rf_fp == rf_int,
                  $sformatf("register files %0d/%0d", rf_int, rf_fp));
          end
        join_none
        run_frame(t, dl, instr, cycles, cycles * power_per_cycle(t, best[t]), lat2);
        check(lat2 >= 60 && lat2 <= 70, $sformatf("frequency latency %0d", lat2));
        meas_ipc[t][best[t]] = int'((longint'(instr) * 256) / longint'(cycles));
      end
    end
    check(n_clamp == 4, $sformatf("clamp events %0d", n_clamp));

    // type 2 has never run: it must start profiling from configuration 0
    fork
      begin
        @(negedge clk); @(negedge clk);
        check(profiling && cfg_idx == 0, "fresh type profiles configuration 0");
      end
    join_none
    run_frame(2, 1000000, 1000, 500, 5000, lat);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
