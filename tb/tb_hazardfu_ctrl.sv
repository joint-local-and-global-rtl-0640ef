// tb_hazardfu_ctrl: self-checking test of the HazardFU unit-count controller.
// Two instances run side by side: an ALU pool (6 units, at least one on) and
// an FPU pool (4 units, may be fully off). A per-edge script drives hazards,
// last-unit use and FP fetches, and checks the requested count at the exact
// edges where the algorithm must act: period ends every 200 cycles, the 80th
// hazard, the 4-cycle idle limit, the "unused at all" rule for the last FPU,
// wake on fetch, and a lowered global ceiling. A second pair of instances in
// UtilFU mode gets the same inputs and is checked for its own rules: growth
// at 86% (172 of 200 cycles) use of the last unit, no growth on hazards, and
// the last FPU dropped after 3 unused cycles in a row (counted only once a
// woken unit has powered up).
module tb_hazardfu_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] a_haz, f_haz;
  logic a_last, f_last, f_fetch;
  logic [2:0] a_max, f_max, a_tgt, f_tgt;
  logic a_inc, a_dec, a_wake, f_inc, f_dec, f_wake;
  int checks = 0, failures = 0;
  int edge_no = 0;
  logic [2:0] ua_tgt, uf_tgt;
  logic ua_inc, ua_dec, uf_inc, uf_dec, uf_wake;
  int n_ua_inc = 0, n_ua_dec = 0, n_uf_dec = 0, n_uf_wake = 0, n_uf_inc = 0;

  hazardfu_ctrl #(.N(6), .MIN_UNITS(1), .RESET_UNITS(6)) u_alu (
    .clk, .rst_n, .hazards(a_haz), .last_used(a_last), .fetch_hit(1'b0), .max_units(a_max),
    .target(a_tgt), .inc_evt(a_inc), .dec_evt(a_dec), .wake_evt(a_wake));
  hazardfu_ctrl #(.N(4), .MIN_UNITS(0), .RESET_UNITS(4)) u_fpu (
    .clk, .rst_n, .hazards(f_haz), .last_used(f_last), .fetch_hit(f_fetch), .max_units(f_max),
    .target(f_tgt), .inc_evt(f_inc), .dec_evt(f_dec), .wake_evt(f_wake));

  hazardfu_ctrl #(.N(6), .MIN_UNITS(1), .RESET_UNITS(6), .UTIL(1'b1)) u_alu_u (
    .clk, .rst_n, .hazards(a_haz), .last_used(a_last), .fetch_hit(1'b0), .max_units(a_max),
    .target(ua_tgt), .inc_evt(ua_inc), .dec_evt(ua_dec), .wake_evt());
  hazardfu_ctrl #(.N(4), .MIN_UNITS(0), .RESET_UNITS(4), .UTIL(1'b1)) u_fpu_u (
    .clk, .rst_n, .hazards(f_haz), .last_used(f_last), .fetch_hit(f_fetch), .max_units(f_max),
    .target(uf_tgt), .inc_evt(uf_inc), .dec_evt(uf_dec), .wake_evt(uf_wake));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at edge %0d: %s (alu=%0d fpu=%0d)", edge_no, what, a_tgt, f_tgt);
    end
  endtask

  // inputs for the coming edge e (1-based, counted from reset release)
  function automatic void drive(int e);
    a_haz = 0; f_haz = 0; a_last = 0; f_last = 0; f_fetch = 0;
    a_max = (e > 1000) ? 3'd2 : 3'd6;
    f_max = 3'd4;
    if (e > 200 && e <= 204) a_last = 1;            // used 4 cycles: may shrink
    if (e > 400 && e <= 405) a_last = 1;            // used 5 cycles: must not shrink
    if (e > 600 && e <= 640) a_haz = 2;             // 80 hazards by edge 640
    if (e > 800 && e <= 1000) a_haz = 1;            // 80 more by 880, 160 by 960
    if (e == 700 || e == 900) f_last = 1;           // last FPU used once
    if (e == 1250) f_fetch = 1;
    if (e > 1400 && e <= 1571) a_last = 1;          // 171 busy cycles: UtilFU keeps
    if (e > 1600 && e <= 1772) a_last = 1;          // 172 busy cycles: UtilFU grows
  endfunction

  initial begin
    drive(1);
    repeat (3) @(negedge clk);
    check(a_tgt == 6 && f_tgt == 4, "reset counts");
    rst_n = 1'b1;
    for (int e = 1; e <= 1800; e++) begin
      drive(e);
      @(posedge clk); #1; edge_no = e;
      n_ua_inc += int'(ua_inc); n_ua_dec += int'(ua_dec);
      n_uf_inc += int'(uf_inc); n_uf_dec += int'(uf_dec); n_uf_wake += int'(uf_wake);
      case (e)
        200:  check(ua_tgt == 5 && uf_tgt == 3, "util: idle period shrinks both");
        400:  check(ua_tgt == 4 && uf_tgt == 2, "util: 4 busy cycles still shrink");
        600:  check(ua_tgt == 4 && uf_tgt == 1, "util: 5 busy cycles keep the ALU count");
        602:  check(uf_tgt == 1, "util: last FPU kept for 2 idle cycles");
        603:  check(uf_tgt == 0 && uf_dec, "util: last FPU off after 3 idle cycles in a row");
        640:  check(ua_tgt == 4, "util: hazards do not grow");
        800:  check(ua_tgt == 3, "util: shrink");
        1250: check(uf_tgt == 1 && uf_wake, "util: FP fetch wakes one FPU");
        1257: check(uf_tgt == 1, "util: woken FPU kept through power-up and 2 idle cycles");
        1258: check(uf_tgt == 0, "util: woken FPU unused 3 cycles after power-up: off");
        1400: check(ua_tgt == 1, "util: ALU at minimum");
        1600: check(ua_tgt == 1, "util: 171 of 200 busy cycles: no growth");
        1800: check(ua_tgt == 2 && ua_inc, "util: 172 of 200 busy cycles: grow");
        default: ;
      endcase
      case (e)
        199:  check(a_tgt == 6 && f_tgt == 4, "no change before first period end");
        200:  check(a_tgt == 5 && f_tgt == 3 && a_dec && f_dec, "idle period shrinks both");
        400:  check(a_tgt == 4 && f_tgt == 2, "4 busy cycles still shrink");
        600:  check(a_tgt == 4 && f_tgt == 1, "5 busy cycles keep the ALU count");
        639:  check(a_tgt == 4, "79 hazards: no growth yet");
        640:  check(a_tgt == 5 && a_inc, "80th hazard grows ALUs");
        800:  check(a_tgt == 5 && f_tgt == 1, "no shrink in a period that grew; last FPU used once");
        879:  check(a_tgt == 5, "before next 80 hazards");
        880:  check(a_tgt == 6, "second growth");
        960:  check(a_tgt == 6 && !a_inc, "growth capped at ceiling");
        1000: check(a_tgt == 6 && f_tgt == 1, "no shrink after growth; FPU kept");
        1001: check(a_tgt == 2, "lowered ceiling applies at once");
        1200: check(a_tgt == 1 && f_tgt == 0, "shrink to ALU minimum; last FPU off when unused");
        1249: check(f_tgt == 0, "FPU off before fetch");
        1250: check(f_tgt == 1 && f_wake, "FP fetch wakes one FPU");
        1400: check(a_tgt == 1 && f_tgt == 0, "ALU stays at minimum; FPU off again");
        1800: check(a_tgt == 1 && f_tgt == 0, "busy last ALU without hazards: no growth");
        default: ;
      endcase
    end
    check(n_ua_inc == 1 && n_ua_dec == 5 && n_uf_inc == 0 && n_uf_dec == 5 && n_uf_wake == 1,
          $sformatf("util event counts %0d %0d %0d %0d %0d", n_ua_inc, n_ua_dec, n_uf_inc,
                    n_uf_dec, n_uf_wake));
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
