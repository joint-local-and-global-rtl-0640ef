// tb_fu_select: self-checking test of prioritized unit allocation.
// For every combination of request count, busy mask and active count of a
// 6-unit pool, compares grants, grant count, hazard count and last-unit use
// with a reference computed by a different method (counting free active
// units and granting the lowest min(req, free) of them).
module tb_fu_select;
  localparam int unsigned N = 6;
  logic [3:0] req_cnt, hazards;
  logic [N-1:0] busy, grant;
  logic [2:0] active, grant_cnt;
  logic last_used;
  int checks = 0, failures = 0;

  fu_select #(.N(N), .REQ_W(4)) dut (.req_cnt, .busy, .active, .grant, .grant_cnt,
                                     .hazards, .last_used);

  initial begin
    for (int act = 0; act <= N; act++)
      for (int bm = 0; bm < (1 << N); bm++)
        for (int rq = 0; rq < 12; rq++) begin
          logic [N-1:0] free, exp_grant;
          int nfree, ngrant;
          req_cnt = 4'(rq); busy = N'(bm); active = 3'(act);
          #1;
          free = '0;
          for (int u = 0; u < act; u++) free[u] = !busy[u];
          nfree = $countones(free);
          ngrant = (rq < nfree) ? rq : nfree;
          exp_grant = '0;
          begin
            int k;
            k = 0;
            for (int u = 0; u < N; u++)
              if (free[u] && k < ngrant) begin exp_grant[u] = 1'b1; k++; end
          end
          checks++;
          if (grant != exp_grant || grant_cnt != 3'(ngrant) || hazards != 4'(rq - ngrant)
              || last_used != (act > 0 && exp_grant[(act > 0) ? act - 1 : 0])) begin
            failures++;
            if (failures < 10)
              $display("FAIL act=%0d busy=%b req=%0d grant=%b exp=%b haz=%0d last=%b",
                       act, busy, rq, grant, exp_grant, hazards, last_used);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
