// tb_iwtag_tracker: self-checking test of the IWtag bookkeeping.
// First a directed producer/consumer chain: an instruction entering with
// ready operands takes MaxOverlap, stalls 2 cycles at the head, completes and
// hands (tag - 2) to its consumer, which later stalls 10 cycles at the head
// and must report min(tag, 10) avoidable cycles. Then several thousand random
// cycles of dispatches, completions with random consumer masks, head stalls
// and retirements, compared against a reference model kept in the testbench.
module tb_iwtag_tracker;
  localparam int unsigned E = 128, D = 8, C = 4, T = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [T-1:0] max_overlap;
  logic [D-1:0] disp_valid, disp_ready;
  logic [D-1:0][6:0] disp_idx;
  logic [C-1:0] cpl_valid;
  logic [C-1:0][6:0] cpl_idx;
  logic [C-1:0][E-1:0] cpl_mask;
  logic [6:0] head_idx;
  logic head_stall, retire_head, avoid_valid;
  logic [T-1:0] avoid_cycles;
  int checks = 0, failures = 0;

  iwtag_tracker #(.ENTRIES(E), .TAG_W(T), .DISP(D), .CPL(C)) dut (
    .clk, .rst_n, .max_overlap, .disp_valid, .disp_idx, .disp_ready,
    .cpl_valid, .cpl_idx, .cpl_last_consumers(cpl_mask),
    .head_idx, .head_stall, .retire_head, .avoid_valid, .avoid_cycles);

  always #5 clk = ~clk;

  // reference model
  int ref_tag [E];
  int ref_stall;
  int exp_avoid;
  bit exp_valid;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic void idle();
    disp_valid = '0; disp_ready = '0; disp_idx = '0;
    cpl_valid = '0; cpl_idx = '0; cpl_mask = '0;
    head_stall = 0; retire_head = 0;
  endfunction

  // apply the current inputs to the model, clock once, compare
  task automatic step();
    int new_tag [E];
    int s;
    exp_valid = retire_head;
    if (retire_head)
      exp_avoid = (ref_tag[head_idx] < ref_stall) ? ref_tag[head_idx] : ref_stall;
    new_tag = ref_tag;
    for (int c = 0; c < C; c++)
      if (cpl_valid[c]) begin
        int p;
        s = (cpl_idx[c] == head_idx) ? ref_stall : 0;
        p = ref_tag[cpl_idx[c]] - s;
        if (p < 0) p = 0;
        for (int e = 0; e < E; e++) if (cpl_mask[c][e]) new_tag[e] = p;
      end
    for (int d = 0; d < D; d++)
      if (disp_valid[d]) new_tag[disp_idx[d]] = disp_ready[d] ? int'(max_overlap) : 0;
    ref_tag = new_tag;
    if (retire_head) ref_stall = 0;
    else if (head_stall && ref_stall < 15) ref_stall++;
    @(posedge clk); #1;
    check(avoid_valid == exp_valid, "avoid_valid");
    if (exp_valid)
      check(avoid_cycles == T'(exp_avoid),
            $sformatf("avoid_cycles %0d expected %0d", avoid_cycles, exp_avoid));
    @(negedge clk);
  endtask

  initial begin
    idle(); max_overlap = 0; head_idx = 0;
    for (int e = 0; e < E; e++) ref_tag[e] = 0;
    ref_stall = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // directed chain: producer in entry 10, consumer in entry 11
    max_overlap = 6;
    idle(); disp_valid[0] = 1; disp_idx[0] = 10; disp_ready[0] = 1;
            disp_valid[1] = 1; disp_idx[1] = 11; disp_ready[1] = 0; step();
    head_idx = 10;
    idle(); head_stall = 1; step();
    idle(); head_stall = 1; step();                 // producer stalled 2 cycles
    idle(); cpl_valid[0] = 1; cpl_idx[0] = 10; cpl_mask[0][11] = 1; step();
    idle(); retire_head = 1; step();                // producer retires: min(6,2)=2
    check(exp_avoid == 2, "model: producer avoidable 2");
    head_idx = 11;
    for (int i = 0; i < 10; i++) begin idle(); head_stall = 1; step(); end
    idle(); retire_head = 1; step();                // consumer: min(6-2,10)=4
    check(exp_avoid == 4, "model: consumer avoidable 4");

    // random traffic
    for (int n = 0; n < 5000; n++) begin
      idle();
      max_overlap = T'($urandom);
      head_idx = (n % 7 == 0) ? 7'($urandom) : head_idx;
      for (int d = 0; d < D; d++) begin
        disp_valid[d] = ($urandom % 3) == 0;
        disp_idx[d]   = 7'($urandom);
        disp_ready[d] = $urandom % 2;
      end
      for (int c = 0; c < C; c++) begin
        cpl_valid[c] = ($urandom % 2) == 0;
        cpl_idx[c]   = (($urandom % 3) == 0) ? head_idx : 7'($urandom);
      end
      // each entry's last operand comes from at most one producer
      for (int e = 0; e < E; e++)
        if (($urandom % 16) == 0) cpl_mask[$urandom % C][e] = 1'b1;
      head_stall  = ($urandom % 4) != 0;
      retire_head = ($urandom % 6) == 0;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
