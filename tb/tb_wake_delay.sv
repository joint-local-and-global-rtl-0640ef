// tb_wake_delay: self-checking test of the activation-delay stage.
// Checks that lowering the requested count takes effect on the next edge,
// that raising it takes effect exactly DELAY (5) cycles later, and that a
// request changed while waiting restarts the wait.
module tb_wake_delay;
  localparam int unsigned DELAY = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] target, active;
  logic waking;
  int checks = 0, failures = 0;

  wake_delay #(.W(5), .DELAY(DELAY), .RESET_VAL(16)) dut (.clk, .rst_n, .target, .active, .waking);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (active=%0d)", what, active); end
  endtask

  // cycles from a new target until active equals it
  task automatic measure(input logic [4:0] t, output int cyc);
    @(negedge clk); target = t; cyc = 0;
    while (active != t && cyc < 50) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int n;
    target = 16;
    repeat (2) @(negedge clk);
    check(active == 16, "reset value");
    rst_n = 1'b1;
    measure(10, n); check(n == 1, $sformatf("decrease takes one edge, took %0d", n));
    measure(3, n);  check(n == 1, "second decrease immediate");
    measure(4, n);  check(n == DELAY, $sformatf("increase takes %0d, took %0d", DELAY, n));
    measure(16, n); check(n == DELAY, $sformatf("large increase takes %0d, took %0d", DELAY, n));
    // a changed request during the wait restarts it
    @(negedge clk); target = 2;
    @(negedge clk); check(active == 2, "drop to 2");
    target = 5;
    repeat (3) @(negedge clk);
    check(waking && active == 2, "still waiting after 3");
    target = 6; n = 0;
    while (active != 6 && n < 50) begin @(negedge clk); n++; end
    check(n == DELAY, $sformatf("restart wait %0d", n));
    // decrease during a pending increase cancels it
    @(negedge clk); target = 3;
    @(negedge clk); target = 9;
    @(negedge clk); target = 1;
    @(negedge clk); check(active == 1 && !waking, "cancel by decrease");
    repeat (8) @(negedge clk); check(active == 1, "no late wake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
