// tb_seq_div: self-checking test of the multi-cycle divider.
// Divides random and corner-case operands at W = 32 and checks quotient and
// remainder against the simulator's own / and % operators, that `done`
// arrives exactly W + 1 cycles after `start`, and the divide-by-zero convention.
module tb_seq_div;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [W-1:0] a, b, q, r;
  logic busy, done;
  int checks = 0, failures = 0;

  seq_div #(.W(W)) dut (.clk, .rst_n, .start, .dividend(a), .divisor(b),
                        .busy, .done, .quotient(q), .remainder(r));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_div(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    @(negedge clk); a = x; b = y; start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == W + 1, $sformatf("latency %0d for %0d/%0d", cyc, x, y));
    if (y != 0) begin
      check(q == x / y, $sformatf("q %0d/%0d got %0d", x, y, q));
      check(r == x % y, $sformatf("r %0d%%%0d got %0d", x, y, r));
    end else begin
      check(q == '1 && r == x, $sformatf("div by zero q=%h r=%0d", q, r));
    end
  endtask

  initial begin
    start = 0; a = 0; b = 1;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    run_div(100, 7);
    run_div(22400, 1600);
    run_div(32'hFFFF_FFFF, 1);
    run_div(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run_div(5, 9);
    run_div(1234, 0);
    for (int i = 0; i < 200; i++) run_div($urandom, ($urandom >> ($urandom % 32)));
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
