// wake_delay: applies the reactivation latency of gated hardware to a
// resource count (window segments or functional units).
//
// The controller above requests a count `target`. A request below the current
// effective count takes effect on the next clock edge (deactivation is
// immediate). A request above it takes effect DELAY cycles after the request
// first appeared; if the target changes while waiting, the wait restarts
// from the new target. The 5-cycle default is the activation delay the design
// assumes for all deactivated components; restarting the wait on a changed
// request is this implementation's choice.
//
// Ports: target (requested count), active (effective count), waking (an
// increase is pending). Reset loads RESET_VAL.
module wake_delay #(
  parameter int unsigned W         = 5,
  parameter int unsigned DELAY     = 5,
  parameter int unsigned RESET_VAL = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] target,
  output logic [W-1:0] active,
  output logic         waking
);
  localparam int unsigned CW = $clog2(DELAY + 1);

  logic [CW-1:0] cnt;
  logic [W-1:0]  pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= W'(RESET_VAL);
      cnt    <= '0;
      pend   <= W'(RESET_VAL);
    end else if (target <= active) begin
      active <= target;
      cnt    <= '0;
      pend   <= target;
    end else if (target != pend || cnt == '0) begin
      // new increase request: start counting
      pend <= target;
      cnt  <= CW'(1);
    end else if (cnt == CW'(DELAY - 1)) begin
      active <= pend;
      cnt    <= '0;
    end else begin
      cnt <= cnt + CW'(1);
    end
  end

  assign waking = (target > active);

  initial assert (DELAY >= 2) else $error("wake_delay: DELAY must be at least 2");
endmodule
