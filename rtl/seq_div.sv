// seq_div: multi-cycle unsigned divider (restoring, one quotient bit per
// cycle).
//
// The local window controller needs a divide to turn "deactivated entries /
// IPC of the last period" into the MaxOverlap tag value, and the global
// controller needs divides for frame IPC, frame power and the DVS frequency
// instructions / (deadline x IPC). None of them is time critical (they are
// recomputed at most once per period or per frame), so one slow, small
// divider is used; the restoring algorithm is this implementation's choice.
//
// Interface: pulse `start` with `dividend`/`divisor` while `busy` is low;
// `done` pulses for one cycle W + 1 cycles later (one cycle to load, W
// quotient steps) with `quotient`/`remainder`
// valid (they hold until the next start). Division by zero returns an
// all-ones quotient and the dividend as remainder.
module seq_div #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  dvsr;
  logic [W:0]    rem_trial;
  logic [CW-1:0] steps;

  // shift the next dividend bit into the partial remainder and try a subtract
  assign rem_trial = {remainder, quotient[W-1]} - {1'b0, dvsr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
      dvsr      <= '0;
      steps     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        quotient  <= dividend;   // shifted out from the top, quotient bits enter at the bottom
        remainder <= '0;
        dvsr      <= divisor;
        steps     <= CW'(W);
      end else if (busy) begin
        if (rem_trial[W]) begin
          remainder <= {remainder[W-2:0], quotient[W-1]};
          quotient  <= {quotient[W-2:0], 1'b0};
        end else begin
          remainder <= rem_trial[W-1:0];
          quotient  <= {quotient[W-2:0], 1'b1};
        end
        steps <= steps - CW'(1);
        if (steps == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
