// fu_select: prioritized allocation of ready instructions to the functional
// units of one type (integer ALUs or FPUs), limited to the active units.
//
// Units are numbered 0..N-1 and always considered in that order, so unit 0
// is used first and "the last active unit" (index active-1) only receives an
// instruction when every lower unit is taken. Each cycle up to `req_cnt`
// ready instructions ask for a unit; each is given the lowest-numbered unit
// that is active and not busy (busy = occupied by an unpipelined operation
// such as a divide). Every request that finds no unit is a structural hazard.
// Because issue width equals the number of active units, this is also where
// the issue width of a type is limited.
//
// The priority order and the hazard count are described by the design; how
// the core presents requests (as a count, purely combinational) is this
// implementation's choice.
//
// Ports: req_cnt, busy, active (count of powered units) in; grant (one bit
// per unit), grant_cnt, hazards (requests not served), last_used (the unit
// with index active-1 was granted this cycle) out. Combinational.
module fu_select #(
  parameter int unsigned N      = 6,
  parameter int unsigned REQ_W  = 4
) (
  input  logic [REQ_W-1:0]         req_cnt,
  input  logic [N-1:0]             busy,
  input  logic [$clog2(N+1)-1:0]   active,
  output logic [N-1:0]             grant,
  output logic [$clog2(N+1)-1:0]   grant_cnt,
  output logic [REQ_W-1:0]         hazards,
  output logic                     last_used
);
  localparam int unsigned CW = $clog2(N + 1);

  always_comb begin
    logic [REQ_W-1:0] left;
    left      = req_cnt;
    grant     = '0;
    grant_cnt = '0;
    for (int unsigned u = 0; u < N; u++) begin
      if (left != '0 && u < active && !busy[u]) begin
        grant[u]  = 1'b1;
        grant_cnt = grant_cnt + CW'(1);
        left      = left - REQ_W'(1);
      end
    end
    hazards   = left;
    last_used = 1'b0;
    for (int unsigned u = 0; u < N; u++)
      if (CW'(u + 1) == active) last_used = grant[u];
  end
endmodule
