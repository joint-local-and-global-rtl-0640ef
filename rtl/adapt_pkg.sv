// adapt_pkg: constants and types shared by the energy-adaptation controllers.
//
// The numbers describe the base processor the controllers manage (a MIPS
// R10000-like out-of-order core with a 128-entry unified window split into
// 8-entry segments, 6 integer ALUs and 4 FPUs, 192+192 physical registers)
// and the tuned parameters of the StallIW and HazardFU local algorithms
// (200-cycle period, thresholds 40/20/80/4), of the PeriodicIW and UtilFU
// baselines (thresholds 1, 5 periods, 86%, 3 cycles) and of the global algorithm
// (54 candidate configurations, 4% IPC leeway, 100 MHz - 1 GHz DVS range).
// Those values follow the published design; fixed-point formats (Q8 IPC and
// power), the frame-type count and the configuration index order are this
// implementation's choices.
package adapt_pkg;

  // Instruction window
  localparam int unsigned IW_ENTRIES   = 128;
  localparam int unsigned SEG_ENTRIES  = 8;
  localparam int unsigned IW_SEGS      = IW_ENTRIES / SEG_ENTRIES;   // 16
  localparam int unsigned MIN_SEGS     = 2;
  localparam int unsigned TAG_W        = 4;                          // IWtag width

  // Functional units
  localparam int unsigned NUM_ALU      = 6;
  localparam int unsigned NUM_FPU      = 4;

  // Physical registers
  localparam int unsigned RF_INT       = 192;
  localparam int unsigned RF_FP        = 192;

  // Local algorithm parameters
  localparam int unsigned PERIOD       = 200;
  localparam int unsigned IW_DEC_THR   = 40;   // youngest-segment issues
  localparam int unsigned IW_INC_THR   = 20;   // avoidable stall cycles
  localparam int unsigned FU_HAZ_THR   = 80;   // structural hazards
  localparam int unsigned FU_IDLE_MAX  = 4;    // last-unit busy cycles
  localparam int unsigned WAKE_DELAY   = 5;    // activation delay (cycles)

  // Baseline local algorithms, selectable instead of StallIW / HazardFU
  localparam int unsigned PIW_DEC_THR  = 1;    // PeriodicIW: shrink on no youngest-segment issue
  localparam int unsigned PIW_GROW_PER = 5;    // PeriodicIW: grow every 5 periods
  localparam int unsigned UFU_UTIL_PCT = 86;   // UtilFU: last-unit utilization to grow
  localparam int unsigned UFU_FP_IDLE  = 3;    // UtilFU: idle cycles in a row to drop last FPU

  // Global algorithm
  localparam int unsigned NUM_IW_OPT   = 6;
  localparam int unsigned NUM_ALU_OPT  = 3;
  localparam int unsigned NUM_FPU_OPT  = 3;
  localparam int unsigned NUM_CFG      = NUM_IW_OPT * NUM_ALU_OPT * NUM_FPU_OPT; // 54
  localparam int unsigned LEEWAY_PCT   = 4;
  localparam int unsigned F_MIN_MHZ    = 100;
  localparam int unsigned F_MAX_MHZ    = 1000;

  // Fixed-point fraction bits used for IPC and power
  localparam int unsigned QF           = 8;

  // One architecture configuration, as maxima handed to the local controllers
  typedef struct packed {
    logic [4:0] iw_segs;   // active window segments (2..16)
    logic [2:0] alus;      // integer ALUs (2..6)
    logic [2:0] fpus;      // FPUs (1..4)
  } arch_cfg_t;

  // Window sizes {128,96,64,48,32,16} in segments, ALU {6,4,2}, FPU {4,2,1}
  function automatic arch_cfg_t cfg_of_index(input logic [5:0] idx);
    arch_cfg_t c;
    logic [5:0] iw_i, rem;
    logic [1:0] alu_i, fpu_i;
    iw_i  = idx / 6'd9;
    rem   = idx - iw_i * 6'd9;
    alu_i = 2'(rem / 6'd3);
    fpu_i = 2'(rem - 6'(alu_i) * 6'd3);
    unique case (iw_i)
      6'd0:    c.iw_segs = 5'd16;
      6'd1:    c.iw_segs = 5'd12;
      6'd2:    c.iw_segs = 5'd8;
      6'd3:    c.iw_segs = 5'd6;
      6'd4:    c.iw_segs = 5'd4;
      default: c.iw_segs = 5'd2;
    endcase
    unique case (alu_i)
      2'd0:    c.alus = 3'd6;
      2'd1:    c.alus = 3'd4;
      default: c.alus = 3'd2;
    endcase
    unique case (fpu_i)
      2'd0:    c.fpus = 3'd4;
      2'd1:    c.fpus = 3'd2;
      default: c.fpus = 3'd1;
    endcase
    return c;
  endfunction

  // One-cycle event pulses of all controllers, for monitoring
  typedef struct packed {
    logic iw_grow;      // window grew by one segment (avoidable stalls)
    logic iw_shrink;    // window shrank by one segment (few youngest issues)
    logic alu_inc;      // ALU added (hazards)
    logic alu_dec;      // ALU removed (idle last unit)
    logic fpu_inc;      // FPU added (hazards)
    logic fpu_dec;      // FPU removed (idle last unit)
    logic fpu_wake;     // first FPU switched on by an FP fetch
    logic prof_done;    // a frame type finished profiling
    logic freq_clamp;   // DVS frequency hit a range limit
  } adapt_events_t;

endpackage
