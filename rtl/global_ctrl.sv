// global_ctrl: frame-level (temporally and spatially global) adaptation
// controller choosing, for every frame, the architecture configuration and
// the DVS frequency.
//
// Software announces each frame with frame_start (its type and deadline) and
// reports its end with frame_end together with the frame's instruction count,
// cycle count and energy (from the processor's counters and power monitor).
//
// Profiling phase, per frame type: the first NUM_CFG (54) frames of a type
// run at the fixed profiling frequency PROF_MHZ, each with the next
// configuration of the candidate set (window 128/96/64/48/32/16 entries x
// 6/4/2 ALUs x 4/2/1 FPUs). After each such frame the controller computes
// IPC = instr/cycles and P = energy/cycles (Q8 fixed point) and keeps the
// configuration with the smallest P / IPC^3, compared without division as
// P_a * IPC_b^3 < P_b * IPC_a^3.
// Adaptation phase: frames of a profiled type run on the kept configuration
// at f = I / (D x IPC x (1 - 4%)), where I is the predicted instruction count
// (the count of the last frame of that type), D the deadline and IPC the
// measured IPC of the last frame of that type (for the first adapted frame,
// the profiled IPC of the chosen configuration); f is clamped to 100..1000 MHz.
// The chosen configuration is handed to the local controllers as a ceiling,
// and the physical register files are shrunk by one integer and one FP
// register per deactivated window entry.
//
// The two phases, the P/IPC^3 rule, the frequency formula, the 4% leeway, the
// candidate set and the register-file rule follow the published design. This
// implementation's choices: last-value instruction prediction (the published
// predictor is only referred to), plain clamping at the frequency limits,
// profiling at 1 GHz, the order in which candidates are profiled, Q8 formats
// and NUM_TYPES = 3 (I, P and B frames).
//
// Interface: frame_start is accepted only while `ready` is high and the
// controller is not inside a frame; frame_end only inside a frame. After
// frame_start, cfg is valid on the next cycle and freq_mhz when freq_valid
// rises (1 cycle while profiling, about 66 cycles after that); frame_end
// processing takes about 3 x 66 cycles, during which `ready` is low.
module global_ctrl
  import adapt_pkg::*;
#(
  parameter int unsigned NUM_TYPES = 3,
  parameter int unsigned N_CFG     = NUM_CFG,
  parameter int unsigned PROF_MHZ  = F_MAX_MHZ,
  localparam int unsigned TW       = (NUM_TYPES > 1) ? $clog2(NUM_TYPES) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            frame_start,
  input  logic [TW-1:0]   frame_type,
  input  logic [31:0]     deadline_ns,
  input  logic            frame_end,
  input  logic [31:0]     frame_instr,
  input  logic [31:0]     frame_cycles,
  input  logic [31:0]     frame_energy,
  output logic            ready,
  output logic            in_frame,
  output logic            profiling,
  output arch_cfg_t       cfg,
  output logic [5:0]      cfg_idx,
  output logic            freq_valid,
  output logic [9:0]      freq_mhz,
  output logic [7:0]      rf_int_active,
  output logic [7:0]      rf_fp_active,
  output logic            prof_done_evt,
  output logic            clamp_evt
);
  localparam int unsigned IPCW = 12;   // Q4.8
  localparam int unsigned PWW  = 20;   // Q12.8
  localparam logic [63:0] FREQ_NUM_K = 64'd3200000;                 // 1000*256*100/8
  localparam logic [63:0] FREQ_DEN_K = 64'(100 - LEEWAY_PCT) / 64'd8; // 96/8 = 12

  typedef enum logic [2:0] {S_IDLE, S_FREQ, S_RUN, S_IPC, S_POW, S_CMP} state_t;
  state_t state;

  // per frame type history
  logic [5:0]       prof_idx   [NUM_TYPES];
  logic             done       [NUM_TYPES];
  logic [5:0]       best_idx   [NUM_TYPES];
  logic [PWW-1:0]   best_p     [NUM_TYPES];
  logic [IPCW-1:0]  best_ipc   [NUM_TYPES];
  logic [IPCW-1:0]  last_ipc   [NUM_TYPES];
  logic [31:0]      last_instr [NUM_TYPES];

  logic [TW-1:0]    cur_type;
  logic [31:0]      end_instr, end_cycles, end_energy;
  logic [IPCW-1:0]  meas_ipc;
  logic [PWW-1:0]   meas_p;

  // shared divider
  logic        div_start, div_busy, div_done;
  logic [63:0] div_a, div_b, div_q, div_r;

  seq_div #(.W(64)) u_div (
    .clk, .rst_n,
    .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r)
  );

  // P / IPC^3 comparison of the frame just measured against the best so far
  logic [IPCW*3-1:0]     cube_meas, cube_best;
  logic [PWW+IPCW*3-1:0] lhs, rhs;
  logic                  better;
  assign cube_meas = (IPCW*3)'(meas_ipc) * (IPCW*3)'(meas_ipc) * (IPCW*3)'(meas_ipc);
  assign cube_best = (IPCW*3)'(best_ipc[cur_type]) * (IPCW*3)'(best_ipc[cur_type])
                   * (IPCW*3)'(best_ipc[cur_type]);
  assign lhs    = (PWW+IPCW*3)'(meas_p) * (PWW+IPCW*3)'(cube_best);
  assign rhs    = (PWW+IPCW*3)'(best_p[cur_type]) * (PWW+IPCW*3)'(cube_meas);
  assign better = (prof_idx[cur_type] == '0) || (lhs < rhs);

  assign ready     = (state == S_IDLE) || (state == S_RUN);
  assign in_frame  = (state == S_FREQ) || (state == S_RUN);
  assign cfg       = cfg_of_index(cfg_idx);

  // window entries switched off globally take one register of each file along
  logic [7:0] off_entries;
  assign off_entries   = 8'(IW_ENTRIES) - 8'(cfg.iw_segs) * 8'(SEG_ENTRIES);
  assign rf_int_active = 8'(RF_INT) - off_entries;
  assign rf_fp_active  = 8'(RF_FP) - off_entries;

  always_comb begin
    div_start = 1'b0;
    div_a     = '0;
    div_b     = '0;
    unique case (state)
      S_IDLE: if (frame_start && done[frame_type]) begin
        div_start = 1'b1;
        div_a     = 64'(last_instr[frame_type]) * FREQ_NUM_K;
        div_b     = 64'(deadline_ns) * 64'(last_ipc[frame_type]) * FREQ_DEN_K;
      end
      S_RUN: if (frame_end) begin
        div_start = 1'b1;
        div_a     = {24'd0, frame_instr, 8'd0};
        div_b     = 64'(frame_cycles);
      end
      S_IPC: if (div_done) begin
        div_start = 1'b1;
        div_a     = {24'd0, end_energy, 8'd0};
        div_b     = 64'(end_cycles);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      cur_type      <= '0;
      end_instr     <= '0;
      end_cycles    <= '0;
      end_energy    <= '0;
      meas_ipc      <= '0;
      meas_p        <= '0;
      profiling     <= 1'b0;
      cfg_idx       <= '0;
      freq_valid    <= 1'b0;
      freq_mhz      <= 10'(F_MAX_MHZ);
      prof_done_evt <= 1'b0;
      clamp_evt     <= 1'b0;
      for (int unsigned t = 0; t < NUM_TYPES; t++) begin
        prof_idx[t]   <= '0;
        done[t]       <= 1'b0;
        best_idx[t]   <= '0;
        best_p[t]     <= '0;
        best_ipc[t]   <= '0;
        last_ipc[t]   <= '0;
        last_instr[t] <= '0;
      end
    end else begin
      prof_done_evt <= 1'b0;
      clamp_evt     <= 1'b0;
      unique case (state)
        S_IDLE: if (frame_start) begin
          cur_type     <= frame_type;
          if (!done[frame_type]) begin
            profiling  <= 1'b1;
            cfg_idx    <= prof_idx[frame_type];
            freq_mhz   <= 10'(PROF_MHZ);
            freq_valid <= 1'b1;
            state      <= S_RUN;
          end else begin
            profiling  <= 1'b0;
            cfg_idx    <= best_idx[frame_type];
            freq_valid <= 1'b0;
            state      <= S_FREQ;
          end
        end
        S_FREQ: if (div_done) begin
          if (div_q > 64'(F_MAX_MHZ)) begin
            freq_mhz  <= 10'(F_MAX_MHZ);
            clamp_evt <= 1'b1;
          end else if (div_q < 64'(F_MIN_MHZ)) begin
            freq_mhz  <= 10'(F_MIN_MHZ);
            clamp_evt <= 1'b1;
          end else begin
            freq_mhz  <= div_q[9:0];
          end
          freq_valid <= 1'b1;
          state      <= S_RUN;
        end
        S_RUN: if (frame_end) begin
          end_instr  <= frame_instr;
          end_cycles <= frame_cycles;
          end_energy <= frame_energy;
          state      <= S_IPC;
        end
        S_IPC: if (div_done) begin
          meas_ipc <= (div_q > 64'((1 << IPCW) - 1)) ? '1 : div_q[IPCW-1:0];
          state    <= S_POW;
        end
        S_POW: if (div_done) begin
          meas_p <= (div_q > 64'((1 << PWW) - 1)) ? '1 : div_q[PWW-1:0];
          state  <= S_CMP;
        end
        S_CMP: begin
          last_ipc[cur_type]   <= meas_ipc;
          last_instr[cur_type] <= end_instr;
          if (profiling) begin
            if (better) begin
              best_idx[cur_type] <= cfg_idx;
              best_p[cur_type]   <= meas_p;
              best_ipc[cur_type] <= meas_ipc;
            end
            prof_idx[cur_type] <= prof_idx[cur_type] + 6'd1;
            if (prof_idx[cur_type] == 6'(N_CFG - 1)) begin
              done[cur_type] <= 1'b1;
              prof_done_evt  <= 1'b1;
              // the last profiled frame ran another configuration: the first
              // adapted frame starts from the profiled IPC of the chosen one
              last_ipc[cur_type] <= better ? meas_ipc : best_ipc[cur_type];
            end
          end
          freq_valid <= 1'b0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the frame protocol
  a_start_ok: assert property (@(posedge clk) disable iff (!rst_n)
                               frame_start |-> state == S_IDLE)
    else $error("global_ctrl: frame_start while a frame is open or being processed");
  a_end_ok:   assert property (@(posedge clk) disable iff (!rst_n)
                               frame_end |-> state == S_RUN)
    else $error("global_ctrl: frame_end outside a running frame");
endmodule
