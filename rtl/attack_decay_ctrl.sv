// attack_decay_ctrl -- the per-domain frequency computation of the
// Attack/Decay algorithm.
//
// Once per interval (start) the controller receives the domain's accumulated
// queue utilization and the interval's front-end cycle count, and sets a new
// domain frequency:
//   * forced attack: if the frequency has sat at the upper (lower) end of the
//     range for ENDSTOP_COUNT intervals, it is lowered (raised) by
//     ReactionChange regardless of the inputs;
//   * attack: if utilization rose by more than DeviationThreshold times the
//     previous utilization, the frequency is raised by ReactionChange; if it
//     fell by more than that, it is lowered by ReactionChange;
//   * decay: otherwise (no significant change, or an unused domain) it is
//     lowered by Decay;
//   * hold: a decrease (attack down or decay) is skipped when the IPC fell by
//     more than PerfDegThreshold, i.e. cycles - prev_cycles >
//     prev_cycles * PerfDegThreshold.
// A change of x is applied to the clock period, so the frequency is
// multiplied by 1/(1 +/- x); the reciprocals are fixed Q16 constants. The
// result is clamped to 250 MHz .. 1.0 GHz and the two endstop counters are
// stepped with the clamped value. The algorithm, its default parameters
// (1.75 %, 6.0 %, 0.175 %, 2.5 %, 10 intervals) and the use of one serial
// multiplier, one subtractor and magnitude comparators follow the design.
// This implementation's choices: the IPC test is on the decrease only; the
// two threshold products (prev_util * DeviationThreshold, prev_cycles *
// PerfDegThreshold) reuse the same serial multiplier; frequency starts at
// 1.0 GHz after reset with zero history.
//
// Timing: three serial multiplications of B_W = 17 cycles plus control
// cycles; update is high 57 cycles after the cycle in which start is high
// when the frequency is rescaled, 39 on a hold. update pulses for one cycle
// when freq_q and mode are new; start is ignored while busy.
`timescale 1ns / 1ps
module attack_decay_ctrl
  import mcd_dvfs_pkg::*;
#(
  parameter int unsigned UTIL_W          = 16,
  parameter int unsigned CYC_W           = 20,
  parameter int unsigned DEV_THRESH_MPCT = 1750,
  parameter int unsigned REACTION_MPCT   = 6000,
  parameter int unsigned DECAY_MPCT      = 175,
  parameter int unsigned PERF_DEG_MPCT   = 2500,
  parameter int unsigned ENDSTOP_COUNT   = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [UTIL_W-1:0] util,
  input  logic [CYC_W-1:0]  cycles,
  output logic [FREQ_W-1:0] freq_q,
  output ad_mode_e          mode,
  output logic              update,
  output logic              busy
);

  localparam int unsigned A_W = (CYC_W > UTIL_W) ? ((CYC_W > FREQ_W) ? CYC_W : FREQ_W)
                                                 : ((UTIL_W > FREQ_W) ? UTIL_W : FREQ_W);
  localparam int unsigned P_W = A_W + SCALE_W;

  localparam logic [SCALE_W-1:0] DEV_Q   = SCALE_W'(mpct_to_q16(DEV_THRESH_MPCT));
  localparam logic [SCALE_W-1:0] PDT_Q   = SCALE_W'(mpct_to_q16(PERF_DEG_MPCT));
  localparam logic [SCALE_W-1:0] K_UP    = SCALE_W'(period_scale_q16(REACTION_MPCT, 1'b0));
  localparam logic [SCALE_W-1:0] K_DOWN  = SCALE_W'(period_scale_q16(REACTION_MPCT, 1'b1));
  localparam logic [SCALE_W-1:0] K_DECAY = SCALE_W'(period_scale_q16(DECAY_MPCT, 1'b1));

  typedef enum logic [2:0] {S_IDLE, S_MUL_U, S_MUL_C, S_DECIDE, S_MUL_F, S_UPDATE} state_e;
  state_e state;

  logic [UTIL_W-1:0] u_cur, u_prev, thr_u;
  logic [CYC_W-1:0]  c_cur, c_prev, thr_c;
  logic [FREQ_W-1:0] f_next;
  ad_mode_e          mode_sel, mode_q;

  // Serial multiplier shared by the three products.
  logic               m_start, m_busy, m_done;
  logic [A_W-1:0]     m_a;
  logic [SCALE_W-1:0] m_b;
  logic [P_W-1:0]     m_p;
  logic [P_W-17:0]    m_p_int;   // product >> 16

  serial_multiplier #(.A_W(A_W), .B_W(SCALE_W)) u_mul (
    .clk, .rst_n, .start(m_start), .a(m_a), .b(m_b),
    .busy(m_busy), .done(m_done), .product(m_p)
  );
  always_comb m_p_int = m_p[P_W-1:16];

  // Endstop counters, stepped once per interval with the clamped frequency.
  logic step, at_min, at_max, lower_reached, upper_reached;
  logic [$clog2(ENDSTOP_COUNT+1)-1:0] lower_cnt, upper_cnt;

  always_comb begin
    step   = (state == S_UPDATE);
    at_min = (f_next <= FREQ_W'(FMIN_Q));
    at_max = (f_next >= FREQ_W'(FMAX_Q));
  end

  endstop_counter #(.ENDSTOP_COUNT(ENDSTOP_COUNT)) u_lower (
    .clk, .rst_n, .step, .at_end(at_min), .count(lower_cnt), .reached(lower_reached)
  );
  endstop_counter #(.ENDSTOP_COUNT(ENDSTOP_COUNT)) u_upper (
    .clk, .rst_n, .step, .at_end(at_max), .count(upper_cnt), .reached(upper_reached)
  );

  // Decision: subtractor plus the two magnitude comparisons.
  logic util_up, util_down, ipc_drop;
  always_comb begin
    util_up   = (u_cur > u_prev) && ((u_cur - u_prev) > thr_u);
    util_down = (u_prev > u_cur) && ((u_prev - u_cur) > thr_u);
    ipc_drop  = (c_cur > c_prev) && ((c_cur - c_prev) > thr_c);
    if (upper_reached)              mode_sel = AD_FORCE_DOWN;
    else if (lower_reached)         mode_sel = AD_FORCE_UP;
    else if (util_up)               mode_sel = AD_ATTACK_UP;
    else if (util_down && !ipc_drop) mode_sel = AD_ATTACK_DOWN;
    else if (!ipc_drop)             mode_sel = AD_DECAY;
    else                            mode_sel = AD_HOLD;
  end

  // Multiplier operand selection per state.
  always_comb begin
    m_start = 1'b0;
    m_a     = '0;
    m_b     = '0;
    unique case (state)
      S_IDLE: begin
        m_start = start;
        m_a     = A_W'(u_prev);
        m_b     = DEV_Q;
      end
      S_MUL_U: begin
        m_start = m_done;
        m_a     = A_W'(c_prev);
        m_b     = PDT_Q;
      end
      S_DECIDE: begin
        m_start = (mode_sel != AD_HOLD);
        m_a     = A_W'(freq_q);
        unique case (mode_sel)
          AD_ATTACK_UP, AD_FORCE_UP:     m_b = K_UP;
          AD_ATTACK_DOWN, AD_FORCE_DOWN: m_b = K_DOWN;
          default:                       m_b = K_DECAY;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      u_cur  <= '0;
      u_prev <= '0;
      c_cur  <= '0;
      c_prev <= '0;
      thr_u  <= '0;
      thr_c  <= '0;
      f_next <= FREQ_W'(FMAX_Q);
      freq_q <= FREQ_W'(FMAX_Q);
      mode_q <= AD_HOLD;
      mode   <= AD_HOLD;
      update <= 1'b0;
    end else begin
      update <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          u_cur <= util;
          c_cur <= cycles;
          state <= S_MUL_U;
        end
        S_MUL_U: if (m_done) begin
          thr_u <= UTIL_W'(m_p_int);
          state <= S_MUL_C;
        end
        S_MUL_C: if (m_done) begin
          thr_c <= CYC_W'(m_p_int);
          state <= S_DECIDE;
        end
        S_DECIDE: begin
          mode_q <= mode_sel;
          if (mode_sel == AD_HOLD) begin
            f_next <= freq_q;
            state  <= S_UPDATE;
          end else begin
            state  <= S_MUL_F;
          end
        end
        S_MUL_F: if (m_done) begin
          // Range check: keep the frequency inside the operating range.
          if (m_p_int >= (P_W - 16)'(FMAX_Q))      f_next <= FREQ_W'(FMAX_Q);
          else if (m_p_int <= (P_W - 16)'(FMIN_Q)) f_next <= FREQ_W'(FMIN_Q);
          else                                     f_next <= FREQ_W'(m_p_int);
          state <= S_UPDATE;
        end
        S_UPDATE: begin
          freq_q <= f_next;
          mode   <= mode_q;
          u_prev <= u_cur;
          c_prev <= c_cur;
          update <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb busy = (state != S_IDLE);

  // The threshold products are Q16 fractions of values that fit their width.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_MUL_U && m_done) |-> (m_p_int < (P_W - 16)'(1 << UTIL_W)))
    else $error("attack_decay_ctrl: utilization threshold overflow");
  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("attack_decay_ctrl: interval boundary while the previous one is still computed");
  // The sequencing never starts the multiplier while it is busy.
  assert property (@(posedge clk) disable iff (!rst_n) m_start |-> !m_busy)
    else $error("attack_decay_ctrl: multiplier started while busy");
  // Endstop counters never pass their limit.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (32'(lower_cnt) <= ENDSTOP_COUNT) && (32'(upper_cnt) <= ENDSTOP_COUNT))
    else $error("attack_decay_ctrl: endstop counter beyond its limit");

endmodule
