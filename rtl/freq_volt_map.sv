// freq_volt_map -- turns a domain frequency into the operating point that is
// requested from the domain's clock generator and voltage regulator.
//
// The clock generator offers N_FPOINTS = 320 frequencies spaced linearly from
// 250 MHz (point 0) to 1.0 GHz (point 319), and the supply voltage tracks the
// frequency linearly from 0.65 V to 1.2 V. The controller keeps a finer
// frequency value (so that a 0.175 % decay step is not lost below the 2.35 MHz
// point spacing); this block rounds it to the nearest point:
//   f_point = round((f_q - FMIN_Q) * 319 / (FMAX_Q - FMIN_Q))
//   v_mv    = 650 + round(f_point * 550 / 319)
// The point count and both linear ranges follow the design; rounding to the
// nearest point and a voltage expressed in millivolts are this
// implementation's choices. Inputs outside the range are clamped first.
//
// Interface: purely combinational; divisions are by constants.
`timescale 1ns / 1ps
module freq_volt_map
  import mcd_dvfs_pkg::*;
(
  input  logic [FREQ_W-1:0]   f_q,
  output logic [FPOINT_W-1:0] f_point,
  output logic [VOLT_W-1:0]   v_mv
);

  localparam int unsigned SPAN  = FMAX_Q - FMIN_Q;
  localparam int unsigned STEPS = N_FPOINTS - 1;
  localparam int unsigned VSPAN = VMAX_MV - VMIN_MV;

  logic [FREQ_W-1:0] f_clamped;
  logic [31:0]       fp_num;
  logic [31:0]       fp_full;
  logic [31:0]       v_num;
  logic [31:0]       v_full;

  always_comb begin
    if (f_q > FREQ_W'(FMAX_Q))      f_clamped = FREQ_W'(FMAX_Q);
    else if (f_q < FREQ_W'(FMIN_Q)) f_clamped = FREQ_W'(FMIN_Q);
    else                            f_clamped = f_q;
    fp_num  = 32'(f_clamped - FREQ_W'(FMIN_Q)) * STEPS + SPAN / 2;
    fp_full = fp_num / SPAN;
    f_point = FPOINT_W'(fp_full);
    v_num   = 32'(f_point) * VSPAN + STEPS / 2;
    v_full  = VMIN_MV + v_num / STEPS;
    v_mv    = VOLT_W'(v_full);
  end

endmodule
