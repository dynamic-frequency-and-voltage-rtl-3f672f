// mcd_dvfs_pkg -- shared constants, types and elaboration-time helpers for the
// Attack/Decay frequency/voltage controller of a multiple-clock-domain (MCD)
// processor.
//
// Number formats used throughout:
//   * Domain frequency: unsigned fixed point, MHz with FREQ_FRAC = 6 fraction
//     bits, so 1.0 GHz = 64000 and 250 MHz = 16000 (16 bits). The 250 MHz ..
//     1.0 GHz range, the 320 frequency points and the 0.65 V .. 1.2 V linear
//     voltage range are the design's operating range; the fraction width is
//     this implementation's choice.
//   * Algorithm percentages are given as integers in thousandths of a percent
//     ("mpct"): 1.75 % = 1750. They are turned into Q16 fractions (value *
//     65536) when the hardware is elaborated, so the datapath never divides.
//   * A period scale factor (1 + x) is applied to the frequency as the
//     multiplication by the Q16 reciprocal 65536 / (1 + x).
`timescale 1ns / 1ps
package mcd_dvfs_pkg;

  // Frequency format and range.
  localparam int unsigned FREQ_FRAC = 6;
  localparam int unsigned FREQ_W    = 16;
  localparam int unsigned FMAX_MHZ  = 1000;
  localparam int unsigned FMIN_MHZ  = 250;
  localparam int unsigned FMAX_Q    = FMAX_MHZ << FREQ_FRAC;   // 64000
  localparam int unsigned FMIN_Q    = FMIN_MHZ << FREQ_FRAC;   // 16000

  // Discrete operating points and the matching supply voltage.
  localparam int unsigned N_FPOINTS = 320;
  localparam int unsigned FPOINT_W  = 9;
  localparam int unsigned VMAX_MV   = 1200;
  localparam int unsigned VMIN_MV   = 650;
  localparam int unsigned VOLT_W    = 11;

  // Q16 scale constants need one integer bit above the fraction.
  localparam int unsigned SCALE_W   = 17;

  // Decision taken for an interval.
  typedef enum logic [2:0] {
    AD_HOLD        = 3'd0,  // no change (IPC dropped beyond the threshold)
    AD_ATTACK_UP   = 3'd1,  // utilization rose: raise frequency by ReactionChange
    AD_ATTACK_DOWN = 3'd2,  // utilization fell: lower frequency by ReactionChange
    AD_DECAY       = 3'd3,  // no significant change: lower frequency by Decay
    AD_FORCE_UP    = 3'd4,  // too long at the lower endstop: forced attack up
    AD_FORCE_DOWN  = 3'd5   // too long at the upper endstop: forced attack down
  } ad_mode_e;

  // Percentage (thousandths of a percent) to Q16 fraction, rounded.
  function automatic int unsigned mpct_to_q16(input int unsigned mpct);
    longint unsigned num;
    num = longint'(mpct) * 64'd65536 + 64'd50000;
    return int'(num / 64'd100000);
  endfunction

  // Q16 reciprocal of a period scale factor: 65536 / (1 + mpct/100000) when
  // grow = 1, 65536 / (1 - mpct/100000) when grow = 0. Rounded.
  function automatic int unsigned period_scale_q16(input int unsigned mpct, input bit grow);
    longint unsigned den;
    den = grow ? (64'd100000 + longint'(mpct)) : (64'd100000 - longint'(mpct));
    return int'((64'd6553600000 + den / 2) / den);
  endfunction

endpackage
