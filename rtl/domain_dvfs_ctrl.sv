// domain_dvfs_ctrl -- complete frequency/voltage control for one clock domain
// (integer, floating-point or load/store) that has a queue at its input.
//
// Everything here runs on the domain's own clock, so each domain is controlled
// locally and only the interval boundary and the interval cycle count (the
// IPC measure) come from the front end. The interval toggle is synchronised
// (cdc_toggle_sync); its pulse closes the utilization interval
// (queue_util_counter) and, one cycle later when the snapshot is valid, starts
// the Attack/Decay computation (attack_decay_ctrl), which samples the
// front-end cycle count at that moment: that value is held stable for a whole
// interval, so it needs no synchroniser of its own. The resulting frequency
// is mapped to a frequency point and supply voltage (freq_volt_map).
//
// Interface: clk/rst_n are the domain clock and its active-low synchronous
// reset; interval_tgl and cycles_last come from the front-end domain; occ is
// the queue's valid-entry count in this cycle. update pulses for one domain
// cycle when f_q, f_point, v_mv and mode take the new interval's values,
// about 63 domain cycles after the interval toggle.
`timescale 1ns / 1ps
module domain_dvfs_ctrl
  import mcd_dvfs_pkg::*;
#(
  parameter int unsigned OCC_W           = 7,
  parameter int unsigned UTIL_W          = 16,
  parameter int unsigned CYC_W           = 20,
  parameter int unsigned DEV_THRESH_MPCT = 1750,
  parameter int unsigned REACTION_MPCT   = 6000,
  parameter int unsigned DECAY_MPCT      = 175,
  parameter int unsigned PERF_DEG_MPCT   = 2500,
  parameter int unsigned ENDSTOP_COUNT   = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                interval_tgl,
  input  logic [CYC_W-1:0]    cycles_last,
  input  logic [OCC_W-1:0]    occ,
  output logic [FREQ_W-1:0]   f_q,
  output logic [FPOINT_W-1:0] f_point,
  output logic [VOLT_W-1:0]   v_mv,
  output ad_mode_e            mode,
  output logic                update,
  output logic                util_saturated
);

  logic              interval_pulse, start;
  logic [UTIL_W-1:0] util_last;
  logic              ctrl_busy;

  cdc_toggle_sync u_sync (
    .clk, .rst_n, .src_tgl(interval_tgl), .pulse(interval_pulse)
  );

  queue_util_counter #(.UTIL_W(UTIL_W), .OCC_W(OCC_W)) u_util (
    .clk, .rst_n, .occ, .snapshot(interval_pulse),
    .util_last, .saturated(util_saturated)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) start <= 1'b0;
    else        start <= interval_pulse;
  end

  attack_decay_ctrl #(
    .UTIL_W(UTIL_W), .CYC_W(CYC_W),
    .DEV_THRESH_MPCT(DEV_THRESH_MPCT), .REACTION_MPCT(REACTION_MPCT),
    .DECAY_MPCT(DECAY_MPCT), .PERF_DEG_MPCT(PERF_DEG_MPCT),
    .ENDSTOP_COUNT(ENDSTOP_COUNT)
  ) u_ad (
    .clk, .rst_n, .start, .util(util_last), .cycles(cycles_last),
    .freq_q(f_q), .mode, .update, .busy(ctrl_busy)
  );

  freq_volt_map u_map (.f_q, .f_point, .v_mv);

  // Busy is only observed by this check: a new interval must not arrive
  // while the previous one is still being computed.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !ctrl_busy)
    else $error("domain_dvfs_ctrl: interval shorter than the controller latency");

endmodule
