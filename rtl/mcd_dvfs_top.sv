// mcd_dvfs_top -- on-line frequency/voltage control of a four-domain MCD
// (multiple clock domain) processor with the Attack/Decay algorithm.
//
// The processor is split into a front end (fetch, rename, dispatch, ROB),
// an integer domain, a floating-point domain and a load/store domain, each on
// its own clock. The front end runs at a fixed 1.0 GHz / 1.2 V. The three
// back-end domains each have a queue at their input (integer issue queue of
// 20 entries, FP issue queue of 15, load/store queue of 64), and how full that
// queue is over an interval tells whether the domain keeps up: the controller
// raises a domain's frequency quickly when its queue fills (attack) and lets
// it sink slowly otherwise (decay).
//
// In the front-end clock, interval_counter frames intervals of 10,000 retired
// instructions and ipc_counter measures how many cycles each took. Each
// back-end domain has a domain_dvfs_ctrl in its own clock that accumulates
// its queue occupancy, runs the Attack/Decay step once per interval and
// outputs the requested frequency point (0 = 250 MHz .. 319 = 1.0 GHz) and
// supply voltage for that domain's clock generator and regulator, which are
// outside this block. The queues themselves belong to the processor core and
// enter as occupancy counts.
//
// The four-domain split, the fixed-frequency front end, the 10,000-instruction
// interval, the queue sizes and the retire width follow the design; the port
// list, the per-domain resets and the observation outputs are this
// implementation's choices.
//
// Domain index: 0 = integer, 1 = floating point, 2 = load/store.
// Timing: a new setting appears about 63 domain cycles after the front-end
// cycle that completes an interval; dom_update marks it in the domain clock.
`timescale 1ns / 1ps
module mcd_dvfs_top
  import mcd_dvfs_pkg::*;
#(
  parameter int unsigned INTERVAL_LEN    = 10000,
  parameter int unsigned RETIRE_WIDTH    = 11,
  parameter int unsigned INT_IQ_SIZE     = 20,
  parameter int unsigned FP_IQ_SIZE      = 15,
  parameter int unsigned LSQ_SIZE        = 64,
  parameter int unsigned UTIL_W          = 16,
  parameter int unsigned CYC_W           = 20,
  parameter int unsigned DEV_THRESH_MPCT = 1750,
  parameter int unsigned REACTION_MPCT   = 6000,
  parameter int unsigned DECAY_MPCT      = 175,
  parameter int unsigned PERF_DEG_MPCT   = 2500,
  parameter int unsigned ENDSTOP_COUNT   = 10,
  parameter int unsigned RET_W           = $clog2(RETIRE_WIDTH + 1),
  parameter int unsigned INT_OCC_W       = $clog2(INT_IQ_SIZE + 1),
  parameter int unsigned FP_OCC_W        = $clog2(FP_IQ_SIZE + 1),
  parameter int unsigned LSQ_OCC_W       = $clog2(LSQ_SIZE + 1)
) (
  // Front-end domain
  input  logic                     fe_clk,
  input  logic                     fe_rst_n,
  input  logic [RET_W-1:0]         retire_cnt,
  // Back-end domains: [0] integer, [1] floating point, [2] load/store
  input  logic [2:0]               dom_clk,
  input  logic [2:0]               dom_rst_n,
  input  logic [INT_OCC_W-1:0]     int_iq_occ,
  input  logic [FP_OCC_W-1:0]      fp_iq_occ,
  input  logic [LSQ_OCC_W-1:0]     lsq_occ,
  output logic [2:0][FREQ_W-1:0]   dom_f_q,
  output logic [2:0][FPOINT_W-1:0] dom_f_point,
  output logic [2:0][VOLT_W-1:0]   dom_v_mv,
  output ad_mode_e [2:0]           dom_mode,
  output logic [2:0]               dom_update,
  output logic [2:0]               dom_util_saturated,
  // Front-end observation
  output logic                     interval_end,
  output logic [13:0]              instr_cnt,
  output logic [CYC_W-1:0]         interval_cycles
);

  logic interval_tgl;

  interval_counter #(
    .INTERVAL_LEN(INTERVAL_LEN), .CNT_W(14), .RETIRE_WIDTH(RETIRE_WIDTH)
  ) u_interval (
    .clk(fe_clk), .rst_n(fe_rst_n), .retire_cnt,
    .interval_end, .instr_cnt
  );

  ipc_counter #(.CYC_W(CYC_W)) u_ipc (
    .clk(fe_clk), .rst_n(fe_rst_n), .interval_end,
    .cycles_last(interval_cycles), .interval_tgl
  );

  domain_dvfs_ctrl #(
    .OCC_W(INT_OCC_W), .UTIL_W(UTIL_W), .CYC_W(CYC_W),
    .DEV_THRESH_MPCT(DEV_THRESH_MPCT), .REACTION_MPCT(REACTION_MPCT),
    .DECAY_MPCT(DECAY_MPCT), .PERF_DEG_MPCT(PERF_DEG_MPCT),
    .ENDSTOP_COUNT(ENDSTOP_COUNT)
  ) u_int (
    .clk(dom_clk[0]), .rst_n(dom_rst_n[0]), .interval_tgl,
    .cycles_last(interval_cycles), .occ(int_iq_occ),
    .f_q(dom_f_q[0]), .f_point(dom_f_point[0]), .v_mv(dom_v_mv[0]),
    .mode(dom_mode[0]), .update(dom_update[0]), .util_saturated(dom_util_saturated[0])
  );

  domain_dvfs_ctrl #(
    .OCC_W(FP_OCC_W), .UTIL_W(UTIL_W), .CYC_W(CYC_W),
    .DEV_THRESH_MPCT(DEV_THRESH_MPCT), .REACTION_MPCT(REACTION_MPCT),
    .DECAY_MPCT(DECAY_MPCT), .PERF_DEG_MPCT(PERF_DEG_MPCT),
    .ENDSTOP_COUNT(ENDSTOP_COUNT)
  ) u_fp (
    .clk(dom_clk[1]), .rst_n(dom_rst_n[1]), .interval_tgl,
    .cycles_last(interval_cycles), .occ(fp_iq_occ),
    .f_q(dom_f_q[1]), .f_point(dom_f_point[1]), .v_mv(dom_v_mv[1]),
    .mode(dom_mode[1]), .update(dom_update[1]), .util_saturated(dom_util_saturated[1])
  );

  domain_dvfs_ctrl #(
    .OCC_W(LSQ_OCC_W), .UTIL_W(UTIL_W), .CYC_W(CYC_W),
    .DEV_THRESH_MPCT(DEV_THRESH_MPCT), .REACTION_MPCT(REACTION_MPCT),
    .DECAY_MPCT(DECAY_MPCT), .PERF_DEG_MPCT(PERF_DEG_MPCT),
    .ENDSTOP_COUNT(ENDSTOP_COUNT)
  ) u_ls (
    .clk(dom_clk[2]), .rst_n(dom_rst_n[2]), .interval_tgl,
    .cycles_last(interval_cycles), .occ(lsq_occ),
    .f_q(dom_f_q[2]), .f_point(dom_f_point[2]), .v_mv(dom_v_mv[2]),
    .mode(dom_mode[2]), .update(dom_update[2]), .util_saturated(dom_util_saturated[2])
  );

endmodule
