// ad_sweep_point -- one parameter setting of the Attack/Decay controller,
// driven with its own random-walk utilization and cycle counts and checked
// interval by interval against the reference model configured the same way.
// Used by tb_attack_decay_sweep; finished goes high after N intervals.
`timescale 1ns / 1ps
module ad_sweep_point
  import mcd_dvfs_pkg::*;
  import ad_ref_pkg::*;
#(
  parameter int unsigned DEV_THRESH_MPCT = 1750,
  parameter int unsigned REACTION_MPCT   = 6000,
  parameter int unsigned DECAY_MPCT      = 175,
  parameter int unsigned PERF_DEG_MPCT   = 2500,
  parameter int unsigned ENDSTOP_COUNT   = 10,
  parameter int          N               = 2400
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished
);
  logic start = 0;
  logic [15:0] util = '0;
  logic [19:0] cycles = '0;
  logic [15:0] freq_q;
  ad_mode_e    mode;
  logic        update, busy;
  int checks = 0, failures = 0;
  int mode_seen[6];

  attack_decay_ctrl #(
    .DEV_THRESH_MPCT(DEV_THRESH_MPCT), .REACTION_MPCT(REACTION_MPCT),
    .DECAY_MPCT(DECAY_MPCT), .PERF_DEG_MPCT(PERF_DEG_MPCT), .ENDSTOP_COUNT(ENDSTOP_COUNT)
  ) dut (.clk, .rst_n, .start, .util, .cycles, .freq_q, .mode, .update, .busy);

  initial begin
    ad_state_t st;
    ad_cfg_t cfg;
    ad_mode_e em;
    int u, c;
    finished = 0;
    st = reset_state();
    cfg.dev = DEV_THRESH_MPCT / 100000.0;
    cfg.react = REACTION_MPCT / 100000.0;
    cfg.decay = DECAY_MPCT / 100000.0;
    cfg.pdt = PERF_DEG_MPCT / 100000.0;
    cfg.endstop = ENDSTOP_COUNT;
    u = 20000; c = 5000;
    @(posedge rst_n);
    for (int i = 0; i < N; i++) begin
      // Phases of 300 intervals: random walk, flat, a 4 % per interval fall
      // to idle with steady IPC (drives the frequency to the floor) and a
      // 3 % per interval climb (to the top).
      case ((i / 300) % 4)
        0: u = u + int'($urandom % 4001) - 2000;
        1: u = u;
        2: u = u - u / 25 - 1;
        default: u = (i % 300 == 0) ? 1000 : u + u / 33 + 1;
      endcase
      if (u < 0) u = 0;
      if (u > 65535) u = 65535;
      if ((i / 300) % 4 != 2) c = c + int'($urandom % 601) - 300;
      if (c < 1000) c = 1000;
      if (c > 20000) c = 20000;
      @(negedge clk); util = 16'(u); cycles = 20'(c); start = 1;
      @(negedge clk); start = 0;
      while (!update) @(negedge clk);
      em = step(st, cfg, longint'(u), longint'(c));
      mode_seen[int'(em)]++;
      checks++;
      if (freq_q != 16'(st.f) || mode != em) begin
        failures++;
        if (failures < 5) $display("FAIL [%0d %0d %0d %0d %0d] i=%0d f=%0d/%0d mode=%s/%s",
          DEV_THRESH_MPCT, REACTION_MPCT, DECAY_MPCT, PERF_DEG_MPCT, ENDSTOP_COUNT,
          i, freq_q, st.f, mode.name(), em.name());
      end
    end
    finished = 1;
  end
endmodule
