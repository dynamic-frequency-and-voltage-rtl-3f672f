// tb_attack_decay_ctrl -- runs the controller through phases that exercise
// every decision (decay to the lower end, forced attack up, attack up to the
// upper end, forced attack down, attack down, hold on an IPC drop, random
// traffic) and compares frequency and decision after each interval with the
// reference model. Also checks the latency from start to update: 57 cycles
// when the frequency is rescaled, 39 on a hold.
`timescale 1ns / 1ps
module tb_attack_decay_ctrl;
  import mcd_dvfs_pkg::*;
  import ad_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] util = '0;
  logic [19:0] cycles = '0;
  logic [15:0] freq_q;
  ad_mode_e    mode;
  logic        update, busy;
  int checks = 0, failures = 0;
  int mode_seen[6];
  ad_state_t st;
  ad_cfg_t   cfg;

  attack_decay_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic interval(input int unsigned u, input int unsigned c);
    ad_mode_e em;
    int lat;
    @(negedge clk); util = 16'(u); cycles = 20'(c); start = 1;
    @(negedge clk); start = 0; util = '1; cycles = '1;  // inputs are sampled at start
    lat = 1;
    while (!update) begin @(negedge clk); lat++; end
    em = step(st, cfg, u, c);
    mode_seen[int'(em)]++;
    checks++;
    if (freq_q != 16'(st.f) || mode != em) begin
      failures++;
      $display("FAIL u=%0d c=%0d f=%0d/%0d mode=%s/%s", u, c, freq_q, st.f, mode.name(), em.name());
    end
    checks++;
    if (lat != ((em == AD_HOLD) ? 39 : 57)) begin failures++; $display("FAIL latency %0d %s", lat, em.name()); end
    repeat ($urandom % 5) @(negedge clk);
  endtask

  initial begin
    int unsigned u;
    cfg = default_cfg();
    st  = reset_state();
    repeat (3) @(negedge clk); rst_n = 1;
    // Unused domain: decays to 250 MHz, then the lower endstop forces attacks.
    for (int i = 0; i < 830; i++) interval(0, 5000);
    // Rising utilization: attack up to 1 GHz, then the upper endstop fires.
    u = 1000;
    for (int i = 0; i < 40; i++) begin u = u + 100; interval(u, 5000); end
    // Falling utilization at steady IPC: attack down.
    for (int i = 0; i < 15; i++) begin u = u - 200; interval(u, 5000); end
    // Falling utilization while the IPC drops by 10 % per interval: hold.
    for (int i = 0; i < 5; i++) begin u = u - 200; interval(u, 5000 + 500 * (i + 1)); end
    // Random traffic.
    for (int i = 0; i < 300; i++) interval($urandom % 65536, 4000 + $urandom % 3000);
    foreach (mode_seen[m]) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("FAIL mode %0d never taken", m); end
    end
    $display("modes: hold=%0d up=%0d down=%0d decay=%0d force_up=%0d force_down=%0d",
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3], mode_seen[4], mode_seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
