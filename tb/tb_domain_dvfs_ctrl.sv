// tb_domain_dvfs_ctrl -- one domain controller on its own clock (2.3 ns)
// driven from a 1 ns front-end clock. Interval toggles and cycle counts are
// generated by the testbench; the occupancy goes through phases: idle (decay
// to 250 MHz, forced attacks), lengthening intervals at a constant occupancy
// (utilization rises: attack up, then the upper endstop), falling occupancy
// (attack down), falling occupancy with falling IPC (hold), full queue
// (saturated utilization) and random traffic. ad_domain_checker compares
// every interval with the reference model.
`timescale 1ns / 1ps
module tb_domain_dvfs_ctrl;
  import mcd_dvfs_pkg::*;

  logic fe_clk = 0, clk = 0, rst_n = 0;
  logic interval_tgl = 0;
  logic [19:0] cycles_last = '0;
  logic [6:0] occ = '0;
  logic [15:0] f_q;
  logic [8:0] f_point;
  logic [10:0] v_mv;
  ad_mode_e mode;
  logic update, util_saturated;
  int failures = 0, checks = 0;
  int occ_level = 0;
  bit occ_random = 0;

  domain_dvfs_ctrl dut (.*);

  ad_domain_checker #(.NAME("dom")) chk (
    .clk, .rst_n, .pulse(dut.interval_pulse), .occ(int'(occ)), .cycles(int'(cycles_last)),
    .f_q, .mode, .f_point, .v_mv, .update
  );

  always #0.5 fe_clk = ~fe_clk;
  always #1.15 clk = ~clk;

  // Occupancy changes on the falling edge of the domain clock.
  always @(negedge clk) occ <= occ_random ? 7'($urandom % 65) : 7'(occ_level);

  task automatic interval(input int len);
    repeat (len - 1) @(posedge fe_clk);
    @(posedge fe_clk);
    cycles_last <= 20'(len);
    interval_tgl <= ~interval_tgl;
  endtask

  initial begin
    real len;
    repeat (10) @(posedge clk); rst_n = 1;
    occ_level = 0;
    for (int i = 0; i < 820; i++) interval(300);
    occ_level = 10; len = 300.0;
    for (int i = 0; i < 30; i++) begin len = len * 1.05; interval(int'(len)); end
    occ_level = 40;
    for (int i = 0; i < 12; i++) begin occ_level = occ_level * 9 / 10; interval(400); end
    for (int i = 0; i < 4; i++) begin occ_level = occ_level * 9 / 10; interval(440 + 44 * i); end
    occ_level = 64;
    for (int i = 0; i < 4; i++) interval(2600);
    occ_random = 1;
    for (int i = 0; i < 100; i++) interval(200 + $urandom % 400);
    repeat (200) @(posedge clk);
    checks = chk.checks;
    failures += chk.failures;
    $display("modes: hold=%0d up=%0d down=%0d decay=%0d force_up=%0d force_down=%0d sat=%0d",
             chk.mode_seen[0], chk.mode_seen[1], chk.mode_seen[2], chk.mode_seen[3],
             chk.mode_seen[4], chk.mode_seen[5], chk.n_sat);
    for (int m = 0; m < 6; m++) begin
      checks++;
      if (chk.mode_seen[m] == 0) begin failures++; $display("FAIL mode %0d never taken", m); end
    end
    checks++;
    if (chk.n_sat == 0) begin failures++; $display("FAIL no saturated interval"); end
    checks++;
    if (chk.n_updates != 970) begin failures++; $display("FAIL %0d updates", chk.n_updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end
endmodule
