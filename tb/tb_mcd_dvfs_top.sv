// tb_mcd_dvfs_top -- end-to-end test of the controller at its default
// parameters (10,000-instruction intervals, 20/15/64-entry queues).
//
// A 1 GHz front-end clock retires instructions at a programmed rate; the
// three back-end domain clocks come from clock-generator models that follow
// the controller's requests with a limited slew rate and jitter. The workload
// goes through phases modelled on a media decoder whose floating-point unit
// is idle except for bursts:
//   1. FP queue empty, integer and load/store queues busy at a steady level:
//      the FP domain decays to 250 MHz and the lower endstop forces attacks;
//   2. FP burst (14-15 entries) while the IPC falls by 5 % per interval:
//      utilization rises (attack up, upper endstop forced attacks) and
//      decreases are held while the IPC falls;
//   3. load/store queue draining at a steady IPC: attack down;
//   4. full load/store queue over long intervals: saturated utilization;
//   5. random traffic.
// One scoreboard per domain checks every interval against the reference
// model; the testbench also checks the interval cycle counts, the number of
// intervals, and that every decision, saturation and a clock slew happened.
`timescale 1ns / 1ps
module tb_mcd_dvfs_top;
  import mcd_dvfs_pkg::*;

  logic fe_clk = 0, fe_rst_n = 0;
  logic [3:0] retire_cnt = '0;
  logic [2:0] dom_clk;
  logic [2:0] dom_rst_n = '0;
  logic [4:0] int_iq_occ = '0;
  logic [3:0] fp_iq_occ = '0;
  logic [6:0] lsq_occ = '0;
  logic [2:0][15:0] dom_f_q;
  logic [2:0][8:0]  dom_f_point;
  logic [2:0][10:0] dom_v_mv;
  ad_mode_e [2:0]   dom_mode;
  logic [2:0] dom_update, dom_util_saturated;
  logic interval_end;
  logic [13:0] instr_cnt;
  logic [19:0] interval_cycles;

  int checks = 0, failures = 0;

  mcd_dvfs_top dut (.*);

  domain_pll_model pll_int (.f_point(dom_f_point[0]), .clk(dom_clk[0]));
  domain_pll_model pll_fp  (.f_point(dom_f_point[1]), .clk(dom_clk[1]));
  domain_pll_model pll_ls  (.f_point(dom_f_point[2]), .clk(dom_clk[2]));

  ad_domain_checker #(.NAME("int")) chk_int (
    .clk(dom_clk[0]), .rst_n(dom_rst_n[0]), .pulse(dut.u_int.interval_pulse),
    .occ(int'(int_iq_occ)), .cycles(int'(interval_cycles)), .f_q(dom_f_q[0]),
    .mode(dom_mode[0]), .f_point(dom_f_point[0]), .v_mv(dom_v_mv[0]), .update(dom_update[0]));
  ad_domain_checker #(.NAME("fp")) chk_fp (
    .clk(dom_clk[1]), .rst_n(dom_rst_n[1]), .pulse(dut.u_fp.interval_pulse),
    .occ(int'(fp_iq_occ)), .cycles(int'(interval_cycles)), .f_q(dom_f_q[1]),
    .mode(dom_mode[1]), .f_point(dom_f_point[1]), .v_mv(dom_v_mv[1]), .update(dom_update[1]));
  ad_domain_checker #(.NAME("ls")) chk_ls (
    .clk(dom_clk[2]), .rst_n(dom_rst_n[2]), .pulse(dut.u_ls.interval_pulse),
    .occ(int'(lsq_occ)), .cycles(int'(interval_cycles)), .f_q(dom_f_q[2]),
    .mode(dom_mode[2]), .f_point(dom_f_point[2]), .v_mv(dom_v_mv[2]), .update(dom_update[2]));

  always #0.5 fe_clk = ~fe_clk;

  // Workload knobs, set per phase.
  real ipc = 8.0;          // instructions retired per front-end cycle
  int  int_lo = 8,  int_hi = 12;
  int  fp_lo = 0,   fp_hi = 0;
  int  ls_lo = 16,  ls_hi = 24;

  function automatic int pick(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  always @(negedge dom_clk[0]) int_iq_occ <= 5'(pick(int_lo, int_hi));
  always @(negedge dom_clk[1]) fp_iq_occ  <= 4'(pick(fp_lo, fp_hi));
  always @(negedge dom_clk[2]) lsq_occ    <= 7'(pick(ls_lo, ls_hi));

  // Retire stream at the programmed IPC.
  real frac = 0.0;
  longint total_retired = 0;
  always @(negedge fe_clk) begin
    int n;
    if (fe_rst_n) begin
      frac += ipc;
      n = int'($floor(frac));
      if (n > 11) n = 11;
      frac -= n;
      retire_cnt <= 4'(n);
      total_retired += n;
    end
  end

  // Front-end checks: interval lengths in cycles, interval count.
  int n_intervals = 0, cyc = 0, exp_cycles = 0;
  bit check_cycles = 0;
  always @(posedge fe_clk) begin
    if (fe_rst_n) begin
      cyc++;
      if (check_cycles) begin
        checks++;
        if (interval_cycles != 20'(exp_cycles)) begin
          failures++; $display("FAIL interval cycles %0d expected %0d", interval_cycles, exp_cycles);
        end
        check_cycles = 0;
      end
      if (interval_end) begin
        n_intervals++;
        exp_cycles = cyc;
        cyc = 0;
        check_cycles = 1;
      end
    end
  end

  // Clock slew: count changes of the requested point and watch the model.
  int n_point_changes = 0;
  logic [8:0] last_point = 9'd319;
  real min_fp_mhz = 1000.0;
  always @(posedge dom_clk[1]) begin
    if (dom_f_point[1] != last_point) n_point_changes++;
    last_point <= dom_f_point[1];
    if (pll_fp.cur_mhz < min_fp_mhz) min_fp_mhz = pll_fp.cur_mhz;
  end

  task automatic wait_intervals(input int n);
    int target = n_intervals + n;
    while (n_intervals < target) @(posedge fe_clk);
  endtask

  initial begin
    int seen[6], sat;
    repeat (20) @(posedge fe_clk);
    fe_rst_n = 1; dom_rst_n = '1;
    // 1. FP idle.
    ipc = 8.0; fp_lo = 0; fp_hi = 0;
    wait_intervals(850);
    // 2. FP burst with falling IPC.
    fp_lo = 14; fp_hi = 15;
    for (int i = 0; i < 30; i++) begin ipc = ipc / 1.05; wait_intervals(1); end
    // 3. Load/store queue draining at steady IPC.
    ipc = 4.0;
    for (int i = 0; i < 15; i++) begin ls_lo = ls_lo * 8 / 10; ls_hi = ls_lo + 2; wait_intervals(1); end
    // 4. Full load/store queue, low IPC.
    ipc = 1.0; ls_lo = 64; ls_hi = 64;
    wait_intervals(5);
    // 5. Random traffic.
    for (int i = 0; i < 40; i++) begin
      ipc = 1.0 + ($urandom % 80) / 10.0;
      int_lo = pick(0, 18); int_hi = int_lo + 2;
      fp_lo = pick(0, 13); fp_hi = fp_lo + 2;
      ls_lo = pick(0, 60); ls_hi = ls_lo + 4;
      wait_intervals(1);
    end
    ipc = 8.0;
    wait_intervals(1);
    repeat (2000) @(posedge fe_clk);

    checks += chk_int.checks + chk_fp.checks + chk_ls.checks;
    failures += chk_int.failures + chk_fp.failures + chk_ls.failures;
    for (int m = 0; m < 6; m++) seen[m] = chk_int.mode_seen[m] + chk_fp.mode_seen[m] + chk_ls.mode_seen[m];
    sat = chk_int.n_sat + chk_fp.n_sat + chk_ls.n_sat;
    $display("intervals=%0d retired=%0d", n_intervals, total_retired);
    $display("decisions: hold=%0d attack_up=%0d attack_down=%0d decay=%0d forced_up=%0d forced_down=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("saturated intervals=%0d, FP point changes=%0d, lowest FP clock %0.1f MHz",
             sat, n_point_changes, min_fp_mhz);
    for (int m = 0; m < 6; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL decision %0d never taken", m); end
    end
    checks++;
    if (sat == 0) begin failures++; $display("FAIL no saturated interval"); end
    checks++;
    if (longint'(n_intervals) != total_retired / 10000) begin
      failures++; $display("FAIL %0d intervals for %0d instructions", n_intervals, total_retired);
    end
    checks++;
    if (chk_fp.n_updates != n_intervals || chk_int.n_updates != n_intervals || chk_ls.n_updates != n_intervals) begin
      failures++; $display("FAIL updates %0d %0d %0d", chk_int.n_updates, chk_fp.n_updates, chk_ls.n_updates);
    end
    checks++;
    if (n_point_changes < 100 || min_fp_mhz > 300.0) begin
      failures++; $display("FAIL FP clock did not follow the requests");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog: intervals=%0d", n_intervals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
