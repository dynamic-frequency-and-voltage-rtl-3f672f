// tb_epic_fp_workload -- runs the whole controller at its default parameters
// on a 6.7 M-instruction (670-interval) workload shaped like a media decoder
// whose floating-point unit is unused except for two distinct phases: a short
// phase of light FP activity (about one queue entry on average) and a long
// phase that keeps the 15-entry FP issue queue nearly full. The phase
// positions and levels are this testbench's choice.
//
// Besides the per-interval scoreboards for all three domains, it checks the
// expected shape of the FP domain's frequency: it decays while the FP unit
// is unused, and rises when FP activity starts. It also reports how many
// intervals saturated the 16-bit utilization accumulator. Utilization is
// summed per FP-domain cycle, so in the busy phase it grows as the domain
// speeds up, which drives further attacks, until the sum passes 65,535
// (about 900 MHz here); from then on the controller sees a flat utilization
// and decays slowly.
`timescale 1ns / 1ps
module tb_epic_fp_workload;
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

  // Interval number (front-end count) selects the FP phase.
  int n_intervals = 0;
  always @(posedge fe_clk) if (fe_rst_n && interval_end) n_intervals++;

  localparam int N_INTERVALS = 670;
  localparam int P1_START = 180, P1_END = 230;   // light FP activity
  localparam int P2_START = 540, P2_END = 620;   // FP queue nearly full

  always @(negedge dom_clk[0]) int_iq_occ <= 5'(6 + $urandom % 5);
  always @(negedge dom_clk[2]) lsq_occ    <= 7'(20 + $urandom % 9);
  always @(negedge dom_clk[1]) begin
    if (n_intervals >= P1_START && n_intervals < P1_END)
      fp_iq_occ <= ($urandom % 100 < 60 - (n_intervals - P1_START)) ? 4'(1 + $urandom % 2) : 4'd0;
    else if (n_intervals >= P2_START && n_intervals < P2_END)
      fp_iq_occ <= 4'(14 + $urandom % 2);
    else
      fp_iq_occ <= 4'd0;
  end

  // Two instructions per front-end cycle.
  always @(negedge fe_clk) retire_cnt <= fe_rst_n ? 4'd2 : 4'd0;

  // FP frequency after each interval.
  int unsigned f_hist[N_INTERVALS + 2];
  int n_fp = 0, sat_p2 = 0;
  always @(posedge dom_clk[1]) begin
    if (dom_update[1] && n_fp < N_INTERVALS + 2) begin
      f_hist[n_fp] = dom_f_q[1];
      if (n_fp >= P2_START && n_fp < P2_END && dom_util_saturated[1]) sat_p2++;
      n_fp++;
    end
  end

  function automatic int unsigned max_in(input int a, input int b);
    int unsigned mx = 0;
    for (int i = a; i < b; i++) if (f_hist[i] > mx) mx = f_hist[i];
    return mx;
  endfunction

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20) @(posedge fe_clk);
    fe_rst_n = 1; dom_rst_n = '1;
    while (n_intervals < N_INTERVALS) @(posedge fe_clk);
    repeat (2000) @(posedge fe_clk);
    checks += chk_int.checks + chk_fp.checks + chk_ls.checks;
    failures += chk_int.failures + chk_fp.failures + chk_ls.failures;
    $display("FP MHz at intervals 1, %0d, %0d, %0d, %0d, %0d: %0d %0d %0d %0d %0d %0d",
             P1_START - 1, P1_END - 1, P2_START - 1, P2_END - 1, N_INTERVALS - 1,
             f_hist[1] / 64, f_hist[P1_START - 1] / 64, f_hist[P1_END - 1] / 64,
             f_hist[P2_START - 1] / 64, f_hist[P2_END - 1] / 64, f_hist[N_INTERVALS - 1] / 64);
    $display("FP peak in phase 1: %0d MHz, in phase 2: %0d MHz; saturated intervals in phase 2: %0d",
             max_in(P1_START, P1_END) / 64, max_in(P2_START, P2_END) / 64, sat_p2);
    $display("FP decisions: hold=%0d up=%0d down=%0d decay=%0d forced_up=%0d forced_down=%0d",
             chk_fp.mode_seen[0], chk_fp.mode_seen[1], chk_fp.mode_seen[2], chk_fp.mode_seen[3],
             chk_fp.mode_seen[4], chk_fp.mode_seen[5]);
    expect_true("all intervals updated", n_fp >= N_INTERVALS);
    expect_true("decay while FP unused", f_hist[P1_START - 1] < f_hist[1]);
    expect_true("rise in FP phase 1", max_in(P1_START, P1_END) > f_hist[P1_START - 1]);
    expect_true("decay after phase 1", f_hist[P2_START - 1] < max_in(P1_START, P1_END));
    expect_true("rise at start of phase 2", max_in(P2_START, P2_END) > f_hist[P2_START - 1]);
    expect_true("decay after phase 2", f_hist[N_INTERVALS - 1] < f_hist[P2_END - 1]);
    expect_true("phase 2 saturates the 16-bit accumulator", sat_p2 > 0);
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
