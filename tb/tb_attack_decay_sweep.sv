// tb_attack_decay_sweep -- the Attack/Decay controller at the corners of the
// parameter ranges used for the sensitivity study (DeviationThreshold
// 0-2.5 %, ReactionChange 0.5-15.5 %, Decay 0-2 %, PerfDegThreshold 0-12 %,
// EndstopCount 1-25) and at the default setting, each checked interval by
// interval against the reference model. It confirms that the fixed-point
// widths hold over the whole range and that the forced attacks fire for the
// smallest and largest endstop counts. The endstops are not required for the
// 0.5 % reaction step with no decay: it cannot fall from 1 GHz to 250 MHz
// within one 300-interval phase, so it never rests on the floor.
`timescale 1ns / 1ps
module tb_attack_decay_sweep;
  logic clk = 0, rst_n = 0;
  logic [6:0] fin;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ad_sweep_point #(.DEV_THRESH_MPCT(1750), .REACTION_MPCT(6000),  .DECAY_MPCT(175),  .PERF_DEG_MPCT(2500),  .ENDSTOP_COUNT(10)) p0 (.clk, .rst_n, .finished(fin[0]));
  ad_sweep_point #(.DEV_THRESH_MPCT(0),    .REACTION_MPCT(500),   .DECAY_MPCT(0),    .PERF_DEG_MPCT(0),     .ENDSTOP_COUNT(1))  p1 (.clk, .rst_n, .finished(fin[1]));
  ad_sweep_point #(.DEV_THRESH_MPCT(2500), .REACTION_MPCT(15500), .DECAY_MPCT(2000), .PERF_DEG_MPCT(12000), .ENDSTOP_COUNT(25)) p2 (.clk, .rst_n, .finished(fin[2]));
  ad_sweep_point #(.DEV_THRESH_MPCT(750),  .REACTION_MPCT(3000),  .DECAY_MPCT(500),  .PERF_DEG_MPCT(2500),  .ENDSTOP_COUNT(2))  p3 (.clk, .rst_n, .finished(fin[3]));
  ad_sweep_point #(.DEV_THRESH_MPCT(1750), .REACTION_MPCT(12000), .DECAY_MPCT(1500), .PERF_DEG_MPCT(8000),  .ENDSTOP_COUNT(10)) p4 (.clk, .rst_n, .finished(fin[4]));
  ad_sweep_point #(.DEV_THRESH_MPCT(1000), .REACTION_MPCT(6000),  .DECAY_MPCT(1000), .PERF_DEG_MPCT(4000),  .ENDSTOP_COUNT(10)) p5 (.clk, .rst_n, .finished(fin[5]));
  ad_sweep_point #(.DEV_THRESH_MPCT(2000), .REACTION_MPCT(9000),  .DECAY_MPCT(250),  .PERF_DEG_MPCT(10000), .ENDSTOP_COUNT(25)) p6 (.clk, .rst_n, .finished(fin[6]));

  task automatic collect(input string name, input int c, input int f, input int fu, input int fd,
                        input bit need_endstops = 1);
    checks += c; failures += f;
    $display("%s: %0d intervals, forced up %0d, forced down %0d", name, c, fu, fd);
    checks++;
    if (need_endstops && (fu == 0 || fd == 0)) begin failures++; $display("FAIL %s: an endstop never fired", name); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (&fin);
    collect("p0", p0.checks, p0.failures, p0.mode_seen[4], p0.mode_seen[5]);
    collect("p1", p1.checks, p1.failures, p1.mode_seen[4], p1.mode_seen[5], 0);
    collect("p2", p2.checks, p2.failures, p2.mode_seen[4], p2.mode_seen[5]);
    collect("p3", p3.checks, p3.failures, p3.mode_seen[4], p3.mode_seen[5]);
    collect("p4", p4.checks, p4.failures, p4.mode_seen[4], p4.mode_seen[5]);
    collect("p5", p5.checks, p5.failures, p5.mode_seen[4], p5.mode_seen[5]);
    collect("p6", p6.checks, p6.failures, p6.mode_seen[4], p6.mode_seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
