// tb_interval_counter -- feeds random retire counts (0..11 per cycle) and
// checks the running count and the interval_end pulse against a model that
// carries the overshoot; also checks that intervals hold 10,000
// instructions on average (total retired / intervals).
`timescale 1ns / 1ps
module tb_interval_counter;
  logic clk = 0, rst_n = 0;
  logic [3:0] retire_cnt = '0;
  logic interval_end;
  logic [13:0] instr_cnt;
  int checks = 0, failures = 0, model = 0, n_int = 0;
  longint total = 0;
  bit exp_end;

  interval_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      retire_cnt = 4'($urandom % 12);
      if (i % 7000 < 50) retire_cnt = 11;  // bursts at full retire width
      @(posedge clk); #1;
      total += retire_cnt;
      model += retire_cnt;
      exp_end = model >= 10000;
      if (exp_end) model -= 10000;
      checks++;
      if (instr_cnt != 14'(model) || interval_end != exp_end) begin
        failures++; $display("FAIL i=%0d cnt=%0d model=%0d end=%0b", i, instr_cnt, model, interval_end);
      end
      if (interval_end) n_int++;
    end
    checks++;
    if (longint'(n_int) != total / 10000) begin
      failures++; $display("FAIL intervals %0d for %0d instructions", n_int, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
