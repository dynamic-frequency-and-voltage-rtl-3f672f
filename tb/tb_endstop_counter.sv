// tb_endstop_counter -- drives random sequences of interval steps with the
// frequency at or away from an extreme and compares count and reached with a
// model: count rises while at the extreme, clears away from it, and clears
// on the step after it reached ENDSTOP_COUNT.
`timescale 1ns / 1ps
module tb_endstop_counter;
  localparam int unsigned N = 10;
  logic clk = 0, rst_n = 0, step = 0, at_end = 0;
  logic [3:0] count;
  logic reached;
  int checks = 0, failures = 0, model = 0, n_reached = 0;

  endstop_counter #(.ENDSTOP_COUNT(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      step = ($urandom % 3) != 0;
      // Long runs at the extreme so the count reaches its limit often.
      at_end = (i % 200) < 150 ? 1'b1 : ($urandom % 2 == 0);
      @(posedge clk); #1;
      if (step) model = (at_end && model != N) ? model + 1 : 0;
      checks++;
      if (count != 4'(model) || reached != (model == N)) begin
        failures++; $display("FAIL i=%0d count=%0d model=%0d", i, count, model);
      end
      if (reached) n_reached++;
    end
    checks++;
    if (n_reached == 0) begin failures++; $display("FAIL never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
