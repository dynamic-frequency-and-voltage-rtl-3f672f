// tb_queue_util_counter -- random occupancies (0..64) with snapshots at
// random interval lengths; checks util_last against the model sum (current
// cycle included) and the saturation at 65535 on long, full intervals.
`timescale 1ns / 1ps
module tb_queue_util_counter;
  logic clk = 0, rst_n = 0, snapshot = 0;
  logic [6:0] occ = '0;
  logic [15:0] util_last;
  logic saturated;
  int checks = 0, failures = 0, n_sat = 0;
  longint acc = 0, expv;

  queue_util_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    int len;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      len = (i % 8 == 7) ? 1100 + $urandom % 200 : 1 + $urandom % 600;
      acc = 0;
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        occ = (i % 8 == 7) ? 7'd64 : 7'($urandom % 65);
        snapshot = (c == len - 1);
        acc += occ;
      end
      @(negedge clk);
      snapshot = 0; occ = 0;
      expv = (acc > 65535) ? 65535 : acc;
      checks++;
      if (util_last != 16'(expv) || saturated != (expv == 65535)) begin
        failures++; $display("FAIL i=%0d util=%0d exp=%0d", i, util_last, expv);
      end
      if (saturated) n_sat++;
      acc = 0;  // the extra cycle with occ = 0 starts the next interval
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation"); end
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
