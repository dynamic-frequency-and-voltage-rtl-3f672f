// tb_ipc_counter -- pulses interval_end at random spacings and checks that
// cycles_last reports the length of each finished interval in cycles and
// that interval_tgl flips once per interval; also checks saturation with a
// narrow counter.
`timescale 1ns / 1ps
module tb_ipc_counter;
  logic clk = 0, rst_n = 0, interval_end = 0;
  logic [19:0] cycles_last;
  logic        interval_tgl;
  logic [5:0]  cyc6;
  logic        tgl6;
  int checks = 0, failures = 0;

  ipc_counter dut (.*);
  ipc_counter #(.CYC_W(6)) dut6 (.clk, .rst_n, .interval_end, .cycles_last(cyc6), .interval_tgl(tgl6));

  always #5 clk = ~clk;

  initial begin
    int gap;
    logic tgl_before;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      gap = (i % 10 == 0) ? 100 + ($urandom % 50) : 1 + ($urandom % 40);
      // Interval is gap cycles long: gap-1 quiet cycles then the end cycle.
      tgl_before = interval_tgl;
      repeat (gap - 1) @(negedge clk);
      interval_end = 1;
      @(negedge clk);
      interval_end = 0;
      if (i > 0) begin
        checks++;
        if (cycles_last != 20'(gap)) begin
          failures++; $display("FAIL i=%0d cycles_last=%0d gap=%0d", i, cycles_last, gap);
        end
        checks++;
        if (cyc6 != ((gap > 63) ? 6'd63 : 6'(gap))) begin
          failures++; $display("FAIL sat i=%0d cyc6=%0d gap=%0d", i, cyc6, gap);
        end
      end
      checks++;
      if (interval_tgl == tgl_before) begin failures++; $display("FAIL toggle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
