// tb_mcd_dvfs_pkg -- checks the package's fixed-point constants and the
// percentage-to-Q16 conversions against real arithmetic over the full
// parameter ranges of the algorithm (0..15.5 %).
`timescale 1ns / 1ps
module tb_mcd_dvfs_pkg;
  import mcd_dvfs_pkg::*;
  int checks = 0, failures = 0;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    expect_eq("FMAX_Q", FMAX_Q, 1000 * 64);
    expect_eq("FMIN_Q", FMIN_Q, 250 * 64);
    expect_eq("FREQ_W fits FMAX_Q", (FMAX_Q < (1 << FREQ_W)), 1);
    expect_eq("points fit", (N_FPOINTS <= (1 << FPOINT_W)), 1);
    expect_eq("voltage fits", (VMAX_MV < (1 << VOLT_W)), 1);
    for (int m = 0; m <= 15500; m += 25) begin
      expect_eq($sformatf("q16(%0d)", m), mpct_to_q16(m), longint'($floor(m / 100000.0 * 65536.0 + 0.5)));
      expect_eq($sformatf("grow(%0d)", m), period_scale_q16(m, 1'b1),
                longint'($floor(65536.0 / (1.0 + m / 100000.0) + 0.5)));
      expect_eq($sformatf("shrink(%0d)", m), period_scale_q16(m, 1'b0),
                longint'($floor(65536.0 / (1.0 - m / 100000.0) + 0.5)));
      checks++;
      if (period_scale_q16(m, 1'b0) >= (1 << SCALE_W)) begin failures++; $display("FAIL scale width"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
