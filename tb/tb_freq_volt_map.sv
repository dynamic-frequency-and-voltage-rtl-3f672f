// tb_freq_volt_map -- sweeps every input frequency code and compares the
// frequency point and voltage with values computed in real arithmetic from
// the linear 250 MHz..1 GHz / 320-point and 0.65..1.2 V ranges.
`timescale 1ns / 1ps
module tb_freq_volt_map;
  logic [15:0] f_q;
  logic [8:0]  f_point;
  logic [10:0] v_mv;
  int checks = 0, failures = 0;

  freq_volt_map dut (.*);

  initial begin
    real mhz, pt, vv;
    int ept, ev;
    for (int i = 0; i < 65536; i++) begin
      f_q = 16'(i);
      #1;
      mhz = i / 64.0;
      if (mhz > 1000.0) mhz = 1000.0;
      if (mhz < 250.0) mhz = 250.0;
      pt  = (mhz - 250.0) * 319.0 / 750.0;
      ept = int'($floor(pt + 0.5));
      vv  = 650.0 + ept * 550.0 / 319.0;
      ev  = int'($floor(vv + 0.5));
      checks++;
      if (f_point != 9'(ept) || v_mv != 11'(ev)) begin
        failures++;
        if (failures < 10) $display("FAIL f_q=%0d point=%0d/%0d v=%0d/%0d", i, f_point, ept, v_mv, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
