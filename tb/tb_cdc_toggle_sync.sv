// tb_cdc_toggle_sync -- flips the source toggle from an unrelated clock at
// random spacings and checks that each flip gives exactly one destination
// pulse, 2 to 4 destination cycles later.
`timescale 1ns / 1ps
module tb_cdc_toggle_sync;
  logic src_clk = 0, clk = 0, rst_n = 0, src_tgl = 0;
  logic pulse;
  int checks = 0, failures = 0, n_flips = 0, n_pulses = 0, since = -1;

  cdc_toggle_sync dut (.*);

  always #1.0 src_clk = ~src_clk;   // 500 MHz source
  always #2.7 clk = ~clk;           // about 185 MHz destination

  // Source: flip, then wait well over the synchroniser latency.
  initial begin
    repeat (4) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      repeat (20 + $urandom % 30) @(posedge src_clk);
      src_tgl <= ~src_tgl;
      n_flips++;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (n_pulses != n_flips) begin failures++; $display("FAIL %0d pulses for %0d flips", n_pulses, n_flips); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Destination: measure latency from the flip to the pulse.
  logic last_src = 0;
  always @(posedge clk) begin
    if (src_tgl != last_src) begin last_src <= src_tgl; since <= 1; end
    else if (since >= 0) since <= since + 1;
    if (pulse && rst_n) begin
      n_pulses++;
      checks++;
      if (since < 2 || since > 4) begin failures++; $display("FAIL latency %0d", since); end
      since <= -1;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
