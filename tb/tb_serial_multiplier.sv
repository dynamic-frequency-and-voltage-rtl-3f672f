// tb_serial_multiplier -- checks the shift-and-add multiplier against the
// built-in product for edge and random operands, and checks that each result
// is seen B_W + 1 cycles after the cycle in which start is high.
`timescale 1ns / 1ps
module tb_serial_multiplier;
  localparam int unsigned A_W = 20, B_W = 17;
  logic clk = 0, rst_n = 0, start = 0;
  logic [A_W-1:0] a = '0;
  logic [B_W-1:0] b = '0;
  logic busy, done;
  logic [A_W+B_W-1:0] product;
  int checks = 0, failures = 0;

  serial_multiplier #(.A_W(A_W), .B_W(B_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [A_W-1:0] ta, input logic [B_W-1:0] tb_);
    int lat;
    longint unsigned exp_p;
    @(negedge clk); a = ta; b = tb_; start = 1;
    @(negedge clk); start = 0; a = '1; b = '1;  // operands must be captured
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    exp_p = longint'(ta) * longint'(tb_);
    checks++;
    if (product !== (A_W+B_W)'(exp_p)) begin
      failures++; $display("FAIL %0d*%0d = %0d expected %0d", ta, tb_, product, exp_p);
    end
    checks++;
    if (lat != B_W + 1) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(0, 0); run('1, '1); run(1, '1); run('1, 1); run(64000, 69719); run(12345, 0);
    repeat (300) run($urandom, $urandom);
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
