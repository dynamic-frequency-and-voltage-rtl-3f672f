// interval_counter -- frames the sampling intervals of the Attack/Decay
// controller by counting retired instructions.
//
// Every front-end cycle the number of instructions retired in that cycle
// (0 .. RETIRE_WIDTH) is added to a 14-bit count. When the sum reaches
// INTERVAL_LEN (10,000 instructions) interval_end pulses for one cycle and the
// count restarts with the instructions that overshot the boundary, so no
// retired instruction is lost and intervals average exactly INTERVAL_LEN
// instructions. The 10,000-instruction interval and the 14-bit width follow
// the design; carrying the overshoot into the next interval is this
// implementation's choice (a real retire stage can cross the boundary in the
// middle of a retire group).
//
// Interface: clk/rst_n (active-low, synchronous), retire_cnt input,
// interval_end output registered (high in the cycle after the retiring cycle
// that completed the interval), instr_cnt shows the running count.
`timescale 1ns / 1ps
module interval_counter #(
  parameter int unsigned INTERVAL_LEN = 10000,
  parameter int unsigned CNT_W        = 14,
  parameter int unsigned RETIRE_WIDTH = 11,
  parameter int unsigned RET_W        = $clog2(RETIRE_WIDTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RET_W-1:0] retire_cnt,
  output logic             interval_end,
  output logic [CNT_W-1:0] instr_cnt
);

  // One more bit than the count so that count + retire never wraps.
  logic [CNT_W:0] sum;

  initial begin
    assert (INTERVAL_LEN + RETIRE_WIDTH <= (1 << CNT_W))
      else $error("interval_counter: CNT_W too small for INTERVAL_LEN");
  end

  always_comb sum = {1'b0, instr_cnt} + (CNT_W + 1)'(retire_cnt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      instr_cnt    <= '0;
      interval_end <= 1'b0;
    end else if (sum >= (CNT_W + 1)'(INTERVAL_LEN)) begin
      instr_cnt    <= CNT_W'(sum - (CNT_W + 1)'(INTERVAL_LEN));
      interval_end <= 1'b1;
    end else begin
      instr_cnt    <= CNT_W'(sum);
      interval_end <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) retire_cnt <= RET_W'(RETIRE_WIDTH))
    else $error("interval_counter: retire_cnt above RETIRE_WIDTH");

endmodule
