// queue_util_counter -- accumulates the occupancy of a domain's input queue
// (integer issue queue, FP issue queue or load/store queue) over an interval.
//
// Every cycle of the domain clock the number of valid queue entries is added
// to a UTIL_W-bit accumulator that saturates at its all-ones value. On
// snapshot (the synchronised interval boundary) the accumulated value,
// including the current cycle's occupancy, is copied to util_last and the
// accumulator restarts at zero. Because the sum is taken per domain cycle, an
// interval that takes more cycles than instructions can show an average above
// the queue size. The per-cycle accumulation and the 16-bit saturating width
// follow the design; a saturated interval simply reads as the maximum, which
// the adaptive algorithm tolerates.
//
// Interface: clk/rst_n (active-low, synchronous) in the domain clock, occ is
// sampled every cycle, util_last and saturated are registered and change one
// cycle after snapshot. saturated flags that util_last hit the limit.
`timescale 1ns / 1ps
module queue_util_counter #(
  parameter int unsigned UTIL_W = 16,
  parameter int unsigned OCC_W  = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [OCC_W-1:0]  occ,
  input  logic              snapshot,
  output logic [UTIL_W-1:0] util_last,
  output logic              saturated
);

  logic [UTIL_W-1:0] acc;
  logic [UTIL_W:0]   sum;
  logic [UTIL_W-1:0] sum_sat;

  always_comb begin
    sum     = {1'b0, acc} + (UTIL_W + 1)'(occ);
    sum_sat = sum[UTIL_W] ? '1 : sum[UTIL_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      util_last <= '0;
      saturated <= 1'b0;
    end else if (snapshot) begin
      acc       <= '0;
      util_last <= sum_sat;
      saturated <= &sum_sat;
    end else begin
      acc       <= sum_sat;
    end
  end

endmodule
