// endstop_counter -- counts consecutive intervals that end with the domain
// frequency pinned at one extreme of its range.
//
// At every interval update (step) the counter increments while at_end is
// true, and clears when at_end is false. When it holds ENDSTOP_COUNT the
// Attack/Decay controller forces an attack away from that extreme (reached is
// high); the following step clears the counter even if the frequency is still
// at the extreme, so another full ENDSTOP_COUNT intervals pass before the next
// forced attack. This follows the design (10 intervals, 4-bit counter); W is
// derived from ENDSTOP_COUNT so that the 1..25 range of the sensitivity study
// also fits.
//
// Interface: clk/rst_n (active-low, synchronous), step and at_end sampled on
// the same edge, count and reached registered / decoded from the register.
`timescale 1ns / 1ps
module endstop_counter #(
  parameter int unsigned ENDSTOP_COUNT = 10,
  parameter int unsigned W             = $clog2(ENDSTOP_COUNT + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         at_end,
  output logic [W-1:0] count,
  output logic         reached
);

  always_comb reached = (count == W'(ENDSTOP_COUNT));

  always_ff @(posedge clk) begin
    if (!rst_n)              count <= '0;
    else if (step) begin
      if (at_end && !reached) count <= count + W'(1);
      else                    count <= '0;
    end
  end

endmodule
