// serial_multiplier -- shift-and-add (partial-product accumulation)
// multiplier that retires one multiplier bit per clock.
//
// The scaling of the domain frequency is not time-critical, so the design
// uses a serial multiplier instead of an array. start loads the multiplicand
// a and the multiplier b; each following cycle the lowest remaining bit of b
// selects whether the shifted multiplicand is added to the product. After
// B_W cycles done pulses for one cycle and product holds a * b until the next
// start. busy is high from the cycle after start until done. The widths are
// this implementation's choice: A_W = 20 holds the interval cycle count, B_W =
// 17 holds a Q16 scale factor up to 1/(1 - 15.5 %).
//
// Interface: clk/rst_n (active-low, synchronous); start is ignored while
// busy. Latency: done is high in the (B_W + 1)-th cycle after the cycle in
// which start is high.
`timescale 1ns / 1ps
module serial_multiplier #(
  parameter int unsigned A_W = 20,
  parameter int unsigned B_W = 17
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic               busy,
  output logic               done,
  output logic [A_W+B_W-1:0] product
);

  localparam int unsigned CNT_W = $clog2(B_W + 1);

  logic [A_W+B_W-1:0] mcand;   // multiplicand, shifted left each step
  logic [B_W-1:0]     mplier;  // multiplier, shifted right each step
  logic [CNT_W-1:0]   steps;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mcand   <= '0;
      mplier  <= '0;
      steps   <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      product <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mcand   <= (A_W + B_W)'(a);
          mplier  <= b;
          steps   <= CNT_W'(B_W);
          product <= '0;
          busy    <= 1'b1;
        end
      end else begin
        if (mplier[0]) product <= product + mcand;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        steps  <= steps - CNT_W'(1);
        if (steps == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
