// ipc_counter -- the global performance counter that the domain controllers
// use as their IPC measure.
//
// Intervals hold a fixed number of instructions, so the number of front-end
// cycles an interval takes is proportional to 1/IPC: PrevIPC/IPC equals
// cycles/prev_cycles. The counter counts front-end cycles (saturating at
// 2^CYC_W - 1); on interval_end it latches the count of the interval just
// finished, including that cycle, into cycles_last, restarts at zero and
// flips interval_tgl. cycles_last then stays stable for a whole interval,
// which is what lets the domains sample it after synchronising only the
// toggle. Counting cycles instead of dividing instructions by cycles, and the
// 20-bit width (CPI up to 100 at 10,000 instructions), are this
// implementation's choices.
//
// Interface: clk/rst_n (active-low, synchronous) in the front-end domain;
// interval_end from interval_counter; outputs registered.
`timescale 1ns / 1ps
module ipc_counter #(
  parameter int unsigned CYC_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             interval_end,
  output logic [CYC_W-1:0] cycles_last,
  output logic             interval_tgl
);

  logic [CYC_W-1:0] cycles;
  logic [CYC_W-1:0] cycles_inc;

  // Saturating increment.
  always_comb cycles_inc = (&cycles) ? cycles : cycles + CYC_W'(1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cycles       <= '0;
      cycles_last  <= '0;
      interval_tgl <= 1'b0;
    end else if (interval_end) begin
      cycles       <= '0;
      cycles_last  <= cycles_inc;
      interval_tgl <= ~interval_tgl;
    end else begin
      cycles       <= cycles_inc;
    end
  end

endmodule
