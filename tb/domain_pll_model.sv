// domain_pll_model -- behavioural model of a domain clock generator, for
// simulation only. It produces the clock of the requested frequency point
// (0 = 250 MHz .. 319 = 1.0 GHz, linear), moving its actual frequency toward
// the request at a limited rate of 1 MHz per 49.1 ns, so the domain keeps
// running through a frequency change. Each period gets independent jitter,
// roughly normal with zero mean and a 110 ps standard deviation (sum of
// twelve uniform samples). The clock starts at 1.0 GHz with a random phase.
`timescale 1ns / 1ps
module domain_pll_model #(
  parameter real SLEW_NS_PER_MHZ = 49.1,
  parameter real JITTER_NS       = 0.110
) (
  input  logic [8:0] f_point,
  output logic       clk
);
  real cur_mhz = 1000.0;
  real target_mhz, period, p, step_mhz, g;

  initial begin
    clk = 1'b0;
    #($urandom % 1000 / 1000.0);
    forever begin
      target_mhz = 250.0 + f_point * 750.0 / 319.0;
      period = 1000.0 / cur_mhz;
      g = 0.0;
      for (int i = 0; i < 12; i++) g += $urandom / 4294967296.0;
      p = period + JITTER_NS * (g - 6.0);
      if (p < 0.5 * period) p = 0.5 * period;
      #(p / 2.0) clk = 1'b1;
      #(p / 2.0) clk = 1'b0;
      step_mhz = p / SLEW_NS_PER_MHZ;
      if (cur_mhz < target_mhz) cur_mhz = (target_mhz - cur_mhz > step_mhz) ? cur_mhz + step_mhz : target_mhz;
      else if (cur_mhz > target_mhz) cur_mhz = (cur_mhz - target_mhz > step_mhz) ? cur_mhz - step_mhz : target_mhz;
    end
  end
endmodule
