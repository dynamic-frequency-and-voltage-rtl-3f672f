// cdc_toggle_sync -- carries an event from the front-end clock into a domain
// clock.
//
// The source side flips a level (src_tgl) once per event. The level passes a
// chain of STAGES flip-flops in the destination clock; a change between the
// last two stages gives a one-cycle pulse. Data that goes with the event (the
// interval cycle count) is held stable by the source for a whole interval,
// far longer than the STAGES + 1 destination cycles the pulse needs, so it
// can be sampled on the pulse without its own synchroniser. The design asks
// for its global information to be synchronised to each domain but does not
// give the circuit; this two-flop toggle synchroniser is this
// implementation's choice. Events closer together than about STAGES + 1
// destination cycles would be merged.
//
// Interface: src_tgl (asynchronous to clk), clk/rst_n destination clock and
// active-low synchronous reset, pulse output registered.
`timescale 1ns / 1ps
module cdc_toggle_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic src_tgl,
  output logic pulse
);

  logic [STAGES:0] sync_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_q <= '0;
      pulse  <= 1'b0;
    end else begin
      sync_q <= {sync_q[STAGES-1:0], src_tgl};
      pulse  <= sync_q[STAGES] ^ sync_q[STAGES-1];
    end
  end

endmodule
