// osc_counter: coarse part of the TDC, an 11-bit synchronous counter of
// oscillator periods.
//
// The counter is clocked by the oscillator output itself and counts every
// rising edge of osc that arrives while stop is low. It is cleared
// asynchronously while rst is high, so counting starts when rst is released
// (the start of the sensing time T_sns) and freezes at the first osc edge
// that sees stop high (its end). Freezing on the oscillator's own edge is
// this design's way of making the sampled value consistent: after stop has
// risen the count cannot change any more, so the clk-domain sampler can
// read it safely once stop has been synchronised. The count wraps at 2^W;
// at the nominal 38.85 MHz and T_sns = 5 us it reaches about 194.
//
// Ports: osc (clock), rst (async clear, active high), stop (count enable,
// active low), cnt (count). Width W = 11 follows the published TDC; the
// freeze mechanism and the wrap-around are this design's choices.
`timescale 1ns/1ps
module osc_counter #(
  parameter int unsigned W = accel_pkg::CNT_W
) (
  input  logic         osc,
  input  logic         rst,
  input  logic         stop,
  output logic [W-1:0] cnt
);

  always_ff @(posedge osc or posedge rst) begin
    if (rst)
      cnt <= '0;
    else if (!stop)
      cnt <= cnt + 1'b1;
  end

endmodule
