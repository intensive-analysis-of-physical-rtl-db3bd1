// clock_route_model: behavioural model (not synthesizable) of a clock route
// with a fixed transport delay.
//
// In the sensor the latches and the first ones-counter register share the
// sensor clock. In the device the latch outputs change only some hundred
// picoseconds after a rising edge opens them, so the counter register, clocked
// by the same edge, still captures the pattern held through the low phase.
// A zero-delay simulation has no such margin; this model delays the latch
// enable by ROUTE_PS to restore it. The delay is this design's modelling
// choice; the hardware has no separate block for it.
//
// Interface: clk_in, clk_out = clk_in delayed by ROUTE_PS picoseconds.
module clock_route_model #(
  parameter int unsigned ROUTE_PS = 100
) (
  input  logic clk_in,
  output logic clk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  initial clk_out = 1'b0;

  always @(clk_in) clk_out <= #(ROUTE_PS * 1ps) clk_in;
endmodule
