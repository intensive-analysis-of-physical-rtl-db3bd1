// tdl_latch_bank: the sensor's N level-sensitive latches.
//
// Each latch is transparent while clk is high and holds while clk is low.
// During the high phase the latches follow the delay-line taps; at the
// falling edge they freeze how far the clock's high level had travelled down
// the lines, and they keep that pattern through the low phase, when the
// ones-counter samples it on the next rising edge. Latches clocked by the
// sensor clock, 256 of them, are the published design.
//
// Interface: clk (latch enable), d[N-1:0] from the taps, q[N-1:0].
// Circuit warning: the latches are intended, they are the sampling element
// of the sensor. The non-blocking assignment keeps the classic latch idiom;
// simulators that run it as a blocking one (Verilator) see the same result
// in the sensor because the latch enable arrives after the counter's clock
// edge there (see tdl_sensor).
module tdl_latch_bank #(
  parameter int unsigned N = rsca_pkg::N_TAPS
) (
  input  logic         clk,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;

  always_latch begin
    if (clk) q <= d;
  end
endmodule
