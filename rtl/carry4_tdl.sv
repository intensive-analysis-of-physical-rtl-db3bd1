// carry4_tdl: behavioural model (not synthesizable) of one observable delay
// line of the sensor, TAPS/4 CARRY4 primitives giving TAPS taps.
//
// The delayed sensor clock enters the carry chain after a routing offset of
// OFFSET_PS and advances one tap every TAP_PS. Every tap reaches its latch
// through a wire of its own, whose extra delay is fixed per tap and spread
// over 0..SKEW_PS-1 ps (a hash of SEED and the tap index stands for process
// variation and clock skew). Because that spread is larger than one tap step,
// a later tap can switch before an earlier one, which produces the bubble
// errors ("1..110100..0") the ones-counter must tolerate. All delays are
// stretched by droop, as in lut_initial_delay. 64 taps per line (16 CARRY4)
// is the published size; the picosecond values are this model's estimates.
//
// Interface: start (delayed clock), droop (0.01 % steps, model input only),
// taps[TAPS-1:0], tap 0 nearest the start of the chain. A synthesis tool
// drops the delays, so there every tap is a plain copy of start.
module carry4_tdl
  import rsca_pkg::*;
#(
  parameter int unsigned TAPS      = rsca_pkg::TAPS_PER_TDL,
  parameter int unsigned TAP_PS    = 10,
  parameter int unsigned SKEW_PS   = 25,
  parameter int unsigned OFFSET_PS = 0,
  parameter int unsigned SEED      = 1
) (
  input  logic            start,
  input  droop_t          droop,
  output logic [TAPS-1:0] taps
);
  // Delays are counted in femtoseconds: X ps stretched by droop is
  // X * (10000 + droop) / 10 fs, in integer arithmetic.
  timeunit 1fs;
  timeprecision 1fs;

  // Fixed wire delay of one tap, in ps, from a small integer hash.
  function automatic int unsigned wire_ps(int unsigned idx);
    int unsigned h;
    h = (SEED * 32'h9E3779B1) ^ (idx * 32'h85EBCA77);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return (SKEW_PS == 0) ? 0 : (h % SKEW_PS);
  endfunction

  int unsigned scale;
  always_comb scale = 10000 + int'(droop);

  logic [TAPS:0] chain;   // carry chain nodes, chain[0] = line input
  logic          entry;

  initial begin
    entry = 1'b0;
    chain[TAPS:1] = '0;
    taps = '0;
  end

  always @(start) entry <= #(OFFSET_PS * scale / 10) start;
  assign chain[0] = entry;

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    localparam int unsigned WPS = wire_ps(i);
    always @(chain[i]) chain[i+1] <= #(TAP_PS * scale / 10) chain[i];
    always @(chain[i+1]) taps[i]  <= #(WPS * scale / 10) chain[i+1];
  end
endmodule
