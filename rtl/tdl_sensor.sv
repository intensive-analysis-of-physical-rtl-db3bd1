// tdl_sensor: on-chip supply-voltage sensor built from tapped delay lines.
//
// The sensor clock itself is the probe signal. It passes an initial delay of
// N_INIT_LUT LUTs and then fans out into N_TDL parallel carry-chain lines of
// TAPS_PER_TDL taps. While the clock is high the latches follow the taps; at
// its falling edge they hold how many taps the rising edge has reached in
// half a clock period. When switching activity elsewhere on the die pulls the
// supply down, every primitive slows and fewer taps are reached, so the
// sample falls. The ones-counter and adder tree count the 1s of all lines
// together, which both adds the resolution of the four lines and ignores
// bubble errors. This arrangement (12 LUTs, 4 x 64 carry taps, 256 latches,
// 6-stage ones-counter, 9-bit sample) is the published sensor. The delay
// lines here are behavioural timing models, so this module simulates the
// sensor but only its latches and counter are synthesizable; on an FPGA the
// two delay models are replaced by placed LUT and CARRY4 primitives. The
// small routing offset between the four lines and the 100 ps route of the
// clock to the latch enables (which lets the counter's first register, on the
// same clock edge, take the held pattern before the latches reopen) are this
// model's estimates.
//
// Interface: clk (200 MHz in the published setup), droop (model input only,
// 0.01 % delay steps), sample (9 bits). Timing: one sample per clock; the
// pattern latched 100 ps after a falling edge appears on sample 6 rising edges later.
module tdl_sensor
#(
  parameter int unsigned N_INIT_LUT   = rsca_pkg::N_INIT_LUT,
  parameter int unsigned N_TDL        = rsca_pkg::N_TDL,
  parameter int unsigned TAPS_PER_TDL = rsca_pkg::TAPS_PER_TDL,
  parameter int unsigned SAMPLE_W     = $clog2(N_TDL * TAPS_PER_TDL + 1)
) (
  input  logic                clk,
  input  rsca_pkg::droop_t              droop,
  output logic [SAMPLE_W-1:0] sample
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = N_TDL * TAPS_PER_TDL;

  logic         clk_dly;
  logic         latch_en;
  logic [N-1:0] taps;
  logic [N-1:0] held;

  lut_initial_delay #(.N_LUT(N_INIT_LUT)) u_init (
    .clk_in (clk),
    .droop  (droop),
    .clk_dly(clk_dly)
  );

  for (genvar t = 0; t < N_TDL; t++) begin : g_tdl
    carry4_tdl #(
      .TAPS     (TAPS_PER_TDL),
      .OFFSET_PS(3 * t),
      .SEED     (t + 1)
    ) u_line (
      .start(clk_dly),
      .droop(droop),
      .taps (taps[t*TAPS_PER_TDL +: TAPS_PER_TDL])
    );
  end

  // Latch enable route: gives the counter register its hold margin.
  clock_route_model #(.ROUTE_PS(100)) u_latch_route (
    .clk_in (clk),
    .clk_out(latch_en)
  );

  tdl_latch_bank #(.N(N)) u_latch (
    .clk(latch_en),
    .d  (taps),
    .q  (held)
  );

  ones_counter_adder_tree #(.N_IN(N), .GROUP(8), .OUT_W(SAMPLE_W)) u_count (
    .clk  (clk),
    .bits (held),
    .count(sample)
  );
endmodule
