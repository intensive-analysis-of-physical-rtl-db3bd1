// rsca_top: the system used to measure remote power side-channel leakage on
// a multi-tenant FPGA: a delay-line voltage sensor and a small AES victim
// circuit that share nothing but the chip's power distribution network.
//
// The victim (cua_sbox, 40 MHz) computes S(plaintext ^ key) for a new
// plaintext every 8 clocks and writes the result into 128 flip-flops. The
// sensor (tdl_sensor, 200 MHz) produces one 9-bit sample per sensor clock;
// the voltage drop caused by the victim's switching slows the sensor's delay
// lines and lowers the sample, which is what a correlation power analysis
// exploits. The trigger starts the victim's plaintext counter and goes, with
// the samples, to a trace recorder, so that traces can be aligned with the
// plaintexts. The block structure, clocks and sizes are the published
// system; the processing system, the trace recorder (ILA) and the trigger
// source (VIO) are vendor IP outside this module, and their signals are
// ports here. Bringing the victim's registers out (so synthesis keeps them)
// is this design's choice.
//
// Interface: clk_sensor, clk_cua (independent clocks), rst_n (asynchronous,
// active low, victim only), trigger (clk_cua domain), droop (simulation only:
// the delay increase the supply drop causes in the sensor's delay lines,
// 0.01 % steps; tie to 0 in hardware), sample (clk_sensor domain),
// trace_trigger, plaintext, pt_step and cua_regs (clk_cua domain).
module rsca_top
#(
  parameter logic [7:0]  KEY          = rsca_pkg::KEY_BYTE,
  parameter int unsigned N_TDL        = rsca_pkg::N_TDL,
  parameter int unsigned TAPS_PER_TDL = rsca_pkg::TAPS_PER_TDL,
  parameter int unsigned N_INIT_LUT   = rsca_pkg::N_INIT_LUT,
  parameter int unsigned N_COPIES     = rsca_pkg::N_COPIES,
  parameter int unsigned SAMPLE_W     = $clog2(N_TDL * TAPS_PER_TDL + 1)
) (
  input  logic                  clk_sensor,
  input  logic                  clk_cua,
  input  logic                  rst_n,
  input  logic                  trigger,
  input  rsca_pkg::droop_t                droop,
  output logic [SAMPLE_W-1:0]   sample,
  output logic                  trace_trigger,
  output rsca_pkg::byte_t                 plaintext,
  output logic                  pt_step,
  output rsca_pkg::byte_t [N_COPIES-1:0]  cua_regs
);
  timeunit 1ns;
  timeprecision 1ps;

  tdl_sensor #(
    .N_INIT_LUT  (N_INIT_LUT),
    .N_TDL       (N_TDL),
    .TAPS_PER_TDL(TAPS_PER_TDL),
    .SAMPLE_W    (SAMPLE_W)
  ) u_sensor (
    .clk   (clk_sensor),
    .droop (droop),
    .sample(sample)
  );

  cua_sbox #(
    .KEY      (KEY),
    .N_COPIES (N_COPIES),
    .PT_PERIOD(rsca_pkg::PT_PERIOD)
  ) u_cua (
    .clk      (clk_cua),
    .rst_n    (rst_n),
    .clk_en   (trigger),
    .plaintext(plaintext),
    .pt_step  (pt_step),
    .regs     (cua_regs)
  );

  // The recorder's second probe records the trigger next to the samples.
  assign trace_trigger = trigger;
endmodule
