// rsca_pkg: sizes and types shared by the TDL power sensor and the AES S-box
// circuit under analysis.
//
// The sensor sends its own clock through an initial delay of 12 LUTs into
// four parallel carry-chain delay lines of 64 taps each (16 CARRY4 per line),
// latches the 256 taps while the clock is high and counts the ones in a
// 6-stage pipelined adder tree, giving a 9-bit sample per sensor clock.
// These numbers are the published configuration; the picosecond delays used
// by the behavioural delay models are this design's own estimates for a
// 28 nm FPGA and live next to the models. Checked on its own, the package
// draws unused-parameter warnings: its constants are read by the modules
// that import it, not by the package itself.
package rsca_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Sensor geometry
  localparam int unsigned N_INIT_LUT   = 12;   // LUTs in the initial delay
  localparam int unsigned N_TDL        = 4;    // parallel tapped delay lines
  localparam int unsigned TAPS_PER_TDL = 64;   // 16 CARRY4 x 4 taps
  localparam int unsigned N_TAPS       = N_TDL * TAPS_PER_TDL;  // 256 latches
  localparam int unsigned SAMPLE_W     = $clog2(N_TAPS + 1);    // 9 bits

  // Circuit under analysis
  localparam logic [7:0]  KEY_BYTE     = 8'd85; // key byte of the experiments
  localparam int unsigned N_COPIES     = 16;    // copies of the S-box register
  localparam int unsigned PT_PERIOD    = 8;     // clocks per plaintext

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [7:0]          byte_t;

  // Delay increase of the delay primitives in 0.01 % steps (0 .. 10.23 %). It stands for the
  // supply drop caused by switching activity and only drives the behavioural
  // delay models; it has no counterpart in the hardware.
  typedef logic [9:0]          droop_t;
endpackage
