// lut_initial_delay: behavioural model (not synthesizable) of the sensor's
// initial delay, a chain of N_LUT LUTs used as buffers.
//
// The sensor clock enters the chain and leaves it N_LUT LUT delays later. The
// chain is long enough that, at the falling edge of the clock, the end of the
// high phase lies inside the observable carry-chain lines that follow. Each
// stage is a transport delay of LUT_PS picoseconds stretched by droop: the
// delay is LUT_PS * (1 + droop/10000), the slowing of the primitives when the
// core supply drops. The chain length of 12 LUTs is the published figure;
// the 180 ps per stage (LUT plus routing), the linear droop law and a random
// jitter of 0..JITTER_PS ps per edge (clock jitter and thermal noise, added
// at the last stage) are this model's estimates.
//
// Interface: clk_in, droop (0.01 % steps, model input only), clk_dly.
// The delays depend on droop at run time, so a linter cannot prove them
// non-zero and warns that they may be #0; they are at least 2.16 ns in total.
// A synthesis tool drops the delays and keeps the chain as a plain wire.
// Timing: clk_dly follows clk_in after about N_LUT*LUT_PS, 2.16 ns by default.
module lut_initial_delay
  import rsca_pkg::*;
#(
  parameter int unsigned N_LUT  = rsca_pkg::N_INIT_LUT,
  parameter int unsigned LUT_PS    = 180,
  parameter int unsigned JITTER_PS = 10
) (
  input  logic   clk_in,
  input  droop_t droop,
  output logic   clk_dly
);
  // Delays are counted in femtoseconds so that the droop scaling stays exact
  // in integer arithmetic: LUT_PS ps * (10000 + droop) / 10000 = LUT_PS * (10000 + droop) / 10 fs.
  timeunit 1fs;
  timeprecision 1fs;

  logic [N_LUT:0] node;

  initial node[N_LUT:1] = '0;
  assign node[0] = clk_in;

  for (genvar i = 0; i < N_LUT; i++) begin : g_lut
    if (i < N_LUT - 1) begin : g_fixed
      always @(node[i]) node[i+1] <= #(LUT_PS * (10000 + int'(droop)) / 10) node[i];
    end else begin : g_last
      // The last stage also carries the random edge jitter.
      always @(node[i])
        node[i+1] <= #(LUT_PS * (10000 + int'(droop)) / 10 + $urandom_range(0, JITTER_PS * 1000)) node[i];
    end
  end

  assign clk_dly = node[N_LUT];
endmodule
