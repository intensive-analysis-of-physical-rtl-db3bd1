// ones_counter_adder_tree: pipelined population count of the latched taps.
//
// Counting ones instead of locating the first 0 (a priority encoder) makes
// the sample insensitive to bubble errors: a pattern such as 1110100 gives
// the same count as 1111000. Stage 1 counts the ones of each GROUP-bit slice
// of the input; every following stage adds neighbouring partial sums in
// pairs, so N_IN = 256 with GROUP = 8 gives 32 counts of 4 bits, then 16, 8,
// 4, 2 and 1 sums: 1 + 5 = 6 registered stages, the published pipeline depth,
// and a 9-bit result. The split into a group counter plus a binary adder tree
// is this design's choice; the published text gives the function, the
// 6-stage depth and the widths.
//
// Interface: clk, bits[N_IN-1:0], count[OUT_W-1:0]. No reset: the pipeline
// is refilled after STAGES clocks. Timing: the input present at rising edge
// k appears on count after rising edge k+STAGES-1 (STAGES cycles of latency),
// one new result every clock.
module ones_counter_adder_tree #(
  parameter int unsigned N_IN  = rsca_pkg::N_TAPS,
  parameter int unsigned GROUP = 8,
  parameter int unsigned OUT_W = $clog2(N_IN + 1)
) (
  input  logic             clk,
  input  logic [N_IN-1:0]  bits,
  output logic [OUT_W-1:0] count
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NG     = N_IN / GROUP;        // partial sums after stage 1
  localparam int unsigned LEVELS = $clog2(NG);          // adder stages after stage 1
  localparam int unsigned STAGES = 1 + LEVELS;

  function automatic logic [OUT_W-1:0] ones_of(logic [GROUP-1:0] v);
    logic [OUT_W-1:0] n;
    n = '0;
    for (int b = 0; b < GROUP; b++) n += OUT_W'(v[b]);
    return n;
  endfunction

  // g_lvl[l].s: the NG/2^l partial sums registered by stage l+1.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned NS = NG >> l;
    logic [NS-1:0][OUT_W-1:0] s;
    if (l == 0) begin : g_count
      // Stage 1: ones-counter of each group.
      always_ff @(posedge clk)
        for (int g = 0; g < NS; g++) s[g] <= ones_of(bits[g*GROUP +: GROUP]);
    end else begin : g_add
      // Stages 2..STAGES: pairwise adder tree.
      always_ff @(posedge clk)
        for (int j = 0; j < NS; j++) s[j] <= g_lvl[l-1].s[2*j] + g_lvl[l-1].s[2*j+1];
    end
  end

  assign count = g_lvl[LEVELS].s[0];

  initial begin
    assert (N_IN % GROUP == 0 && (1 << LEVELS) == NG)
      else $error("N_IN/GROUP must be a power of two");
    assert (STAGES >= 1) else $error("pipeline needs at least one stage");
  end
endmodule
