// tb_carry4_tdl: self-checking test of the carry-chain delay-line model.
//
// Sends single edges down one 64-tap line and records when every tap
// switches. Each tap must switch once per edge, tap i no earlier than
// (i+1) * 10 ps and no later than (i+1) * 10 + 24 ps after the input (tap
// delay plus wire spread, each stage rounded to whole picoseconds, 1 ps tolerance); the times must scale with the droop; and some
// tap must switch before a lower one (the source of bubble errors).
module tb_carry4_tdl;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned TAPS = 64;
  logic              start = 1'b0;
  rsca_pkg::droop_t  droop = '0;
  logic [TAPS-1:0]   taps;
  int checks = 0, failures = 0;

  carry4_tdl dut (.start, .droop, .taps);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_sw [TAPS];
  int      n_sw [TAPS];
  logic [TAPS-1:0] last;

  always @(taps) begin
    for (int i = 0; i < TAPS; i++)
      if (taps[i] != last[i]) begin
        t_sw[i] = $realtime;
        n_sw[i]++;
      end
    last = taps;
  end

  initial begin
    realtime t0;
    real s;
    int inversions;
    real sum0, sum1;
    last = '0;
    sum0 = 0; sum1 = 0;
    inversions = 0;
    #5;
    for (int k = 0; k < 4; k++) begin
      droop = (k < 2) ? 10'd0 : 10'd500;
      s = (k < 2) ? 1.0 : 1.05;
      #5;
      foreach (n_sw[i]) n_sw[i] = 0;
      start = ~start;
      t0 = $realtime;
      #3;
      for (int i = 0; i < TAPS; i++) begin
        int dps;
        dps = int'((t_sw[i] - t0) * 1000.0 + 0.5);
        checks++;
        if (n_sw[i] != 1 || dps < (i + 1) * int'($floor(10 * s)) || dps > (i + 1) * int'($ceil(10 * s)) + int'($ceil(24 * s)) + 1) begin
          failures++;
          if (failures < 10) $display("tap %0d: %0d switches, %0d ps", i, n_sw[i], dps);
        end
        if (k < 2) sum0 += dps; else sum1 += dps;
        if (i > 0 && t_sw[i] < t_sw[i-1]) inversions++;
      end
      checks++;
      if (taps != (start ? '1 : '0)) begin failures++; $display("line did not settle"); end
    end
    checks++;
    if (!(sum1 > sum0 * 1.03)) begin failures++; $display("droop does not slow the line"); end
    checks++;
    if (inversions == 0) begin failures++; $display("no tap switched before a lower tap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
