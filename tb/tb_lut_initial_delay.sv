// tb_lut_initial_delay: self-checking test of the initial-delay model.
//
// Measures the time from each clock edge to the matching output edge and
// checks it against 12 stages of 180 ps stretched by the droop, worked out
// here as 12 * 180 * (1 + droop/10000) ps, plus 0 to 10 ps of edge jitter
// (1 ps tolerance), for several droop values.
module tb_lut_initial_delay;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, clk_dly;
  rsca_pkg::droop_t droop = '0;
  int checks = 0, failures = 0;

  lut_initial_delay dut (.clk_in(clk), .droop, .clk_dly);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int droops[4] = '{0, 50, 200, 630};

  initial begin
    realtime t0, t1;
    int expect_ps, got_ps;
    #10;
    foreach (droops[k]) begin
      droop = rsca_pkg::droop_t'(droops[k]);
      #10;
      expect_ps = int'($floor(12.0 * 180.0 * (10000.0 + droops[k]) / 10000.0 + 0.5));
      for (int e = 0; e < 4; e++) begin
        clk = ~clk;
        t0 = $realtime;
        @(clk_dly);
        t1 = $realtime;
        got_ps = int'((t1 - t0) * 1000.0 + 0.5);
        checks++;
        if (got_ps < expect_ps - 1 || got_ps > expect_ps + 10 + 1) begin
          failures++;
          $display("droop %0d: delay %0d ps, expected %0d ps", droops[k], got_ps, expect_ps);
        end
        #5;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
