// tb_tdl_sensor: self-checking test of the delay-line sensor.
//
// Runs the sensor at 200 MHz under several constant droop levels. For every
// clock it records the population count of the pattern the latches hold after
// the falling edge and checks that exactly this count appears on sample six
// rising edges later (pipeline latency and adder tree). It checks that the
// sample lies inside the delay lines' range, that a larger droop (slower
// primitives) gives a strictly smaller mean sample, and that the raw latched
// patterns contain bubble errors at least once, which the count must absorb.
module tb_tdl_sensor;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 256;
  localparam int unsigned LAT = 6;

  logic clk = 1'b0;
  rsca_pkg::droop_t droop = '0;
  logic [8:0] sample;

  int checks = 0, failures = 0;
  int bubbles = 0;

  tdl_sensor dut (.clk(clk), .droop(droop), .sample(sample));

  always #2.5 clk = ~clk;

  // Watchdog.
  initial begin
    #20us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected counts, indexed by the rising edge at which they must appear.
  int exp_q[$];
  int edge_no = 0;

  function automatic int popcount(logic [N-1:0] v);
    int n = 0;
    for (int i = 0; i < N; i++) n += int'(v[i]);
    return n;
  endfunction

  // A bubble: a 0 below a 1 inside one line (thermometer code broken).
  function automatic bit has_bubble(logic [N-1:0] v);
    for (int t = 0; t < 4; t++) begin
      bit seen_zero;
      seen_zero = 0;
      for (int i = 0; i < 64; i++) begin
        if (!v[t*64+i]) seen_zero = 1;
        else if (seen_zero) return 1;
      end
    end
    return 0;
  endfunction

  logic [N-1:0] held;
  always @(negedge clk) begin
    #0.5;   // after the latches have closed
    held = dut.u_latch.q;
    exp_q.push_back(popcount(held));
    if (has_bubble(held)) bubbles++;
  end

  bit compare_on = 0;
  always @(posedge clk) begin
    edge_no++;
    #0.1;
    // exp_q[0] was latched before the LAT-th rising edge back, counting this one.
    if (exp_q.size() >= LAT) begin
      int e;
      e = exp_q.pop_front();
      if (compare_on) begin
        checks++;
        if (int'(sample) != e) begin
          failures++;
          if (failures < 10) $display("edge %0d: sample %0d, latched count %0d", edge_no, sample, e);
        end
      end
    end
  end

  real mean_at[3];
  int  droops[3] = '{0, 100, 300};

  initial begin
    repeat (20) @(posedge clk);
    compare_on = 1;
    for (int k = 0; k < 3; k++) begin
      real acc;
      acc = 0;
      droop = rsca_pkg::droop_t'(droops[k]);
      repeat (12) @(posedge clk);   // let the pipeline settle
      for (int n = 0; n < 40; n++) begin
        @(posedge clk); #0.2;
        acc += real'(sample);
        checks++;
        if (sample == 0 || sample >= 9'(N)) begin
          failures++;
          $display("sample %0d out of the delay-line range", sample);
        end
      end
      mean_at[k] = acc / 40.0;
      $display("droop %0d/10000: mean sample %0.2f", droops[k], mean_at[k]);
    end
    checks++;
    if (!(mean_at[0] > mean_at[1] && mean_at[1] > mean_at[2])) begin
      failures++;
      $display("sample does not fall with droop");
    end
    // Vary the droop every clock for a while, so that bubbles can show.
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      droop = rsca_pkg::droop_t'($urandom_range(0, 400));
    end
    repeat (10) @(posedge clk);
    checks++;
    if (bubbles == 0) begin
      failures++;
      $display("no bubble error seen in the latched patterns");
    end
    $display("latched patterns with bubbles: %0d", bubbles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
