// tb_ones_counter_adder_tree: self-checking test of the pipelined ones-counter.
//
// Feeds a new 256-bit word every clock (all zeros, all ones, thermometer codes
// with and without bubbles, random words) and checks that each word's number
// of ones, computed here bit by bit, appears on count exactly six clocks
// later, with a new result every clock.
module tb_ones_counter_adder_tree;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N   = 256;
  localparam int unsigned LAT = 6;

  logic         clk = 1'b0;
  logic [N-1:0] bits = '0;
  logic [8:0]   count;

  int checks = 0, failures = 0;

  ones_counter_adder_tree dut (.clk(clk), .bits(bits), .count(count));

  always #2.5 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int popcount(logic [N-1:0] v);
    int n = 0;
    for (int i = 0; i < N; i++) if (v[i]) n++;
    return n;
  endfunction

  function automatic logic [N-1:0] word_for(int k);
    logic [N-1:0] w;
    case (k % 5)
      0: w = '0;
      1: w = '1;
      2: w = (N'(1) << (k % N)) - 1;                            // thermometer
      3: w = ((N'(1) << (k % N)) - 1) ^ (N'(1) << ((k % N) / 2)); // with a bubble
      default: for (int i = 0; i < N / 32; i++) w[i*32 +: 32] = $urandom;
    endcase
    return w;
  endfunction

  int expected[$];
  int sent = 0;

  initial begin
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      bits = word_for(k);
      expected.push_back(popcount(bits));
      sent++;
      // The word applied before rising edge j shows after rising edge j+LAT-1.
      if (expected.size() > LAT) begin
        int e;
        e = expected.pop_front();
        checks++;
        if (int'(count) != e) begin
          failures++;
          if (failures < 10) $display("word %0d: count %0d, expected %0d", sent - LAT - 1, count, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
