// tb_tdl_latch_bank: self-checking test of the sensor latches.
//
// While the enable is high the outputs must follow random input words; while
// it is low they must keep the word present at the falling edge, whatever
// the inputs do.
module tb_tdl_latch_bank;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 256;
  logic         clk = 1'b0;
  logic [N-1:0] d = '0, q;
  int checks = 0, failures = 0;

  tdl_latch_bank dut (.clk, .d, .q);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] w;
    for (int i = 0; i < N / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    logic [N-1:0] kept;
    for (int k = 0; k < 200; k++) begin
      clk = 1'b1;
      repeat (3) begin
        d = rnd(); #1;
        checks++;
        if (q !== d) begin failures++; $display("not transparent while enabled"); end
      end
      kept = d;
      clk = 1'b0; #1;
      repeat (3) begin
        d = rnd(); #1;
        checks++;
        if (q !== kept) begin failures++; $display("did not hold while disabled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
