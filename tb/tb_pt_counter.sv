// tb_pt_counter: self-checking test of the plaintext counter.
//
// With the enable held high the plaintext must step by one exactly every
// eight clocks and wrap from 255 to 0; with the enable low it must hold; the
// step pulse must come in the cycle before each change; reset must clear it.
module tb_pt_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] pt;
  logic       step;
  int checks = 0, failures = 0;

  pt_counter #(.PERIOD(8), .W(8)) dut (.clk, .rst_n, .en, .pt, .step);

  always #12.5 clk = ~clk;   // 40 MHz

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%t: %s", $realtime, what); end
  endtask

  int enabled_cycles = 0;
  int last_change = 0;
  int wraps = 0;

  initial begin
    logic [7:0] prev;
    repeat (3) @(negedge clk);
    check(pt == 0 && !step, "reset value");
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(pt == 0, "counter moved while disabled");
    en = 1'b1;
    prev = pt;
    // 300 plaintexts
    for (int c = 0; c < 300 * 8; c++) begin
      bit stepped;
      // Random short pauses of the enable.
      if (c % 97 == 50) begin
        en = 1'b0;
        repeat (5) begin
          @(negedge clk);
          check(pt == prev && !step, "changed while disabled");
        end
        en = 1'b1;
      end
      #1 stepped = step;
      @(negedge clk);
      enabled_cycles++;
      if (pt != prev) begin
        check(pt == prev + 8'd1, "step is not +1");
        check(stepped, "no step pulse before change");
        check(enabled_cycles - last_change == 8, "step period is not 8 enabled clocks");
        if (prev == 8'hff) wraps++;
        last_change = enabled_cycles;
        prev = pt;
      end else begin
        check(!stepped, "step pulse without change");
      end
    end
    check(wraps == 1, "no wrap 255 -> 0");
    rst_n = 1'b0;
    #1;
    check(pt == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
