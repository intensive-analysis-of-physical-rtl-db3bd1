// tb_cua_sbox: self-checking test of the circuit under analysis.
//
// After reset all 16 registers must be 0. With clk_en high, every clock the
// 16 registers must hold S(p ^ 0x55) for the plaintext p present one clock
// earlier (key byte 85 = 0x55), all copies equal; the plaintext must step
// every 8 clocks and visit all 256 values. The S-box values come from a
// reference computed here by repeated multiplication (a^254) in GF(2^8) with
// a bit-serial affine map.
module tb_cua_sbox;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, clk_en = 1'b0;
  logic [7:0] plaintext;
  logic       pt_step;
  logic [15:0][7:0] regs;
  int checks = 0, failures = 0;

  cua_sbox dut (.clk, .rst_n, .clk_en, .plaintext, .pt_step, .regs);

  always #12.5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] gmul(logic [7:0] x, logic [7:0] z);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] v);
    logic [7:0] b, s;
    b = 8'h01;
    if (v == 0) b = 0;
    else for (int i = 0; i < 254; i++) b = gmul(b, v);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return s;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%t: %s", $realtime, what); end
  endtask

  bit seen [256];

  initial begin
    logic [7:0] p_prev;
    int steps, since;
    steps = 0;
    since = 0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(negedge clk);
    for (int c = 0; c < 16; c++) check(regs[c] == 8'h00, "register not reset");
    rst_n = 1'b1;
    clk_en = 1'b1;
    p_prev = plaintext;
    for (int n = 0; n < 256 * 8 + 16; n++) begin
      @(negedge clk);
      since++;
      for (int c = 0; c < 16; c++) check(regs[c] == regs[0], "copies differ");
      check(regs[0] == ref_sbox(p_prev ^ 8'h55), "register is not S(pt ^ key)");
      if (plaintext != p_prev) begin
        check(since == 8, "plaintext period is not 8");
        since = 0;
        steps++;
      end
      seen[plaintext] = 1;
      p_prev = plaintext;
    end
    foreach (seen[i]) check(seen[i], "plaintext value never produced");
    check(steps >= 256, "too few plaintexts");
    // Enable low: plaintext holds, registers keep being written with the same value.
    clk_en = 1'b0;
    p_prev = plaintext;
    repeat (20) begin
      @(negedge clk);
      check(plaintext == p_prev && regs[7] == ref_sbox(p_prev ^ 8'h55), "hold while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
