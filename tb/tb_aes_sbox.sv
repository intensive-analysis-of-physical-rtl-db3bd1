// tb_aes_sbox: self-checking test of the AES S-box.
//
// Checks all 256 inputs against a reference built here by a different route:
// exponent/logarithm tables of GF(2^8) over the generator 0x03, giving the
// inverse as 3^(255 - log a), followed by the affine map written bit by bit
// as in the AES standard. A row of published S-box values and the fact that
// the S-box is a permutation are checked as well.
module tb_aes_sbox;
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a(a), .y(y));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] exp_t [256];
  int         log_t [256];

  function automatic logic [7:0] xtime3(logic [7:0] v);   // v * 0x03
    logic [7:0] d;
    d = v[7] ? ((v << 1) ^ 8'h1b) : (v << 1);
    return d ^ v;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] v);
    logic [7:0] b, s;
    b = (v == 0) ? 8'h00 : exp_t[(255 - log_t[v]) % 255];
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return s;
  endfunction

  // First row and a few other entries of the published table.
  logic [7:0] row0 [16] = '{8'h63, 8'h7c, 8'h77, 8'h7b, 8'hf2, 8'h6b, 8'h6f, 8'hc5,
                            8'h30, 8'h01, 8'h67, 8'h2b, 8'hfe, 8'hd7, 8'hab, 8'h76};

  bit seen [256];

  initial begin
    logic [7:0] p;
    p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = p;
      log_t[p] = i;
      p = xtime3(p);
    end
    for (int i = 0; i < 256; i++) seen[i] = 0;

    for (int i = 0; i < 16; i++) begin
      a = 8'(i); #1;
      checks++;
      if (y !== row0[i]) begin failures++; $display("S(%02h)=%02h, table %02h", a, y, row0[i]); end
    end
    a = 8'h53; #1; checks++; if (y !== 8'hed) begin failures++; $display("S(53)=%02h", y); end
    a = 8'hff; #1; checks++; if (y !== 8'h16) begin failures++; $display("S(ff)=%02h", y); end
    a = 8'h10; #1; checks++; if (y !== 8'hca) begin failures++; $display("S(10)=%02h", y); end

    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1;
      checks++;
      if (y !== ref_sbox(a)) begin
        failures++;
        $display("S(%02h)=%02h, reference %02h", a, y, ref_sbox(a));
      end
      seen[y] = 1;
    end
    checks++;
    foreach (seen[i]) if (!seen[i]) begin failures++; $display("value %02h never produced", i); break; end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
