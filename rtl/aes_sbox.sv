// aes_sbox: the Rijndael (AES) S-box for one byte, purely combinational.
//
// The S-box of the circuit under analysis. It is computed rather than stored:
// the multiplicative inverse in GF(2^8) (modulus x^8+x^4+x^3+x+1) is formed as
// a^254 with a fixed square-and-multiply chain (0 maps to 0), then the AES
// affine transform b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63 is
// applied. The function is the standard AES S-box; computing it instead of
// writing out its 256 entries is this design's choice, and a synthesis tool
// reduces it to the same 8-input logic.
//
// Interface: a (8 bits) in, y (8 bits) out, no clock, no latency.
module aes_sbox
  import rsca_pkg::*;
(
  input  byte_t a,
  output byte_t y
);
  timeunit 1ns;
  timeprecision 1ps;

  // Multiplication in GF(2^8) modulo the AES polynomial.
  function automatic byte_t gf_mul(byte_t x, byte_t z);
    byte_t p, t;
    p = '0;
    t = x;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) p ^= t;
      t = t[7] ? ((t << 1) ^ 8'h1b) : (t << 1);
    end
    return p;
  endfunction

  // a^254 = a^-1: a^2, a^3, a^6, a^12, a^15, a^30, a^60, a^120, a^126, a^252, a^254
  function automatic byte_t gf_inv(byte_t x);
    byte_t x2, x3, x6, x12, x15, x30, x60, x120, x126, x252;
    x2   = gf_mul(x, x);
    x3   = gf_mul(x2, x);
    x6   = gf_mul(x3, x3);
    x12  = gf_mul(x6, x6);
    x15  = gf_mul(x12, x3);
    x30  = gf_mul(x15, x15);
    x60  = gf_mul(x30, x30);
    x120 = gf_mul(x60, x60);
    x126 = gf_mul(x120, x6);
    x252 = gf_mul(x126, x126);
    return gf_mul(x252, x2);
  endfunction

  function automatic byte_t rotl(byte_t x, int unsigned n);
    return byte_t'((x << n) | (x >> (8 - n)));
  endfunction

  byte_t inv;

  always_comb begin
    inv = gf_inv(a);
    y   = inv ^ rotl(inv, 1) ^ rotl(inv, 2) ^ rotl(inv, 3) ^ rotl(inv, 4) ^ 8'h63;
  end
endmodule
