// cua_sbox: circuit under analysis, the first two steps of AES on one byte.
//
// A plaintext counter (pt_counter) offers a new byte every PT_PERIOD clocks
// while clk_en is high. The byte is XORed with the fixed key byte KEY
// (AddRoundKey) and passed through the AES S-box. The S-box output is written
// on every rising clock edge into N_COPIES identical 8-bit registers; the
// copies exist only to multiply the switching activity (16 x 8 = 128
// flip-flops in the published setup) so that an on-chip sensor sees it.
// The structure, the sizes, the key byte and the loading on every edge follow
// the published design; the asynchronous reset of the counter and the
// outputs that expose the registers (so synthesis keeps them) are this
// design's choices.
//
// Interface: clk (40 MHz in the published setup), rst_n (asynchronous, active
// low, clears counter and registers), clk_en (enables the plaintext counter).
// pt_step is high in the cycle whose rising edge loads the next plaintext.
// regs[i] holds S(pt ^ KEY) one clock after pt was presented.
module cua_sbox
#(
  parameter logic [7:0]  KEY       = rsca_pkg::KEY_BYTE,
  parameter int unsigned N_COPIES  = rsca_pkg::N_COPIES,
  parameter int unsigned PT_PERIOD = rsca_pkg::PT_PERIOD
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clk_en,
  output rsca_pkg::byte_t                  plaintext,
  output logic                   pt_step,
  output rsca_pkg::byte_t [N_COPIES-1:0]   regs
);
  timeunit 1ns;
  timeprecision 1ps;

  rsca_pkg::byte_t sbox_in, sbox_out;

  pt_counter #(.PERIOD(PT_PERIOD), .W(8)) u_counter (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (clk_en),
    .pt   (plaintext),
    .step (pt_step)
  );

  assign sbox_in = plaintext ^ KEY;   // AddRoundKey

  aes_sbox u_sbox (.a(sbox_in), .y(sbox_out));

  for (genvar c = 0; c < N_COPIES; c++) begin : g_copy
    (* keep = "true", dont_touch = "true" *) rsca_pkg::byte_t r;
    (* keep = "true", dont_touch = "true" *)
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) r <= '0;
      else        r <= sbox_out;
    end
    assign regs[c] = r;
  end
endmodule
