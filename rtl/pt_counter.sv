// pt_counter: plaintext generator of the circuit under analysis.
//
// An 8-bit counter that produces a new plaintext once every PERIOD enabled
// clock cycles (PERIOD = 8 in the published setup). A small prescaler counts
// the enabled cycles; when it wraps, the plaintext steps by one and wraps
// from 255 to 0, so all 256 plaintexts are visited in turn. While en is low
// both counters hold. The step-every-8-cycles behaviour and the enable are
// the published design; the prescaler, holding while disabled and the
// asynchronous active-low reset of both counters are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), en. pt is the current
// plaintext, step is high in the cycle whose rising edge advances pt.
module pt_counter #(
  parameter int unsigned PERIOD = 8,
  parameter int unsigned W      = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] pt,
  output logic         step
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [PW-1:0] pre;

  assign step = en && (pre == PW'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0;
      pt  <= '0;
    end else if (en) begin
      if (step) begin
        pre <= '0;
        pt  <= pt + 1'b1;
      end else begin
        pre <= pre + 1'b1;
      end
    end
  end
endmodule
