`timescale 1ns / 1ps
// set_register: DFF1 of the PWM, the flip-flop between the SET comparator
// and the S input of the SR latch.
//
// It samples the combinational SET request on the rising edge of CLK0.
// The latch's S input therefore comes from a flip-flop output and is free
// of comparator glitches. S is high for the one clock cycle after the cycle
// in which the counter was zero: it rises on edge 1 of the period.
// The flip-flop follows the document. The synchronous clear is this
// design's choice.
module set_register (
  input  logic clk,   // DCM CLK0
  input  logic rst,   // synchronous, active high
  input  logic set,   // combinational SET request
  output logic s      // to the latch S input
);
  always_ff @(posedge clk) begin
    if (rst) s <= 1'b0;
    else     s <= set;
  end
endmodule
