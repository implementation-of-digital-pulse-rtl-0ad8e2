`timescale 1ns / 1ps
// sr_latch: the SR latch whose output is the PWM signal.
//
// q goes high while s is high and goes low while r or rst is high.
// Otherwise it holds its value. Reset dominates: when s and r overlap, q
// is low. The reset register relies on this for duty cycles below one
// clock period. It starts r a fraction of a cycle after s, while s is
// still high, and the overlap must end the pulse. q follows its inputs
// without a clock, so the pulse edges keep the sub-cycle timing of the
// DCM phase that drove r. The latch is intended and comes from the
// document. The reset-dominant priority and the rst input are this
// design's choices.
module sr_latch (
  input  logic s,
  input  logic r,
  input  logic rst,
  output logic q
);
  always_latch begin
    if (r || rst) q = 1'b0;
    else if (s)   q = 1'b1;
  end
endmodule
