// SR latch that forms the PWM output.
//
// The PWM output goes high while S is active and low while R is active; with
// neither active it holds its state. R wins when both are active, and the
// system reset rst acts as a second R input so the output starts low. The
// latch is written as a level-sensitive latch whose gate is S|R and whose
// data is S and not R; in an FPGA this maps to one latch cell.
//
// The latch is the one intentional latch of the design: it lets the output
// fall at the edge of whichever quadrant clock produced R, which is what gives
// the quarter-period resolution, and no flip-flop on a single clock can do
// that. S and R are both outputs of flip-flops, so they do not glitch.
//
// Interface: s is SET from the PWM generator, r is RESET from the multiphase
// circuit, rst the active-high system reset, q the PWM output. Timing:
// transparent, q follows s or r with no clock.
//
// The SR function follows the reference architecture; the reset-dominant
// priority and the extra rst input are this design's choices.
module sr_latch (
  input  logic s,
  input  logic r,
  input  logic rst,
  output logic q
);

  timeunit 1ns;
  timeprecision 1ps;

  logic clr;
  assign clr = r | rst;

  always_latch begin
    if (s || clr) q = s && !clr;
  end

endmodule
