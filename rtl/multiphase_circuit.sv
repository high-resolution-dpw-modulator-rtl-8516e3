// Multiphase synchronous circuit: fine (sub-cycle) stage of the high-resolution DPWM.
//
// FF0 captures the comparator pulse CLRD on CK0, giving CLR0. FF1, FF2 and FF3
// sample CLR0 on CK1, CK2 and CK3, the 90, 180 and 270 degree phases of CK0,
// so CLR1..CLR3 are copies of CLR0 delayed by one, two and three quarters of
// the CK0 period. A 4:1 multiplexer steered by the two duty LSBs dc[1:0]
// passes one of them as RESET to the SR latch:
//   00 -> CLR0, 01 -> CLR1, 10 -> CLR2, 11 -> CLR3.
// Every flip-flop is clocked, so the pulse that ends the PWM output has
// a resolution of a quarter of the CK0 period without any asynchronous
// delay logic.
//
// Interface: ck0..ck3 are the quadrant DCM clocks, rst is an asynchronous
// active-high reset of the four flip-flops, clrd the CMP2 output, dc_fine the
// duty LSBs, clr the four re-timed pulses and reset the multiplexer output.
// Timing: CLR0 rises one CK0 edge after CLRD; CLRk rises k quarter periods
// later. dc_fine must be held steady while the selected pulse is active.
//
// The flip-flop chain and the multiplexer coding follow the reference
// architecture; the reset is this design's choice.
module multiphase_circuit
  import hrpwm_pkg::*;
(
  input  logic       ck0,
  input  logic       ck1,
  input  logic       ck2,
  input  logic       ck3,
  input  logic       rst,
  input  logic       clrd,
  input  phase_sel_e dc_fine,  // dc[1:0]
  output logic [3:0] clr,      // {CLR3, CLR2, CLR1, CLR0}
  output logic       reset     // R input of the SR latch
);

  timeunit 1ns;
  timeprecision 1ps;

  logic clr0, clr1, clr2, clr3;

  assign clr = {clr3, clr2, clr1, clr0};

  // FF0
  always_ff @(posedge ck0 or posedge rst) begin
    if (rst) clr0 <= 1'b0;
    else     clr0 <= clrd;
  end

  // FF1
  always_ff @(posedge ck1 or posedge rst) begin
    if (rst) clr1 <= 1'b0;
    else     clr1 <= clr0;
  end

  // FF2
  always_ff @(posedge ck2 or posedge rst) begin
    if (rst) clr2 <= 1'b0;
    else     clr2 <= clr0;
  end

  // FF3
  always_ff @(posedge ck3 or posedge rst) begin
    if (rst) clr3 <= 1'b0;
    else     clr3 <= clr0;
  end

  // Phase multiplexer
  always_comb begin
    unique case (dc_fine)
      PHASE_0:   reset = clr0;
      PHASE_90:  reset = clr1;
      PHASE_180: reset = clr2;
      PHASE_270: reset = clr3;
      default:   reset = clr0;
    endcase
  end

endmodule
