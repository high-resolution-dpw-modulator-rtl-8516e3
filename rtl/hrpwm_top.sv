// Top level of the DCM-based high-resolution digital pulse-width modulator.
//
// One DCM turns the board clock into four quadrant clocks CK0..CK3 (0, 90,
// 180 and 270 degrees). The synchronous core (hrpwm_core) counts CK0 periods
// for the coarse part of the duty command and uses the quadrant clocks for
// the two fine bits, giving a pulse of on-time dc * Tck/4 in a period of
// 2^(M-1) * Tck, Tck being the clock period. With the default M = 12 the
// duty command is dc[12:0] and the period is 2048 clock periods; with a
// 400 ns clock one step of dc is 100 ns of on-time.
//
// The DCM here is a behavioural model for simulation; for an FPGA build the
// dcm instance is replaced by the vendor primitive with the same ports. CLK0
// is fed back to CLKFB directly. The core is held in reset until the DCM
// reports LOCKED (this design's choice). CLKFX is not used by the modulator.
//
// Interface: clk is the board clock (DCM CLKIN), rst an active-high reset,
// dc the duty command, pwm the modulated output towards the drive circuit,
// locked the DCM lock status; set, reset and cnt are brought out for
// observation.
module hrpwm_top
  import hrpwm_pkg::*;
#(
  parameter int unsigned M = DC_MSB_DEFAULT  // dc is dc[M:0]
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [M:0] dc,
  output logic       pwm,
  output logic       locked,
  output logic         set,    // S input of the SR latch, for observation
  output logic         reset,  // R input of the SR latch, for observation
  output logic [M-2:0] cnt     // period counter, for observation
);

  timeunit 1ns;
  timeprecision 1ps;

  logic         ck0;
  logic         ck1;
  logic         ck2;
  logic         ck3;
  logic         clkfx_unused;
  logic         core_rst;

  dcm u_dcm (
    .CLKIN  (clk),
    .CLKFB  (ck0),
    .RST    (rst),
    .CLK0   (ck0),
    .CLK90  (ck1),
    .CLK180 (ck2),
    .CLK270 (ck3),
    .CLKFX  (clkfx_unused),
    .LOCKED (locked)
  );

  assign core_rst = rst | ~locked;

  hrpwm_core #(.M(M)) u_core (
    .ck0   (ck0),
    .ck1   (ck1),
    .ck2   (ck2),
    .ck3   (ck3),
    .rst   (core_rst),
    .dc    (dc),
    .pwm   (pwm),
    .set   (set),
    .reset (reset),
    .cnt   (cnt)
  );

endmodule
