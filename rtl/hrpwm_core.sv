// Synthesizable core of the DCM-based high-resolution DPWM.
//
// The pulse is built from two parts. The PWM generator counts whole CK0
// periods: it raises SET one CK0 cycle after count 0 and raises CLRD when the
// count equals the coarse duty field dc[M:2]. The multiphase circuit re-times
// CLRD on the four quadrant clocks and the fine field dc[1:0] chooses which of
// them resets the SR latch. The latch output is high from the SET edge to the
// chosen RESET edge, so the on-time is
//   Ton = dc[M:2] * Tck + dc[1:0] * Tck/4 = dc * Tck/4
// and the period is 2^(M-1) * Tck, Tck being the CK0 period. The resolution is
// a quarter of the clock period while every flip-flop runs at the CK0 rate.
//
// Range: a coarse field of 0 suppresses SET, so commands 0 to 3 give no
// pulse. For the largest coarse field, 2^(M-1)-1, with a non-zero fine field
// the RESET pulse overlaps the next SET and the next pulse starts late by
// dc[1:0] quarter periods; every other command gives Ton = dc * Tck/4.
//
// Interface: ck0..ck3 are the 0/90/180/270 degree clocks from the DCM, rst
// an asynchronous active-high reset, dc the duty command dc[M:0] (to be
// changed only between pulses), pwm the output. set, reset and cnt are
// brought out for observation.
module hrpwm_core
  import hrpwm_pkg::*;
#(
  parameter int unsigned M = DC_MSB_DEFAULT  // dc is dc[M:0]
) (
  input  logic         ck0,
  input  logic         ck1,
  input  logic         ck2,
  input  logic         ck3,
  input  logic         rst,
  input  logic [M:0]   dc,
  output logic         pwm,
  output logic         set,
  output logic         reset,
  output logic [M-2:0] cnt
);

  timeunit 1ns;
  timeprecision 1ps;

  logic       setd;
  logic       clrd;
  logic [3:0] clr;

  pwm_generator #(.M(M)) u_pwm_generator (
    .ck0       (ck0),
    .rst       (rst),
    .dc_coarse (dc[M:2]),
    .cnt       (cnt),
    .setd      (setd),
    .clrd      (clrd),
    .set       (set)
  );

  multiphase_circuit u_multiphase_circuit (
    .ck0     (ck0),
    .ck1     (ck1),
    .ck2     (ck2),
    .ck3     (ck3),
    .rst     (rst),
    .clrd    (clrd),
    .dc_fine (phase_sel_e'(dc[1:0])),
    .clr     (clr),
    .reset   (reset)
  );

  sr_latch u_sr_latch (
    .s   (set),
    .r   (reset),
    .rst (rst),
    .q   (pwm)
  );

endmodule
