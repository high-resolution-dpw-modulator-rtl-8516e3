// Shared types and constants of the DCM-based high-resolution DPWM.
//
// The duty command dc[M:0] is split in two fields: the coarse field dc[M:2]
// counts whole periods of the base clock CK0 and is compared against the
// period counter, and the fine field dc[1:0] picks one of the four quadrant
// clock phases (0, 90, 180, 270 degrees) that ends the pulse. The default
// width M = 12 is the 13-bit command dc(12:0) of the reference
// implementation; the counter then has M-1 = 11 bits and the PWM period is
// 2^11 periods of CK0.
package hrpwm_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  // Most significant bit index of the duty command dc[M:0].
  localparam int unsigned DC_MSB_DEFAULT = 12;

  // Fine field dc[1:0]: which quadrant phase of CK0 clears the SR latch.
  typedef enum logic [1:0] {
    PHASE_0   = 2'b00,  // CLR0, re-timed on CK0
    PHASE_90  = 2'b01,  // CLR1, re-timed on CK1 (CLK90)
    PHASE_180 = 2'b10,  // CLR2, re-timed on CK2 (CLK180)
    PHASE_270 = 2'b11   // CLR3, re-timed on CK3 (CLK270)
  } phase_sel_e;

endpackage
