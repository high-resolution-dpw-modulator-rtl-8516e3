// PWM generator: coarse (counter/comparator) stage of the high-resolution DPWM.
//
// A free-running M-1 bit counter CNT, clocked by CK0, sets the PWM period to
// 2^(M-1) CK0 cycles. Two comparators watch it:
//   CMP1: SETD = (CNT == 0) and (dc[M:2] != 0)
//   CMP2: CLRD = (CNT == dc[M:2])
// Flip-flop FFe registers SETD on CK0, so SET is a one-cycle pulse that starts
// at the CK0 edge which ends count 0. CLRD goes to the multiphase circuit,
// which re-times it and produces the RESET of the SR latch.
//
// Interface: ck0 is the in-phase DCM clock, rst an asynchronous active-high
// reset that clears CNT and SET; dc_coarse is dc[M:2]. cnt is brought out for
// observation. Timing: SETD and CLRD are combinational from CNT, SET follows
// SETD by one CK0 cycle.
//
// The counter width, both comparator equations and FFe follow the reference
// architecture. The asynchronous reset and the counter counting up from 0 and
// wrapping are this design's choices. dc_coarse is used as it arrives, so it
// should be changed only between pulses.
module pwm_generator #(
  parameter int unsigned M = hrpwm_pkg::DC_MSB_DEFAULT  // dc is dc[M:0]
) (
  input  logic         ck0,
  input  logic         rst,
  input  logic [M-2:0] dc_coarse,  // dc[M:2]
  output logic [M-2:0] cnt,        // CNT
  output logic         setd,       // CMP1 output
  output logic         clrd,       // CMP2 output
  output logic         set         // FFe output, S input of the SR latch
);

  timeunit 1ns;
  timeprecision 1ps;

  // COUNTER
  always_ff @(posedge ck0 or posedge rst) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  // CMP1 and CMP2
  always_comb begin
    setd = (cnt == '0) && (dc_coarse != '0);
    clrd = (cnt == dc_coarse);
  end

  // FFe
  always_ff @(posedge ck0 or posedge rst) begin
    if (rst) set <= 1'b0;
    else     set <= setd;
  end

endmodule
