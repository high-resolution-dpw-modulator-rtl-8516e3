// Behavioural model of an FPGA digital clock manager (DCM); not synthesizable.
// On an FPGA this module is replaced by the vendor's DCM primitive, whose
// ports it copies.
//
// The model measures the period T of CLKIN between rising edges. After
// LOCK_CYCLES rising edges it starts its outputs, each a 50 % duty clock of
// period T:
//   CLK0   in phase with CLKIN
//   CLK90  delayed by T/4
//   CLK180 delayed by T/2
//   CLK270 delayed by 3T/4
// All four are further delayed by the fixed fine phase shift
// PHASE_SHIFT * T/256, PHASE_SHIFT in [-255, 255]; a negative shift is
// modelled as the equivalent delay of (256 + PHASE_SHIFT) * T/256. CLKFX is
// the frequency-synthesised output, CLKFX_MULTIPLY/CLKFX_DIVIDE times the
// frequency of CLKIN, aligned to every CLKFX_DIVIDE-th rising edge of CLKIN.
// LOCKED rises at the first rising edge of CLKFB once the outputs run; RST
// (active high) stops the outputs, which end low within 1.25 T, and
// clears LOCKED. The model assumes the
// feedback path from CLK0 to CLKFB has no delay and does not remove skew;
// it does not model the variable phase shifter or the CLK2X/CLKDV outputs.
//
// The quadrant outputs, the 1/256 fine shift step and the CLKFX function
// follow the DCM feature description; the lock count, the lock condition and
// the default CLKFX ratio are this model's choices.
module dcm #(
  parameter int unsigned LOCK_CYCLES    = 4,
  parameter int          PHASE_SHIFT    = 0,
  parameter int unsigned CLKFX_MULTIPLY = 4,
  parameter int unsigned CLKFX_DIVIDE   = 1
) (
  input  logic CLKIN,
  input  logic CLKFB,
  input  logic RST,
  output logic CLK0,
  output logic CLK90,
  output logic CLK180,
  output logic CLK270,
  output logic CLKFX,
  output logic LOCKED
);

  timeunit 1ns;
  timeprecision 1ps;

  realtime     t_last;
  realtime     period;
  realtime     shift;
  realtime     t_fx;
  int unsigned n_edges;
  int unsigned fx_div;
  logic        running;

  initial begin
    CLK0    = 1'b0;
    CLK90   = 1'b0;
    CLK180  = 1'b0;
    CLK270  = 1'b0;
    CLKFX   = 1'b0;
    LOCKED  = 1'b0;
    running = 1'b0;
    n_edges = 0;
    fx_div  = 0;
    t_last  = 0.0;
    period  = 0.0;
  end

  // Period measurement and output generation, once per rising edge of CLKIN.
  always @(posedge CLKIN) begin
    if (RST) begin
      n_edges = 0;
      running = 1'b0;
      fx_div  = 0;
    end else begin
      if (n_edges > 0) period = $realtime - t_last;
      t_last = $realtime;
      if (n_edges < LOCK_CYCLES) n_edges = n_edges + 1;
      else                       running = 1'b1;
    end
    if (running && period > 0.0) begin
      shift = period * (((PHASE_SHIFT % 256) + 256) % 256) / 256.0;
      CLK0   <= #(shift)                 1'b1;
      CLK0   <= #(shift + period / 2.0)  1'b0;
      CLK90  <= #(shift + period / 4.0)  1'b1;
      CLK90  <= #(shift + 3.0 * period / 4.0) 1'b0;
      CLK180 <= #(shift + period / 2.0)  1'b1;
      CLK180 <= #(shift + period)        1'b0;
      CLK270 <= #(shift + 3.0 * period / 4.0) 1'b1;
      CLK270 <= #(shift + 5.0 * period / 4.0) 1'b0;
      if (fx_div == 0) begin
        t_fx = period * CLKFX_DIVIDE / CLKFX_MULTIPLY;
        fork
          repeat (CLKFX_MULTIPLY) begin
            CLKFX = 1'b1;
            #(t_fx / 2.0);
            CLKFX = 1'b0;
            #(t_fx / 2.0);
          end
        join_none
      end
      fx_div = (fx_div + 1 >= CLKFX_DIVIDE) ? 0 : fx_div + 1;
    end
  end

  // Lock indication.
  always @(posedge CLKFB or posedge RST) begin
    if (RST)          LOCKED <= 1'b0;
    else if (running) LOCKED <= 1'b1;
  end

endmodule
