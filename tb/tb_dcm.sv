// Self-checking testbench of the dcm behavioural model. Three instances share
// a 400 ns CLKIN: the default one (no phase shift, CLKFX = 4 x CLKIN), one
// with PHASE_SHIFT = 64 and CLKFX = 3/2 x CLKIN, and one with
// PHASE_SHIFT = -64. For each it checks LOCKED, the period and 50 % duty of
// CLK0, the quarter-period spacing of CLK90/CLK180/CLK270, the fixed fine
// shift PHASE_SHIFT * T/256 of CLK0 against CLKIN and the CLKFX period.
module tb_dcm;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T = 400.0;

  logic clkin = 1'b0;
  logic rst;
  logic [2:0] c0, c90, c180, c270, fx, lk;

  int checks = 0, failures = 0;
  realtime t_in;

  dcm u0 (.CLKIN(clkin), .CLKFB(c0[0]), .RST(rst), .CLK0(c0[0]), .CLK90(c90[0]),
          .CLK180(c180[0]), .CLK270(c270[0]), .CLKFX(fx[0]), .LOCKED(lk[0]));
  dcm #(.PHASE_SHIFT(64), .CLKFX_MULTIPLY(3), .CLKFX_DIVIDE(2)) u1 (
          .CLKIN(clkin), .CLKFB(c0[1]), .RST(rst), .CLK0(c0[1]), .CLK90(c90[1]),
          .CLK180(c180[1]), .CLK270(c270[1]), .CLKFX(fx[1]), .LOCKED(lk[1]));
  dcm #(.PHASE_SHIFT(-64)) u2 (
          .CLKIN(clkin), .CLKFB(c0[2]), .RST(rst), .CLK0(c0[2]), .CLK90(c90[2]),
          .CLK180(c180[2]), .CLK270(c270[2]), .CLKFX(fx[2]), .LOCKED(lk[2]));

  always #(T / 2.0) clkin = ~clkin;
  always @(posedge clkin) t_in = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  initial begin
    #(T * 500);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure one instance: times of the next rising edges of each output
  task automatic measure(input int i, input realtime shift, input realtime t_fx);
    realtime r0, f0, r0b, r90, r180, r270, rfx, rfx2;
    @(posedge c0[i]);
    r0 = $realtime;
    check(near(r0 - t_in, shift), $sformatf("inst %0d CLK0 shift %f", i, r0 - t_in));
    @(negedge c0[i]);
    f0 = $realtime;
    @(posedge c0[i]);
    r0b = $realtime;
    check(near(r0b - r0, T), $sformatf("inst %0d CLK0 period", i));
    check(near(f0 - r0, T / 2.0), $sformatf("inst %0d CLK0 duty", i));
    @(posedge c90[i]);  r90  = $realtime;
    @(posedge c180[i]); r180 = $realtime;
    @(posedge c270[i]); r270 = $realtime;
    check(near(r90 - r0b, T / 4.0), $sformatf("inst %0d CLK90", i));
    check(near(r180 - r0b, T / 2.0), $sformatf("inst %0d CLK180", i));
    check(near(r270 - r0b, 3.0 * T / 4.0), $sformatf("inst %0d CLK270", i));
    #1;
    check(c0[i] == 1'b0 && c90[i] == 1'b0 && c180[i] == 1'b1 && c270[i] == 1'b1,
          $sformatf("inst %0d levels after 270", i));
    @(posedge fx[i]); rfx  = $realtime;
    @(posedge fx[i]); rfx2 = $realtime;
    check(near(rfx2 - rfx, t_fx), $sformatf("inst %0d CLKFX period %f", i, rfx2 - rfx));
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clkin);
    check(lk == 3'b000, "LOCKED low in reset");
    #1 rst = 1'b0;
    repeat (2) @(posedge clkin);
    check(lk == 3'b000, "LOCKED low before lock");
    repeat (6) @(posedge clkin);
    #1;
    check(lk == 3'b111, "LOCKED after lock");
    measure(0, 0.0, T / 4.0);
    measure(1, T / 4.0, T * 2.0 / 3.0);
    measure(2, 3.0 * T / 4.0, T / 4.0);
    // reset drops LOCKED and stops the outputs
    @(posedge clkin);
    #1 rst = 1'b1;
    #1;
    check(lk == 3'b000, "LOCKED cleared by RST");
    repeat (3) @(posedge clkin);
    #1;
    check(c0 == 3'b000 && c90 == 3'b000 && c180 == 3'b000 && c270 == 3'b000,
          "outputs stopped in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
