// Self-checking testbench of multiphase_circuit. The testbench makes four
// 400 ns quadrant clocks itself and sends one-cycle CLRD pulses, synchronous
// to CK0. For every value of dc[1:0] it checks that CLR0..CLR3 rise k quarter
// periods after the CK0 edge that captures CLRD, that each stays high one
// period, and that RESET is the selected one of them.
module tb_multiphase_circuit;
  timeunit 1ns;
  timeprecision 1ps;
  import hrpwm_pkg::*;

  localparam realtime T = 400.0;

  logic ck0 = 0, ck1 = 0, ck2 = 0, ck3 = 0;
  logic rst, clrd;
  phase_sel_e dc_fine;
  logic [3:0] clr;
  logic reset;

  int checks = 0, failures = 0;
  realtime t_cap, t_rise, t_fall;

  multiphase_circuit dut (.*);

  // CK0 rises at phase 0, CK1 at 90, CK2 at 180, CK3 at 270 degrees
  always begin
    ck0 = 1; ck2 = 0; #(T / 4.0);
    ck1 = 1; ck3 = 0; #(T / 4.0);
    ck2 = 1; ck0 = 0; #(T / 4.0);
    ck3 = 1; ck1 = 0; #(T / 4.0);
  end

  always @(posedge reset) t_rise = $realtime;
  always @(negedge reset) t_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  initial begin
    #(T * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    clrd = 1'b0;
    dc_fine = PHASE_0;
    repeat (3) @(negedge ck0);
    check(clr == 4'b0 && reset == 1'b0, "reset state");
    rst = 1'b0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int k = 0; k < 4; k++) begin
        dc_fine = phase_sel_e'(k);
        repeat (4) @(negedge ck0);
        check(reset == 1'b0 && clr == 4'b0, "idle");
        clrd = 1'b1;
        @(posedge ck0);
        t_cap = $realtime;
        t_rise = -1.0;
        t_fall = -1.0;
        @(negedge ck0);
        clrd = 1'b0;
        #(2.0 * T + 1.0);
        check(t_rise - t_cap == k * T / 4.0, $sformatf("RESET delay phase %0d", k));
        check(t_fall - t_rise == T, $sformatf("RESET width phase %0d", k));
        check(clr == 4'b0, "CLR pulses ended");
      end
    end
    // CLR vector: all four copies rise in order, each a quarter period apart
    clrd = 1'b1;
    @(posedge ck0);
    t_cap = $realtime;
    @(negedge ck0);
    clrd = 1'b0;
    #1.0;
    check(clr == 4'b0111, "CLR0..CLR2 high at half period");
    #(T / 4.0);
    check(clr == 4'b1111, "CLR0..CLR3 high at 3/4 period");
    #(T / 4.0);
    check(clr == 4'b1110, "CLR0 low after one period");
    #(T / 4.0);
    check(clr == 4'b1100, "CLR1 low after 5/4 period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
