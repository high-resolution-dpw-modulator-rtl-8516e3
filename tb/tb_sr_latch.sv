// Self-checking testbench of sr_latch: walks S, R and the system reset through
// random sequences and compares the output with a reference SR latch
// (reset dominant, hold when neither input is active).
module tb_sr_latch;
  timeunit 1ns;
  timeprecision 1ps;

  logic s, r, rst, q;
  logic ref_q;
  int checks = 0, failures = 0;
  int holds = 0, sets = 0, clears = 0;

  sr_latch dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 1'b0; r = 1'b0; rst = 1'b1;
    ref_q = 1'b0;
    #1;
    checks++;
    if (q !== 1'b0) failures++;
    for (int i = 0; i < 2000; i++) begin
      s   = ($urandom % 3) == 0;
      r   = ($urandom % 3) == 0;
      rst = ($urandom % 16) == 0;
      if (r || rst)  begin ref_q = 1'b0; clears++; end
      else if (s)    begin ref_q = 1'b1; sets++;   end
      else                  holds++;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL s=%b r=%b rst=%b q=%b exp=%b", s, r, rst, q, ref_q);
      end
    end
    checks++;
    if (holds == 0 || sets == 0 || clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
