// Self-checking testbench of pwm_generator at its default width (M = 12).
// A reference counter in the testbench predicts CNT, SETD, CLRD and SET every
// CK0 cycle for a set of coarse duty values, including 0 (no SETD), 1, a
// middle value and the largest value, and the period of SET is checked to be
// 2^(M-1) cycles.
module tb_pwm_generator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned M = 12;
  localparam int unsigned N = 1 << (M - 1);

  logic         ck0 = 1'b0;
  logic         rst;
  logic [M-2:0] dc_coarse;
  logic [M-2:0] cnt;
  logic         setd, clrd, set;

  int checks = 0, failures = 0;
  int unsigned ref_cnt;
  logic        ref_set;
  int unsigned last_set_cycle, cycle, set_periods;

  pwm_generator dut (.*);

  always #5 ck0 = ~ck0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d cnt=%0d ref=%0d set=%b", what, cycle, cnt, ref_cnt, set);
    end
  endtask

  initial begin
    #(200000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-2:0] values[5] = '{11'd0, 11'd1, 11'd4, 11'd1234, 11'(N - 1)};
    rst = 1'b1;
    dc_coarse = '0;
    ref_cnt = 0;
    ref_set = 1'b0;
    cycle = 0;
    set_periods = 0;
    last_set_cycle = 0;
    repeat (3) @(negedge ck0);
    check(cnt == 0 && set == 1'b0, "reset state");
    rst = 1'b0;
    foreach (values[v]) begin
      dc_coarse = values[v];
      #1;
      repeat (2 * N) begin
        // at the falling edge: compare settled outputs against the reference
        check(cnt == ref_cnt[M-2:0], "CNT");
        check(setd == (ref_cnt == 0 && dc_coarse != 0), "SETD");
        check(clrd == (ref_cnt[M-2:0] == dc_coarse), "CLRD");
        check(set == ref_set, "SET");
        if (set) begin
          if (set_periods > 0) check(cycle - last_set_cycle == N, "SET period");
          last_set_cycle = cycle;
          set_periods++;
        end
        @(posedge ck0);
        ref_set = (ref_cnt == 0 && dc_coarse != 0);
        ref_cnt = (ref_cnt + 1) % N;
        cycle++;
        @(negedge ck0);
      end
    end
    check(set_periods > 4, "SET pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
