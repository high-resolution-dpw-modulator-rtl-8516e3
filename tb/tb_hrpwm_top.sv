// End-to-end testbench of hrpwm_top at its default size (13-bit duty command,
// 11-bit counter, period of 2048 clock cycles). The board clock is 400 ns, so
// one step of the duty command is 100 ns of on-time. For every command it
// lets the output settle for two PWM periods and then measures one pulse:
//   dc >= 4:                 Ton = dc * 100 ns, rising edge while CNT = 1,
//                            period 2048 * 400 ns
//   dc < 4:                  no pulse (coarse field 0 suppresses SET)
//   dc[12:2] = 2047 and
//   dc[1:0] != 0:            the reset overlaps the next SET, Ton = 2047 * 400 ns
// The commands include the series 8..15 and the values 3, 11 and 15 of the
// reference measurements, the ends of the range and random values. It counts
// how often each mechanism occurs (DCM lock wait, each of the four phases
// ending a pulse, SET suppression, full-scale overlap) and fails if one never
// does.
module tb_hrpwm_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned M    = 12;
  localparam int unsigned N    = 1 << (M - 1);   // CK0 cycles per PWM period
  localparam realtime     T    = 400.0;          // clock period
  localparam realtime     STEP = T / 4.0;        // on-time per unit of dc

  logic          clk = 1'b0;
  logic          rst;
  logic [M:0]    dc;
  logic          pwm, locked, set, reset;
  logic [M-2:0]  cnt;

  int checks = 0, failures = 0;
  int n_lock_wait = 0, n_suppressed = 0, n_overlap = 0;
  int n_phase[4] = '{0, 0, 0, 0};
  realtime t_rise, t_fall, t_prev_rise;
  int unsigned rises;
  logic [M-2:0] cnt_at_rise;

  hrpwm_top dut (.*);

  always #(T / 2.0) clk = ~clk;

  always @(posedge pwm) begin
    t_prev_rise = t_rise;
    t_rise      = $realtime;
    cnt_at_rise = cnt;
    rises++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  task automatic run_dc(input logic [M:0] v);
    realtime exp_ton;
    bit      overlap;
    dc = v;
    repeat (2 * N) @(posedge clk);
    rises = 0;
    if (v < 4) begin
      repeat (N + 4) @(posedge clk);
      check(rises == 0 && pwm == 1'b0, $sformatf("no pulse for dc=%0d", v));
      n_suppressed++;
      return;
    end
    overlap = (v[M:2] == N - 1) && (v[1:0] != 0);
    exp_ton = overlap ? (N - 1) * T : v * STEP;
    // wait for two rising edges and the falling edge after the second
    wait (rises == 2);
    @(negedge pwm);
    t_fall = $realtime;
    check(near(t_fall - t_rise, exp_ton),
          $sformatf("dc=%0d Ton=%0.1f expected %0.1f", v, t_fall - t_rise, exp_ton));
    check(near(t_rise - t_prev_rise, N * T), $sformatf("dc=%0d period", v));
    if (overlap) n_overlap++;
    else begin
      check(cnt_at_rise == 1, $sformatf("dc=%0d pulse starts at CNT=1", v));
      n_phase[v[1:0]]++;
    end
  endtask

  initial begin
    #(1.0e9);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M:0] figs[11] = '{13'd8, 13'd9, 13'd10, 13'd11, 13'd12, 13'd13, 13'd14, 13'd15,
                             13'd3, 13'd11, 13'd15};
    logic [M:0] ends[10] = '{13'd0, 13'd1, 13'd2, 13'd4, 13'd5, 13'd7,
                             13'd8188, 13'd8189, 13'd8190, 13'd8191};
    t_rise = 0.0;
    t_prev_rise = 0.0;
    t_fall = 0.0;
    rises = 0;
    rst = 1'b1;
    dc = 13'd8;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    #1;
    check(locked == 1'b0 && pwm == 1'b0, "held until locked");
    while (!locked) begin
      @(posedge clk);
      n_lock_wait++;
    end
    foreach (figs[i]) run_dc(figs[i]);
    foreach (ends[i]) run_dc(ends[i]);
    for (int i = 0; i < 16; i++) run_dc(13'(4 + ($urandom % 8184)));
    $display("lock wait %0d cycles, phases %0d/%0d/%0d/%0d, suppressed %0d, overlap %0d",
             n_lock_wait, n_phase[0], n_phase[1], n_phase[2], n_phase[3],
             n_suppressed, n_overlap);
    check(n_lock_wait > 0, "DCM lock wait happened");
    foreach (n_phase[k]) check(n_phase[k] > 0, $sformatf("phase %0d used", k));
    check(n_suppressed > 0, "SET suppression happened");
    check(n_overlap > 0, "full-scale overlap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
