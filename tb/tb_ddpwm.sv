// tb_ddpwm: checks the 8-bit dyadic DPWM (4-bit counter DPWM plus 4-bit DDPM).
// Every command 0 .. 255, then random ones, is applied in the middle of a frame. It
// must be in force from the next frame boundary (duty_frame), frames must be 256
// clocks with periods of 16 clocks, and in that frame each period must carry either
// dH = cmd[7:4] or dH + 1 clocks of on-time, with exactly cmd[3:0] periods at dH + 1,
// so the frame on-time equals the command. extra_clock must flag those periods.
`timescale 1ns/1ps
module tb_ddpwm;

  localparam int N = 4;
  localparam int M = 4;
  localparam int P = 1 << N;
  localparam int F = 1 << M;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic [N+M-1:0] duty_cmd = '0;
  logic           pwm, period_start, frame_start, extra_clock;
  logic [N+M-1:0] duty_frame;

  int checks = 0;
  int failures = 0;

  always #10 clk = ~clk;

  ddpwm #(.N(N), .M(M)) dut (
    .clk, .rst_n, .duty_cmd, .pwm, .period_start, .frame_start, .extra_clock, .duty_frame
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    int expect_frame, d, hi_periods, on, total, extra_flags, ps;
    int g [P*F];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do @(posedge clk); while (!frame_start);
    expect_frame = 0;
    for (int it = 0; it < 256 + 64; it++) begin
      // here: an edge whose pre-edge state is the first clock of a frame
      check(duty_frame == (N+M)'(expect_frame), "command in force one frame after it was set");
      d = (it < 256) ? it : int'($urandom_range(0, 255));
      extra_flags = 0; ps = 0;
      for (int k = 0; k < P * F; k++) begin
        if (k == P * F / 2) duty_cmd <= (N+M)'(d);   // change mid-frame
        if (period_start && extra_clock) extra_flags++;
        if (period_start) ps++;
        @(posedge clk);
        g[k] = int'(pwm);
      end
      check(frame_start, "frame of 256 clocks");
      check(ps == F, "16 periods per frame");
      hi_periods = 0; total = 0;
      for (int p = 0; p < F; p++) begin
        on = 0;
        for (int c = 0; c < P; c++) on += g[p*P + c];
        total += on;
        if (on == expect_frame / F + 1) hi_periods++;
        check(on == expect_frame / F || on == expect_frame / F + 1,
              $sformatf("period on-time %0d between adjacent levels of %0d", on, expect_frame));
      end
      check(hi_periods == expect_frame % F, "number of periods with the extra clock");
      check(extra_flags == expect_frame % F, "extra_clock flags");
      check(total == expect_frame, $sformatf("frame on-time %0d for command %0d", total, expect_frame));
      expect_frame = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
