// tb_ddpwm_controller_top: closed-loop test of the whole controller at its default
// sizes, driving a switched model of the boost power stage through a 4-bit ADC model.
//
// Phases: start-up at Vin = 8 V, 25 Ohm, reference 12 V; a line step to Vin = 10 V; the
// reference pulled to 0 (the output cannot go below Vin, so the PID output clamps at
// zero); the reference back at 12 V with Vin = 7 V and a 30 Ohm load. At the end of
// each regulating phase the ADC must read the reference code in every sample of a
// 200 us window and the 8-bit duty command must not move: no limit cycle.
// Throughout, the gate on-time summed over every 256-clock frame must equal the duty
// command in force for that frame, and ADC requests must come every 16 clocks.
// Each mechanism (dithered periods, frames with a fractional command, command changes
// taken at frame boundaries, zero-error bin, output clamping) is counted and must
// occur.
`timescale 1ns/1ps
module tb_ddpwm_controller_top;

  localparam int CLKS_PER_US = 50;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] vref_code;
  logic [3:0] adc_code;
  logic       adc_valid;
  logic       adc_sample;
  logic       gate;
  logic [7:0] duty_cmd, duty_frame;
  logic       duty_update, frame_start, extra_clock, sat_hi, sat_lo;

  real vin, r_load, vout, il;

  int checks = 0;
  int failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  ddpwm_controller_top dut (
    .clk, .rst_n, .vref_code, .adc_code, .adc_valid, .adc_sample, .gate,
    .duty_cmd, .duty_update, .duty_frame, .frame_start, .extra_clock, .sat_hi, .sat_lo
  );

  boost_power_stage_model plant (
    .clk, .gate, .vin, .r_load, .vout, .il
  );

  adc_model #(.N(4), .VLSB(1.0), .LATENCY(3)) adc (
    .clk, .rst_n, .sample(adc_sample), .vin(vout), .code(adc_code), .valid(adc_valid)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---- frame on-time check and mechanism counters ----
  int  acc_on = 0, exp_on = 0, duty_fs = 0;
  bit  fs_prev = 0, have_frame = 0;
  int  frames = 0, frame_errs = 0;
  int  n_extra = 0, n_frac_frames = 0, n_frame_changes = 0, n_zero_bin = 0, n_sat_lo = 0;
  int  last_sample = -1, cyc = 0, period_errs = 0;
  int  prev_frame_duty = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (fs_prev) begin
        if (have_frame) begin
          frames++;
          if (acc_on != exp_on) begin
            frame_errs++;
            if (frame_errs < 5) $display("frame on-time %0d, expected %0d", acc_on, exp_on);
          end
        end
        acc_on     = int'(gate);
        exp_on     = duty_fs;
        have_frame = 1;
      end else begin
        acc_on += int'(gate);
      end
      fs_prev = frame_start;
      if (frame_start) begin
        duty_fs = int'(duty_frame);
        if (duty_frame[3:0] != 0) n_frac_frames++;
        if (prev_frame_duty >= 0 && int'(duty_frame) != prev_frame_duty) n_frame_changes++;
        prev_frame_duty = int'(duty_frame);
      end
      if (adc_sample) begin
        if (extra_clock) n_extra++;
        if (last_sample >= 0 && cyc - last_sample != 16) period_errs++;
        last_sample = cyc;
      end
      if (adc_valid && adc_code == vref_code) n_zero_bin++;
      if (duty_update && sat_lo) n_sat_lo++;
    end
  end

  // ---- steady-state window: ADC always in the zero-error bin, duty constant ----
  task automatic steady_window(input int us, input string phase);
    int dmin, dmax, off_bin, samples;
    dmin = 256; dmax = -1; off_bin = 0; samples = 0;
    repeat (us * CLKS_PER_US) begin
      @(posedge clk);
      if (adc_valid) begin
        samples++;
        if (adc_code != vref_code) off_bin++;
      end
      if (duty_update) begin
        if (int'(duty_cmd) < dmin) dmin = int'(duty_cmd);
        if (int'(duty_cmd) > dmax) dmax = int'(duty_cmd);
      end
    end
    $display("%s: vout=%0.3f V, duty %0d..%0d /256, %0d of %0d samples off the zero-error bin",
             phase, vout, dmin, dmax, off_bin, samples);
    check(samples > 0 && off_bin == 0, {phase, ": output held in the zero-error bin"});
    check(dmin == dmax, {phase, ": constant duty command (no limit cycle)"});
  endtask

  initial begin
    vin = 8.0; r_load = 25.0; vref_code = 4'd12;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    repeat (600 * CLKS_PER_US) @(posedge clk);
    steady_window(200, "Vin 8 V, 25 Ohm");
    check(duty_cmd > 8'd70 && duty_cmd < 8'd110, "duty near 1 - Vin/Vo at 8 V");

    vin = 10.0;
    repeat (600 * CLKS_PER_US) @(posedge clk);
    steady_window(200, "Vin 10 V, 25 Ohm");
    check(duty_cmd > 8'd30 && duty_cmd < 8'd70, "duty near 1 - Vin/Vo at 10 V");

    vref_code = 4'd0;
    repeat (200 * CLKS_PER_US) @(posedge clk);
    check(duty_cmd == 8'd0 && sat_lo, "reference below Vin clamps the duty at zero");

    vin = 7.0; r_load = 30.0; vref_code = 4'd12;
    repeat (800 * CLKS_PER_US) @(posedge clk);
    steady_window(200, "Vin 7 V, 30 Ohm");

    check(frames > 100 && frame_errs == 0, "gate on-time per frame equals the duty command");
    check(period_errs == 0, "one ADC request every 16 clocks (3.125 MHz)");
    $display("mechanisms: dithered periods %0d, fractional frames %0d, frame updates %0d, zero-bin samples %0d, clamp-at-zero %0d",
             n_extra, n_frac_frames, n_frame_changes, n_zero_bin, n_sat_lo);
    check(n_extra > 0, "DDPM extra clock used");
    check(n_frac_frames > 0, "frames with a fractional duty (two adjacent levels)");
    check(n_frame_changes > 0, "duty command taken at frame boundaries");
    check(n_zero_bin > 0, "zero-error bin reached");
    check(n_sat_lo > 0, "PID output clamped at zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000 * CLKS_PER_US) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
