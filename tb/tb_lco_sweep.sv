// tb_lco_sweep: limit-cycle comparison over the input-voltage range 7 .. 10 V.
//
// Two closed loops run side by side on identical boost models and 4-bit ADC models
// (1 V per LSB, reference code 12): the full controller with its 8-bit dyadic DPWM,
// and a reference loop built from the same PID compensator feeding only the 4 MSBs of
// its command to a plain 4-bit counter DPWM. For each input voltage both loops start
// from rest, settle for 1 ms and are then watched for 300 us. A loop is limit-cycle
// free when the ADC code stays at the reference and the duty command does not move.
// The dyadic loop must be limit-cycle free at every input voltage; the 4-bit loop
// must show a limit cycle at one input voltage at least, since its duty steps move
// the output by more than one ADC LSB near 12 V.
`timescale 1ns/1ps
module tb_lco_sweep;

  localparam int CLKS_PER_US = 50;
  localparam int NPTS = 13;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #10 clk = ~clk;

  real vin, r_load;
  logic [3:0] vref_code = 4'd12;

  // ---- loop A: full controller (8-bit dyadic DPWM) ----
  logic [3:0] a_code;
  logic       a_valid, a_sample, a_gate;
  logic [7:0] a_duty, a_duty_frame;
  logic       a_upd, a_fs, a_extra, a_shi, a_slo;
  real        a_vout, a_il;

  ddpwm_controller_top dut (
    .clk, .rst_n, .vref_code, .adc_code(a_code), .adc_valid(a_valid), .adc_sample(a_sample),
    .gate(a_gate), .duty_cmd(a_duty), .duty_update(a_upd), .duty_frame(a_duty_frame),
    .frame_start(a_fs), .extra_clock(a_extra), .sat_hi(a_shi), .sat_lo(a_slo)
  );
  boost_power_stage_model plant_a (.clk, .gate(a_gate), .vin, .r_load, .vout(a_vout), .il(a_il));
  adc_model #(.N(4), .VLSB(1.0), .LATENCY(3)) adc_a (
    .clk, .rst_n, .sample(a_sample), .vin(a_vout), .code(a_code), .valid(a_valid));

  // ---- loop B: same PID, only the 4 MSBs to a 4-bit counter DPWM ----
  logic [3:0] b_code, b_count;
  logic       b_valid, b_gate, b_last, b_upd, b_shi, b_slo;
  logic [7:0] b_duty;
  logic [4:0] b_level;
  real        b_vout, b_il;

  pid_compensator b_pid (
    .clk, .rst_n, .err_valid(b_valid), .err(signed'({1'b0, vref_code}) - signed'({1'b0, b_code})),
    .duty(b_duty), .duty_valid(b_upd), .sat_hi(b_shi), .sat_lo(b_slo)
  );
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) b_level <= '0;
    else if (b_last) b_level <= {1'b0, b_duty[7:4]};
  dpwm #(.N(4)) b_dpwm (.clk, .rst_n, .duty(b_level), .pwm(b_gate), .period_last(b_last), .count(b_count));
  boost_power_stage_model plant_b (.clk, .gate(b_gate), .vin, .r_load, .vout(b_vout), .il(b_il));
  adc_model #(.N(4), .VLSB(1.0), .LATENCY(3)) adc_b (
    .clk, .rst_n, .sample(b_count == 4'd0), .vin(b_vout), .code(b_code), .valid(b_valid));

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    int a_off, b_off, a_min, a_max, b_min, b_max, b_lco_points;
    real a_vmin, a_vmax, b_vmin, b_vmax;
    b_lco_points = 0;
    r_load = 25.0;
    for (int i = 0; i < NPTS; i++) begin
      vin = 7.0 + 0.25 * i;
      rst_n = 1'b0;
      repeat (4) @(posedge clk);
      rst_n = 1'b1;
      repeat (1000 * CLKS_PER_US) @(posedge clk);
      a_off = 0; b_off = 0; a_min = 255; a_max = 0; b_min = 255; b_max = 0;
      a_vmin = 100.0; a_vmax = 0.0; b_vmin = 100.0; b_vmax = 0.0;
      repeat (300 * CLKS_PER_US) begin
        @(posedge clk);
        if (a_valid && a_code != vref_code) a_off++;
        if (b_valid && b_code != vref_code) b_off++;
        if (a_upd) begin a_min = (int'(a_duty) < a_min) ? int'(a_duty) : a_min; a_max = (int'(a_duty) > a_max) ? int'(a_duty) : a_max; end
        if (b_upd) begin b_min = (int'(b_duty) < b_min) ? int'(b_duty) : b_min; b_max = (int'(b_duty) > b_max) ? int'(b_duty) : b_max; end
        if (a_vout < a_vmin) a_vmin = a_vout;
        if (a_vout > a_vmax) a_vmax = a_vout;
        if (b_vout < b_vmin) b_vmin = b_vout;
        if (b_vout > b_vmax) b_vmax = b_vout;
      end
      $display("Vin %5.2f V | dyadic: duty %3d..%3d, vout %6.3f..%6.3f V, off-bin %0d | 4-bit: duty %3d..%3d, vout %6.3f..%6.3f V, off-bin %0d",
               vin, a_min, a_max, a_vmin, a_vmax, a_off, b_min, b_max, b_vmin, b_vmax, b_off);
      check(a_off == 0 && a_min == a_max, $sformatf("dyadic loop limit-cycle free at Vin %0.2f", vin));
      if (b_off != 0 || b_min[7:4] != b_max[7:4]) b_lco_points++;
    end
    $display("4-bit loop shows a limit cycle at %0d of %0d input voltages", b_lco_points, NPTS);
    check(b_lco_points > 0, "4-bit-only reference loop limit-cycles somewhere in the range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPTS * 1400 * CLKS_PER_US) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
