// tb_pid_compensator: checks the PID compensator at its default coefficients
// (Kp = 55, Ki = 605, Kd = 1295, binary point 12 bits) against a 64-bit integer model
// written here, and against one sample worked by hand: error +8 from reset gives
// I = 8*605 = 4840, u = 8*55 + 4840 + 8*1295 = 15640, duty = floor(15640/4096) = 3.
// Random error runs, biased up and down, drive the output into both clamps; samples
// arrive with random gaps and every result must appear exactly one clock after its
// sample, with the outputs held in between.
`timescale 1ns/1ps
module tb_pid_compensator;

  localparam int EW = 5;
  localparam int DW = 8;
  localparam int FR = 12;
  localparam longint KP = 55, KI = 605, KD = 1295;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 err_valid = 1'b0;
  logic signed [EW-1:0] err = '0;
  logic [DW-1:0]        duty;
  logic                 duty_valid, sat_hi, sat_lo;

  int checks = 0;
  int failures = 0;
  int n_hi = 0, n_lo = 0;

  always #10 clk = ~clk;

  pid_compensator dut (.clk, .rst_n, .err_valid, .err, .duty, .duty_valid, .sat_hi, .sat_lo);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  longint i_ref = 0, e1_ref = 0;

  task automatic sample(input longint e, input int gap);
    longint u, ui, d;
    err       <= EW'(e);
    err_valid <= 1'b1;
    @(posedge clk);
    err_valid <= 1'b0;
    i_ref = i_ref + KI * e;
    if (i_ref < 0) i_ref = 0;
    if (i_ref > (longint'(1) << (DW + FR)) - 1) i_ref = (longint'(1) << (DW + FR)) - 1;
    u  = KP * e + i_ref + KD * (e - e1_ref);
    ui = u >>> FR;
    d  = (ui < 0) ? 0 : (ui > 255) ? 255 : ui;
    e1_ref = e;
    #1;
    check(duty_valid, "result one clock after the sample");
    check(duty == DW'(d), $sformatf("duty %0d, expected %0d (e=%0d)", duty, d, e));
    check(sat_hi == (ui > 255) && sat_lo == (ui < 0), "saturation flags");
    if (sat_hi) n_hi++;
    if (sat_lo) n_lo++;
    for (int g = 0; g < gap; g++) begin
      @(posedge clk);
      #1;
      check(!duty_valid && duty == DW'(d), "output held between samples");
    end
  endtask

  initial begin
    int bias;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(duty == 0 && !duty_valid, "reset state");
    sample(8, 1);
    check(duty == 8'd3, "hand-worked first sample");
    for (int run = 0; run < 40; run++) begin
      bias = (run % 4 == 0) ? 12 : (run % 4 == 1) ? -12 : 0;
      for (int k = 0; k < 300; k++) begin
        int e;
        e = int'($urandom_range(0, 8)) - 4 + bias;
        if (e > 15) e = 15;
        if (e < -16) e = -16;
        sample(longint'(e), int'($urandom_range(0, 2)));
      end
    end
    // extremes of the error range
    sample(-16, 0);
    sample(15, 0);
    check(n_hi > 0 && n_lo > 0, "both clamps exercised");
    $display("clamped high %0d, low %0d", n_hi, n_lo);
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
