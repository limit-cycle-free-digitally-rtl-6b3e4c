// tb_dpwm: checks the 4-bit counter DPWM. For every duty 0 .. 16, held over several
// periods, the gate must be high for exactly duty clocks of each 16-clock period,
// as one contiguous pulse starting at the period start (one clock after the counter),
// and period_last must pulse once every 16 clocks.
`timescale 1ns/1ps
module tb_dpwm;

  localparam int N = 4;
  localparam int P = 1 << N;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N:0]   duty = '0;
  logic         pwm, period_last;
  logic [N-1:0] count;

  int checks = 0;
  int failures = 0;

  always #10 clk = ~clk;

  dpwm #(.N(N)) dut (.clk, .rst_n, .duty, .pwm, .period_last, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    int on, edges, pl, pl_at;
    bit prev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d <= P; d++) begin
      // wait for the end of a period, then change the duty on that edge
      do @(posedge clk); while (!period_last);
      duty <= (N+1)'(d);
      repeat (3) begin
        on = 0; edges = 0; pl = 0; pl_at = -1; prev = 1'b1;
        for (int k = 0; k < P; k++) begin
          @(posedge clk);
          #1;
          // gate now shows position k of the period
          if (pwm) on++;
          if (pwm && !prev) edges++;
          if (k == 0) check(pwm == (d > 0), "gate starts the period with the on-time");
          prev = pwm;
          if (period_last) begin pl++; pl_at = k; end
        end
        check(on == d, $sformatf("on-time %0d clocks for duty %0d", on, d));
        check(edges == 0, "one contiguous pulse per period");
        check(pl == 1 && pl_at == P - 2, "one period_last per 16 clocks");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
