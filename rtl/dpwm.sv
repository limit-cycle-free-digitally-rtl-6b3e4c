// dpwm: counter-comparator digital pulse-width modulator.
//
// A free-running N-bit counter divides the clock into switching periods of 2**N
// clocks (16 clocks: 50 MHz / 16 = 3.125 MHz). The switch is on while the counter is
// below the duty input, so a duty of d gives d clocks of on-time, 0 <= d <= 2**N;
// the duty input is one bit wider than the counter so that 2**N (always on) can be
// reached when the dyadic modulator adds its extra clock to the top level.
//
// Interface: duty must be stable for a whole period; the parent changes it only on
// the clock edge that ends a period (period_last high). period_last is high in the
// last clock of each period. The pwm output is registered: the waveform for the
// period whose counter runs 0..2**N-1 appears one clock later, glitch free, and
// always starts with the on-time (trailing-edge modulation).
//
// The counter-comparator structure and the 4-bit size follow the design
// specification; trailing-edge modulation and the registered output are this
// design's choices.
module dpwm #(
  parameter int unsigned N = ddpwm_pkg::N_DPWM_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N:0]   duty,         // on-time in clocks, 0 .. 2**N
  output logic         pwm,          // gate drive
  output logic         period_last,  // last clock of a switching period
  output logic [N-1:0] count         // position inside the period
);

  logic [N-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      pwm   <= 1'b0;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      pwm   <= ({1'b0, cnt_q} < duty);
    end
  end

  assign period_last = (cnt_q == {N{1'b1}});

  // The level may not exceed one full period, and changes only at period boundaries.
  a_duty_range: assert property (@(posedge clk) disable iff (!rst_n) duty <= (N+1)'(1 << N));
  a_duty_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  !period_last |=> $stable(duty));
  assign count       = cnt_q;

endmodule
