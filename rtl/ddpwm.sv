// ddpwm: dyadic digital PWM, an (N+M)-bit pulse-width modulator built from an N-bit
// counter DPWM and an M-bit dyadic pulse modulator (N = M = 4, 8 bits in all).
//
// The duty command is latched once per frame of 2**M switching periods. Its N MSBs
// give the base on-time dH (in clocks) of every period of the frame; its M LSBs drive
// the DDPM, whose output adds one clock to the on-time of selected periods. Each
// period is thus either dH or dH+1 clocks long, and over a frame of 2**(N+M) clocks
// the total on-time equals the 8-bit command exactly: the DPWM resolution seen by
// the control loop is N+M bits while the counter stays N bits at fclk.
//
// Interface: duty_cmd may change at any time; it is sampled on the clock edge that
// ends a frame and governs the whole next frame. period_start is high in the first
// clock of each switching period (for sampling the ADC); frame_start in the first
// clock of each frame. pwm is the gate drive, one clock behind the counter.
//
// The MSB/LSB split and the modulation between two adjacent levels follow the
// design specification; holding the command for a whole frame is this design's
// choice.
module ddpwm #(
  parameter int unsigned N = ddpwm_pkg::N_DPWM_DEF,
  parameter int unsigned M = ddpwm_pkg::M_DDPM_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N+M-1:0] duty_cmd,      // duty command, units of 2**-(N+M)
  output logic           pwm,           // gate drive
  output logic           period_start,  // first clock of a switching period
  output logic           frame_start,   // first clock of a DDPM frame
  output logic           extra_clock,   // current period carries the DDPM extra clock
  output logic [N+M-1:0] duty_frame     // command in force for the current frame
);

  logic [N+M-1:0] duty_q;
  logic           period_last;
  logic           frame_last;
  logic           dither;
  logic [N-1:0]   count;
  logic [M-1:0]   slot;
  logic [N:0]     duty_period;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) duty_q <= '0;
    else if (period_last && frame_last) duty_q <= duty_cmd;
  end

  ddpm #(.M(M)) u_ddpm (
    .clk       (clk),
    .rst_n     (rst_n),
    .step      (period_last),
    .code      (duty_q[M-1:0]),
    .bit_out   (dither),
    .frame_last(frame_last),
    .slot      (slot)
  );

  assign duty_period = {1'b0, duty_q[N+M-1:M]} + (N+1)'(dither);

  dpwm #(.N(N)) u_dpwm (
    .clk        (clk),
    .rst_n      (rst_n),
    .duty       (duty_period),
    .pwm        (pwm),
    .period_last(period_last),
    .count      (count)
  );

  assign period_start = (count == '0);
  assign frame_start  = (count == '0) && (slot == '0);
  assign extra_clock  = dither;
  assign duty_frame   = duty_q;

endmodule
