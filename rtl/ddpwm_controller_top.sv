// ddpwm_controller_top: limit-cycle-free digital voltage-mode controller for a DC-DC
// boost converter.
//
// The output voltage is sampled once per switching period by an external N_ADC-bit
// ADC. The error e = vref_code - adc_code (in ADC LSBs) feeds a PID compensator that
// produces an 8-bit duty command. The dyadic DPWM turns that command into the gate
// drive: a 4-bit counter DPWM at fclk/16 sets the base on-time and a 4-bit dyadic
// pulse modulator adds one clock of on-time in selected periods, so that the average
// duty over 16 periods has 8-bit resolution. With the duty resolution finer than the
// ADC's, some duty level falls inside the ADC's zero-error bin, the integrator can
// stop there, and the steady state has a constant duty command instead of a limit
// cycle.
//
// Timing: 50 MHz clock, 16 clocks per switching period (3.125 MHz), 256 clocks per
// DDPM frame. adc_sample is high in the first clock of each switching period and asks
// for a conversion; the ADC returns adc_code with a one-clock adc_valid strobe, any
// time before the next request. The PID result is ready one clock after adc_valid and
// is taken by the modulator at the next frame boundary.
//
// The block structure (ADC, PID, DPWM on the MSBs, DDPM on the LSBs) and all sizes
// follow the design specification; the ADC handshake, the sampling instant and the
// frame-wise update of the modulator are this design's choices.
module ddpwm_controller_top #(
  parameter int unsigned N_ADC  = ddpwm_pkg::N_ADC_DEF,
  parameter int unsigned N_DPWM = ddpwm_pkg::N_DPWM_DEF,
  parameter int unsigned M_DDPM = ddpwm_pkg::M_DDPM_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_ADC-1:0]         vref_code,    // output-voltage reference, ADC codes
  input  logic [N_ADC-1:0]         adc_code,     // sampled output voltage
  input  logic                     adc_valid,    // adc_code is new
  output logic                     adc_sample,   // start of switching period: sample now
  output logic                     gate,         // boost MOSFET gate drive
  output logic [N_DPWM+M_DDPM-1:0] duty_cmd,     // PID output
  output logic                     duty_update,  // duty_cmd was recomputed
  output logic [N_DPWM+M_DDPM-1:0] duty_frame,   // command in force in this frame
  output logic                     frame_start,  // first clock of a DDPM frame
  output logic                     extra_clock,  // this period has the DDPM extra clock
  output logic                     sat_hi,       // PID output clamped at full scale
  output logic                     sat_lo        // PID output clamped at zero
);

  localparam int unsigned EW = N_ADC + 1;

  logic signed [EW-1:0] err;

  assign err = signed'({1'b0, vref_code}) - signed'({1'b0, adc_code});

  // ADC handshake: adc_valid is a one-clock strobe.
  a_adc_strobe: assert property (@(posedge clk) disable iff (!rst_n) adc_valid |=> !adc_valid);

  pid_compensator #(
    .EW(EW),
    .DW(N_DPWM + M_DDPM)
  ) u_pid (
    .clk       (clk),
    .rst_n     (rst_n),
    .err_valid (adc_valid),
    .err       (err),
    .duty      (duty_cmd),
    .duty_valid(duty_update),
    .sat_hi    (sat_hi),
    .sat_lo    (sat_lo)
  );

  ddpwm #(
    .N(N_DPWM),
    .M(M_DDPM)
  ) u_ddpwm (
    .clk         (clk),
    .rst_n       (rst_n),
    .duty_cmd    (duty_cmd),
    .pwm         (gate),
    .period_start(adc_sample),
    .frame_start (frame_start),
    .extra_clock (extra_clock),
    .duty_frame  (duty_frame)
  );

endmodule
