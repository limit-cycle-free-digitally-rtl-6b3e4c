// pid_compensator: fixed-point PID compensator of the voltage-mode loop.
//
// For every new error sample e[n] (in ADC LSBs, two's complement) it computes, with
// all coefficients scaled by 2**COEF_FRAC,
//     I[n] = clamp(I[n-1] + Ki*e[n], 0, 2**(DW+COEF_FRAC) - 1)
//     u[n] = Kp*e[n] + I[n] + Kd*(e[n] - e[n-1])
//     duty = clamp(floor(u[n] / 2**COEF_FRAC), 0, 2**DW - 1)
// i.e. a parallel PID whose integrator is held inside the duty range (anti-windup by
// clamping) and whose output is saturated to the DW = 8 bit duty command of the DDPWM.
//
// Interface: err is taken when err_valid is high; duty and duty_valid follow on the
// next clock (latency one clock, one sample per clock at most). sat_hi / sat_lo tell
// that the last output was clamped at full scale / zero. Reset clears the
// integrator, the error history and the duty command.
//
// The PID law, the coefficient words Kp, Ki, Kd and the 8-bit output follow the
// design specification. The binary point of the coefficients, the parallel form,
// the clamping anti-windup, truncation toward minus infinity and the reset values are
// this design's choices.
module pid_compensator #(
  parameter int unsigned EW        = ddpwm_pkg::N_ADC_DEF + 1,   // error width
  parameter int unsigned DW        = ddpwm_pkg::N_DPWM_DEF + ddpwm_pkg::M_DDPM_DEF,
  parameter int unsigned COEF_FRAC = ddpwm_pkg::COEF_FRAC_DEF,
  parameter logic signed [ddpwm_pkg::KP_W-1:0] KP = ddpwm_pkg::KP_DEF,
  parameter logic signed [ddpwm_pkg::KI_W-1:0] KI = ddpwm_pkg::KI_DEF,
  parameter logic signed [ddpwm_pkg::KD_W-1:0] KD = ddpwm_pkg::KD_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 err_valid,
  input  logic signed [EW-1:0] err,
  output logic [DW-1:0]        duty,
  output logic                 duty_valid,
  output logic                 sat_hi,
  output logic                 sat_lo
);

  import ddpwm_pkg::*;

  // Integrator: DW integer bits, COEF_FRAC fraction bits, sign and one guard bit.
  localparam int unsigned IW = DW + COEF_FRAC + 2;
  // Sum: wide enough for the integrator plus both product terms.
  localparam int unsigned SW = IW + KP_W + KD_W + EW + 2;

  localparam logic signed [SW-1:0] I_MAX = SW'((longint'(1) << (DW + COEF_FRAC)) - 1);
  localparam logic signed [SW-1:0] U_MAX = SW'((longint'(1) << DW) - 1);

  logic signed [EW-1:0] e1_q;
  logic signed [IW-1:0] integ_q;

  logic signed [SW-1:0] e_x, de_x, i_sum, i_new, u_sum, u_int;

  always_comb begin
    e_x   = SW'(err);
    de_x  = SW'(err) - SW'(e1_q);
    i_sum = SW'(integ_q) + SW'(KI) * e_x;
    if (i_sum < 0)          i_new = '0;
    else if (i_sum > I_MAX) i_new = I_MAX;
    else                    i_new = i_sum;
    u_sum = SW'(KP) * e_x + i_new + SW'(KD) * de_x;
    u_int = u_sum >>> COEF_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_q       <= '0;
      integ_q    <= '0;
      duty       <= '0;
      duty_valid <= 1'b0;
      sat_hi     <= 1'b0;
      sat_lo     <= 1'b0;
    end else begin
      duty_valid <= err_valid;
      if (err_valid) begin
        e1_q    <= err;
        integ_q <= IW'(i_new);
        sat_hi  <= (u_int > U_MAX);
        sat_lo  <= (u_int < 0);
        if (u_int < 0)          duty <= '0;
        else if (u_int > U_MAX) duty <= DW'(U_MAX);
        else                    duty <= DW'(u_int);
      end
    end
  end

endmodule
