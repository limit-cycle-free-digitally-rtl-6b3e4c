// ddpwm_pkg: constants shared by the digital controller of the boost converter.
//
// The controller runs from a 50 MHz clock. A switching period lasts 2**N_DPWM = 16
// clocks (3.125 MHz), and the dyadic modulator spreads its M_DDPM = 4 extra bits over
// a frame of 2**M_DDPM = 16 switching periods, giving an 8-bit duty command in all.
// The error is taken from an N_ADC = 4 bit converter. The PID coefficients are the
// binary words of the design specification, read as two's-complement integers; the
// position of their binary point (COEF_FRAC) is this design's own choice.
package ddpwm_pkg;

  localparam int unsigned N_ADC_DEF   = 4;   // ADC resolution, bits
  localparam int unsigned N_DPWM_DEF  = 4;   // counter DPWM resolution, bits (MSBs)
  localparam int unsigned M_DDPM_DEF  = 4;   // dyadic modulator resolution, bits (LSBs)

  // PID coefficients as given: Kp = 0110111, Ki = 01001011101, Kd = 010100001111.
  localparam int unsigned KP_W = 7;
  localparam int unsigned KI_W = 11;
  localparam int unsigned KD_W = 12;
  localparam logic signed [KP_W-1:0] KP_DEF = 7'b0110111;
  localparam logic signed [KI_W-1:0] KI_DEF = 11'b01001011101;
  localparam logic signed [KD_W-1:0] KD_DEF = 12'b010100001111;

  // Fractional bits of all three coefficients (binary point position).
  localparam int unsigned COEF_FRAC_DEF = 12;

endpackage
