// boost_power_stage_model: behavioural model of the boost power stage, for simulation
// only. It integrates the switched circuit equations with forward Euler, SUB steps per
// clock: inductor current through the MOSFET (gate high) or the diode (gate low),
// output capacitor with its series resistance, resistive load. The inductor current is
// kept from going negative (the diode blocks), which also covers light-load operation.
// Component values are the converter specification: L = 900 nH (8 mOhm), Co = 3 uF
// (40 mOhm), MOSFET and diode 24 mOhm, load 25 .. 30 Ohm. The diode has no forward
// drop here (none is specified); the input capacitor is left out because the model is
// fed by an ideal source.
module boost_power_stage_model #(
  parameter real TCLK = 20.0e-9,   // clock period, s
  parameter int  SUB  = 4,         // integration steps per clock
  parameter real L    = 900.0e-9,
  parameter real R_L  = 8.0e-3,
  parameter real R_ON = 24.0e-3,
  parameter real R_D  = 24.0e-3,
  parameter real C_O  = 3.0e-6,
  parameter real R_C  = 40.0e-3
) (
  input  logic clk,
  input  logic gate,
  input  real  vin,
  input  real  r_load,
  output real  vout,
  output real  il
);

  real i_l, v_c, v_o, i_d, di;
  real dt;

  initial begin
    dt  = TCLK / SUB;
    i_l = 0.0;
    v_c = 0.0;
  end

  always @(posedge clk) begin
    for (int s = 0; s < SUB; s++) begin
      i_d = gate ? 0.0 : i_l;
      v_o = (v_c + R_C * i_d) * r_load / (r_load + R_C);
      if (gate) di = (vin - i_l * (R_L + R_ON)) / L;
      else      di = (vin - i_l * (R_L + R_D) - v_o) / L;
      i_l = i_l + di * dt;
      if (i_l < 0.0) i_l = 0.0;
      v_c = v_c + (i_d - v_o / r_load) / C_O * dt;
    end
    vout = v_o;
    il   = i_l;
  end

endmodule
