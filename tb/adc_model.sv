// adc_model: behavioural model of the output-voltage ADC, for simulation only.
// On a sample request it takes the voltage, rounds it to the nearest multiple of
// VLSB, clips it to the N-bit range and returns the code LATENCY clocks later with a
// one-clock valid strobe. With VLSB = 1 V and N = 4 the 12 V output sits in code 12
// and the zero-error bin spans 11.5 V to 12.5 V.
module adc_model #(
  parameter int  N       = 4,
  parameter real VLSB    = 1.0,
  parameter int  LATENCY = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample,
  input  real          vin,
  output logic [N-1:0] code,
  output logic         valid
);

  int   cnt;
  int   c;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= 0;
      code  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (sample) begin
        c = int'($floor(vin / VLSB + 0.5));
        if (c < 0) c = 0;
        if (c > (1 << N) - 1) c = (1 << N) - 1;
        code <= N'(c);
        cnt  <= LATENCY;
      end else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) valid <= 1'b1;
      end
    end
  end

endmodule
