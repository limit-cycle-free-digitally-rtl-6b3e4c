// ddpm: dyadic digital pulse modulator (DDPM) of M bits.
//
// One output bit is produced per slot; here a slot is one switching period and a
// frame is 2**M slots. A slot counter p runs 0 .. 2**M-1. In slot p != 0 the output
// is bit (M-1-t) of the code, t being the number of trailing zeros of p; in slot 0
// it is 0. The code MSB therefore owns the 2**(M-1) odd slots, the next bit the
// 2**(M-2) slots that are twice an odd number, and so on down to the LSB, which owns
// slot 2**(M-1) alone. Over one frame the output is high in exactly `code` slots,
// and the ones of each bit are spread evenly, so the error of the running average
// stays small over any window.
//
// Interface: step advances the slot counter (the parent pulses it in the last clock
// of each switching period); bit_out is combinational from the counter and code and
// belongs to the current slot. frame_last is high during the last slot of a frame.
// The parent holds code constant over a frame for an exact average.
//
// The dyadic principle is that of the cited DDPM; the trailing-zero slot
// assignment, the slot being one switching period and the idle slot 0 are this
// design's way of realising it.
module ddpm #(
  parameter int unsigned M = ddpwm_pkg::M_DDPM_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,        // advance to the next slot
  input  logic [M-1:0] code,        // M-bit input word
  output logic         bit_out,     // dyadic pulse for the current slot
  output logic         frame_last,  // current slot is the last of the frame
  output logic [M-1:0] slot         // current slot index
);

  logic [M-1:0] p_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_q <= '0;
    else if (step) p_q <= p_q + 1'b1;
  end

  // Select the code bit by the lowest set bit of the slot counter.
  always_comb begin
    bit_out = 1'b0;
    for (int k = M - 1; k >= 0; k--) begin
      if (p_q[k]) bit_out = code[M-1-k];
    end
  end

  assign frame_last = (p_q == {M{1'b1}});
  assign slot       = p_q;

endmodule
