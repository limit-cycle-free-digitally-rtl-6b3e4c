// tb_ddpm: checks the 4-bit dyadic pulse modulator. Steps arrive every third clock.
// For every code 0 .. 15 held over a frame, the output in each slot must match the
// dyadic rule worked out here by repeated halving of the slot number (slot p = 2**t * odd
// carries code bit 3-t, slot 0 carries nothing), the frame must hold exactly `code`
// ones, any 8 consecutive slots must hold floor or ceil of code/2 ones, and
// frame_last must mark slot 15 only. Random steps without a code change then check
// the counter does not move without step.
`timescale 1ns/1ps
module tb_ddpm;

  localparam int M = 4;
  localparam int F = 1 << M;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         step = 1'b0;
  logic [M-1:0] code = '0;
  logic         bit_out, frame_last;
  logic [M-1:0] slot;

  int checks = 0;
  int failures = 0;

  always #10 clk = ~clk;

  ddpm #(.M(M)) dut (.clk, .rst_n, .step, .code, .bit_out, .frame_last, .slot);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic bit ref_bit(input int p, input int c);
    int t, q;
    if (p == 0) return 1'b0;
    t = 0; q = p;
    while (q % 2 == 0) begin q = q / 2; t++; end
    return ((c >> (M - 1 - t)) & 1) != 0;
  endfunction

  task automatic one_step();
    step <= 1'b1;
    @(posedge clk);
    step <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    bit seq [2*F];
    int ones, w;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(slot == 0, "slot 0 after reset");
    for (int c = 0; c < F; c++) begin
      code <= M'(c);
      @(posedge clk);
      ones = 0;
      for (int p = 0; p < 2 * F; p++) begin
        #1;
        check(bit_out == ref_bit(p % F, c), $sformatf("code %0d slot %0d", c, p % F));
        check(frame_last == (p % F == F - 1), "frame_last on slot 15 only");
        seq[p] = bit_out;
        if (p < F) ones += int'(bit_out);
        one_step();
      end
      check(ones == c, $sformatf("code %0d: %0d ones per frame", c, ones));
      for (int s = 0; s + F/2 <= 2 * F; s++) begin
        w = 0;
        for (int k = 0; k < F/2; k++) w += int'(seq[s + k]);
        check(w == c / 2 || w == (c + 1) / 2, $sformatf("code %0d: window at %0d holds %0d", c, s, w));
      end
    end
    // no movement without step
    begin
      logic [M-1:0] s0;
      s0 = slot;
      repeat (20) @(posedge clk);
      #1;
      check(slot == s0, "slot holds without step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
