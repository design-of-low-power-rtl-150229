// tb_combine1: self-checking test of the combine-1 (increment) circuit.
//
// Two copies are tested. The default four-bit copy gets every sum value
// with both carry values, except a carry of one together with an all-ones
// sum, which no four-bit addition can produce (15 + 15 = 30 = 1_1110).
// A six-bit copy gets every sum value with carry 0, including the two
// worked examples of the first-zero rule: 100111 + 1 = 101000 (first zero
// at bit 3, bits 0..3 inverted) and 111111 + 1 = 1_000000 (no zero, every
// bit inverted and the detector sets the carry). The expected value is
// the integer {c0, s0} + 1. The test counts how often the first zero sat
// at each bit position and how often no zero was found, and fails if any
// of these cases never occurred.
module tb_combine1;
  localparam int unsigned W4 = 4;
  localparam int unsigned W6 = 6;

  logic [W4-1:0] s0_4, s1_4;
  logic          c0_4, c1_4;
  logic [W6-1:0] s0_6, s1_6;
  logic          c0_6, c1_6;

  int checks = 0;
  int failures = 0;
  int first_zero_at [W6+1];  // index W6 (or W4) stands for "no zero"

  combine1 dut4 (.s0(s0_4), .c0(c0_4), .s1(s1_4), .c1(c1_4));
  combine1 #(.WIDTH(W6)) dut6 (.s0(s0_6), .c0(c0_6), .s1(s1_6), .c1(c1_6));

  function automatic int first_zero(int value, int width);
    for (int i = 0; i < width; i++) begin
      if (((value >> i) & 1) == 0) return i;
    end
    return width;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog: combine1 test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (first_zero_at[i]) first_zero_at[i] = 0;
    s0_6 = '0;
    c0_6 = 1'b0;

    // four-bit copy
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < (1 << W4); v++) begin
        int exp_val;
        if (c == 1 && v == (1 << W4) - 1) continue;
        s0_4 = W4'(v);
        c0_4 = 1'(c);
        #1;
        exp_val = (c << W4) + v + 1;
        checks++;
        if ({c1_4, s1_4} != (W4+1)'(exp_val)) begin
          failures++;
          $display("FAIL W=4 c0=%0d s0=%b: got c1=%0b s1=%b, expected %b",
                   c, s0_4, c1_4, s1_4, (W4+1)'(exp_val));
        end
      end
    end

    // six-bit copy, with the worked examples first
    s0_4 = '0;
    c0_4 = 1'b0;
    s0_6 = 6'b100111;
    #1;
    checks++;
    if ({c1_6, s1_6} != 7'b0_101000) begin
      failures++;
      $display("FAIL example 100111 + 1: got %b_%b", c1_6, s1_6);
    end
    s0_6 = 6'b111111;
    #1;
    checks++;
    if ({c1_6, s1_6} != 7'b1_000000) begin
      failures++;
      $display("FAIL example 111111 + 1: got %b_%b", c1_6, s1_6);
    end
    for (int v = 0; v < (1 << W6); v++) begin
      s0_6 = W6'(v);
      #1;
      first_zero_at[first_zero(v, W6)]++;
      checks++;
      if ({c1_6, s1_6} != (W6+1)'(v + 1)) begin
        failures++;
        $display("FAIL W=6 s0=%b: got c1=%0b s1=%b", s0_6, c1_6, s1_6);
      end
    end

    for (int k = 0; k <= W6; k++) begin
      checks++;
      if (first_zero_at[k] == 0) begin
        failures++;
        $display("FAIL first zero at position %0d never exercised", k);
      end else if (k == W6) begin
        $display("no zero detected: %0d times", first_zero_at[k]);
      end else begin
        $display("first zero at bit %0d: %0d times", k, first_zero_at[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
