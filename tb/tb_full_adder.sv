// tb_full_adder: exhaustive self-checking test of the one-bit full adder.
//
// Applies all eight input combinations and compares {co, s} with the
// integer sum a + b + ci. A watchdog ends the run with a failure if the
// stimulus never completes.
module tb_full_adder;
  logic a, b, ci, s, co;
  int   checks = 0;
  int   failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("watchdog: full adder test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp_sum;
      {a, b, ci} = 3'(v);
      #1;
      exp_sum = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} != 2'(exp_sum)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b: got co=%0b s=%0b, expected %0d",
                 a, b, ci, co, s, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
