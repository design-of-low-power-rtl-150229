// tb_rca: exhaustive self-checking test of the ripple carry adder.
//
// At the default width of four bits every pair of operands is added with
// both carry-in values (512 cases) and {co, s} is compared with the
// integer sum a + b + ci. A watchdog ends the run with a failure if the
// stimulus never completes.
module tb_rca;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, s;
  logic         ci, co;
  int           checks = 0;
  int           failures = 0;

  rca dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog: rca test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        for (int c = 0; c < 2; c++) begin
          int exp_sum;
          a  = W'(x);
          b  = W'(y);
          ci = 1'(c);
          #1;
          exp_sum = x + y + c;
          checks++;
          if ({co, s} != (W+1)'(exp_sum)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: got %0d", x, y, c, {co, s});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
