// tb_csa_combine1: end-to-end test of the carry-select adder block.
//
// The block is used exactly as built, with no parameter changed, and every
// pair of four-bit operands is added with both carry-in values (512
// cases). {cout, sum} is compared with the integer a + b + cin. Beside the
// result, the test counts how often each mechanism of the block was
// exercised, working each one out from the operands alone: the
// multiplexers passing the carry-in 0 result and the carry-in 1 result,
// the carry-in 1 result being formed with its first zero at each bit
// position, the all-ones case where the zero detector supplies the carry,
// and the adder's own carry leaving through the carry-in 1 path. A
// mechanism that never occurred counts as a failure. A watchdog ends the
// run with a failure if the stimulus never completes.
module tb_csa_combine1;
  localparam int unsigned W = csa_pkg::CSA_WIDTH;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;

  int checks = 0;
  int failures = 0;
  int n_sel0 = 0;          // carry-in 0 result selected
  int n_sel1 = 0;          // carry-in 1 result selected
  int n_first_zero [W];    // carry-in 1 result with first zero at bit k
  int n_no_zero = 0;       // all-ones sum, carry from the zero detector
  int n_adder_carry = 0;   // carry-in 1 selected and the adder carried

  csa_combine1 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog: carry-select adder test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_mechanisms(int x, int y, int c);
    int s0;
    int k;
    s0 = (x + y) % (1 << W);
    if (c == 0) begin
      n_sel0++;
      return;
    end
    n_sel1++;
    if (x + y >= (1 << W)) n_adder_carry++;
    k = W;
    for (int i = W - 1; i >= 0; i--) begin
      if (((s0 >> i) & 1) == 0) k = i;
    end
    if (k == W) n_no_zero++;
    else n_first_zero[k]++;
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%s: %0d", what, n);
    end
  endtask

  initial begin
    foreach (n_first_zero[i]) n_first_zero[i] = 0;
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        for (int c = 0; c < 2; c++) begin
          int exp_val;
          a   = W'(x);
          b   = W'(y);
          cin = 1'(c);
          #1;
          exp_val = x + y + c;
          checks++;
          if ({cout, sum} != (W+1)'(exp_val)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: got cout=%0b sum=%0d",
                     x, y, c, cout, sum);
          end
          count_mechanisms(x, y, c);
        end
      end
    end

    expect_seen("carry-in 0 result selected", n_sel0);
    expect_seen("carry-in 1 result selected", n_sel1);
    for (int k = 0; k < W; k++) begin
      expect_seen($sformatf("combine-1 with first zero at bit %0d", k),
                  n_first_zero[k]);
    end
    expect_seen("combine-1 with no zero (detector carry)", n_no_zero);
    expect_seen("adder carry through carry-in 1 path", n_adder_carry);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
