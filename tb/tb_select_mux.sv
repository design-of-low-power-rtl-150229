// tb_select_mux: self-checking test of the 2:1 multiplexer bank.
//
// Drives random, independent values on d0 and d1 and both select values,
// and compares y with whichever input the select names. Walking-one
// patterns make sure every bit position is steered from both inputs. A
// watchdog ends the run with a failure if the stimulus never completes.
module tb_select_mux;
  localparam int unsigned W = 5;

  logic [W-1:0] d0, d1, y;
  logic         sel;
  int           checks = 0;
  int           failures = 0;

  select_mux dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  task automatic apply(logic [W-1:0] v0, logic [W-1:0] v1, logic s);
    d0  = v0;
    d1  = v1;
    sel = s;
    #1;
    checks++;
    if (y != (s ? v1 : v0)) begin
      failures++;
      $display("FAIL sel=%0b d0=%b d1=%b: got %b", s, v0, v1, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog: select_mux test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      apply(W'(1) << i, '0, 1'b0);
      apply('0, W'(1) << i, 1'b1);
      apply(~(W'(1) << i), '1, 1'b0);
      apply('1, ~(W'(1) << i), 1'b1);
    end
    for (int n = 0; n < 200; n++) begin
      apply(W'($urandom), W'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
