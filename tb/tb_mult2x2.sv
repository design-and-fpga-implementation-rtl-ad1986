// tb_mult2x2 -- exhaustive self-checking test of the 2 x 2 bit multiplier.
// All 16 operand pairs are applied, one per nanosecond, and each product is
// compared with the integer product. The cell is combinational, so the
// result is checked one step after the operands change. A watchdog ends
// the run with a failure if it does not finish in time.
module tb_mult2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  mult2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, expected %0d", i, j, p, i * j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
