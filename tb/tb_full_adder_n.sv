// tb_full_adder_n -- self-checking test of the W-bit ripple-carry adder.
// The default 8-bit adder is run through every a, b and carry-in value
// (2^17 cases); a 3-bit copy is also run exhaustively so that a fault
// confined to narrow widths shows. {cout, sum} is compared with the integer
// sum a + b + cin. The adder is combinational: each result is read one step
// after its operands. A watchdog ends the run with a failure.
module tb_full_adder_n;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  logic [2:0] a3, b3, sum3;
  logic       cin3, cout3;
  int checks = 0, failures = 0;

  full_adder_n dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  full_adder_n #(.W(3)) dut3 (.a(a3), .b(b3), .cin(cin3), .sum(sum3), .cout(cout3));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); cin = c[0];
          a3 = 3'(i); b3 = 3'(j); cin3 = c[0];
          #1;
          checks++;
          if ({cout, sum} !== 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 %0d + %0d + %0d = %0d", i, j, c, {cout, sum});
          end
          if (i < 8 && j < 8) begin
            checks++;
            if ({cout3, sum3} !== 4'(i + j + c)) begin
              failures++;
              if (failures < 10) $display("FAIL W=3 %0d + %0d + %0d = %0d", i, j, c, {cout3, sum3});
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
