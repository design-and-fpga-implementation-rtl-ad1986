// tb_kom_mult -- self-checking test of the Karatsuba-Ofman multiplier tree.
//
// Instances at N = 2 and 4 (exhaustive), the default N = 8 (exhaustive,
// 65536 pairs), N = 16 and N = 32 (random pairs plus the extreme values)
// are compared with the integer product. The multiplier is combinational,
// so each product is read one step after the operands. A watchdog ends the
// run with a failure.
module tb_kom_mult;
  logic [1:0]  a2, b2;   logic [3:0]  p2;
  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;
  logic [31:0] a32, b32; logic [63:0] p32;
  int checks = 0, failures = 0;

  kom_mult #(.N(2))  dut2  (.a(a2),  .b(b2),  .p(p2));
  kom_mult #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  kom_mult           dut8  (.a(a8),  .b(b8),  .p(p8));
  kom_mult #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  kom_mult #(.N(32)) dut32 (.a(a32), .b(b32), .p(p32));

  task automatic check(input string what, input longint unsigned got,
                       input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wide(input logic [15:0] x16, input logic [15:0] y16,
                      input logic [31:0] x32, input logic [31:0] y32);
    a16 = x16; b16 = y16; a32 = x32; b32 = y32;
    #1;
    check("N=16", 64'(p16), longint'(x16) * longint'(y16));
    check("N=32", 64'(p32), longint'(x32) * longint'(y32));
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a2 = '0; b2 = '0; a4 = '0; b4 = '0; a8 = '0; b8 = '0;
    a16 = '0; b16 = '0; a32 = '0; b32 = '0;

    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a2 = 2'(i); b2 = 2'(j); #1;
        check("N=2", 64'(p2), 64'(i * j));
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        check("N=4", 64'(p4), 64'(i * j));
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        check("N=8", 64'(p8), 64'(i * j));
      end

    wide('1, '1, '1, '1);
    wide('1, 16'd1, '1, 32'd1);
    wide(16'h8000, 16'h8000, 32'h8000_0000, 32'h8000_0000);
    for (int n = 0; n < 20000; n++)
      wide(16'($urandom), 16'($urandom), $urandom, $urandom);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
