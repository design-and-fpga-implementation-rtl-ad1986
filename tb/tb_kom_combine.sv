// tb_kom_combine -- self-checking test of one KOM stage's adder, shifter
// and zero-extension network.
//
// The stage is fed the four half-width products of real operand pairs and
// its output is compared with the integer product: every pair for N = 4 and
// the default N = 8, and 20000 random pairs for N = 16. The worked 4-bit
// example a = 0011, b = 1001 is followed through the stage: the middle sum
// must be 0110 with no carry, the low half 1011, the zero-extended high
// operand 0001 and the product 00011011. Each path is also counted: the
// middle carry c0 and the low-half carry c1 must each occur at N = 8. The
// network is combinational; each result is read one step after its inputs.
// A watchdog ends the run with a failure.
module tb_kom_combine;
  logic [3:0]  hh4, hl4, lh4, ll4;      logic [7:0]  p4;
  logic [7:0]  hh8, hl8, lh8, ll8;      logic [15:0] p8;
  logic [15:0] hh16, hl16, lh16, ll16;  logic [31:0] p16;
  int checks = 0, failures = 0;
  int n_c0 = 0, n_c1 = 0;

  kom_combine #(.N(4))  dut4  (.p_hh(hh4),  .p_hl(hl4),  .p_lh(lh4),  .p_ll(ll4),  .p(p4));
  kom_combine           dut8  (.p_hh(hh8),  .p_hl(hl8),  .p_lh(lh8),  .p_ll(ll8),  .p(p8));
  kom_combine #(.N(16)) dut16 (.p_hh(hh16), .p_hl(hl16), .p_lh(lh16), .p_ll(ll16), .p(p16));

  task automatic check(input string what, input longint unsigned got,
                       input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hh8 = '0; hl8 = '0; lh8 = '0; ll8 = '0;
    hh16 = '0; hl16 = '0; lh16 = '0; ll16 = '0;

    // Worked example: aH = 00, aL = 11, bH = 10, bL = 01.
    hh4 = 4'b0000; hl4 = 4'b0000; lh4 = 4'b0110; ll4 = 4'b0011;
    #1;
    check("example mid", 64'(dut4.mid), 64'(4'b0110));
    check("example c0", 64'(dut4.c0), 64'(0));
    check("example low half", 64'(p4[3:0]), 64'(4'b1011));
    check("example high operand", 64'(dut4.hi_operand), 64'(4'b0001));
    check("example product", 64'(p4), 64'(8'b0001_1011));

    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        hh4 = 4'((a / 4) * (b / 4)); hl4 = 4'((a / 4) * (b % 4));
        lh4 = 4'((a % 4) * (b / 4)); ll4 = 4'((a % 4) * (b % 4));
        #1;
        check("N=4", 64'(p4), 64'(a * b));
      end

    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        hh8 = 8'((a / 16) * (b / 16)); hl8 = 8'((a / 16) * (b % 16));
        lh8 = 8'((a % 16) * (b / 16)); ll8 = 8'((a % 16) * (b % 16));
        #1;
        check("N=8", 64'(p8), 64'(a * b));
        if (dut8.c0) n_c0++;
        if (dut8.c1) n_c1++;
      end

    for (int n = 0; n < 20000; n++) begin
      longint unsigned a, b;
      a = longint'($urandom) & 64'hffff;
      b = longint'($urandom) & 64'hffff;
      hh16 = 16'((a >> 8) * (b >> 8));   hl16 = 16'((a >> 8) * (b & 255));
      lh16 = 16'((a & 255) * (b >> 8));  ll16 = 16'((a & 255) * (b & 255));
      #1;
      check("N=16", 64'(p16), a * b);
    end

    $display("N=8: middle carry c0 %0d times, low-half carry c1 %0d times", n_c0, n_c1);
    checks++;
    if (n_c0 == 0 || n_c1 == 0) begin
      failures++;
      $display("FAIL a carry path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
