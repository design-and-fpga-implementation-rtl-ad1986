// tb_kom8x8 -- end-to-end test of the 8 x 8 bit KOM multiplier at its
// default size.
//
// 1. The published operand pairs 73*195, 73*10, 85*10, 85*20, 12*12 and
//    170*17 are applied with their published products, and for those whose
//    partial products were published the four 4 x 4 products (aL*bL, aH*bH,
//    aH*bL, aL*bH) and the 9-bit middle sum {c0, mid} are checked too.
// 2. All 65536 operand pairs are compared with the integer product.
// The top stage's two carries are counted: c0 (the middle sum overflows
// and is carried into the high half through the zero extension) and c1
// (the low half carries into the high adder). Both must happen, in the top
// stage and in the 4 x 4 stage that forms aH*bH, or the run counts a failure. The design is
// combinational: each product is read one step after the operands, i.e.
// with no clock cycle of latency. A watchdog ends the run with a failure.
module tb_kom8x8;
  logic [7:0]  a1, b1;
  logic [15:0] finalprod;
  int checks = 0, failures = 0;
  int n_c0 = 0, n_c1 = 0, n_sub_c0 = 0, n_sub_c1 = 0;

  kom8x8 dut (.a1(a1), .b1(b1), .finalprod(finalprod));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s (a1=%0d b1=%0d): got %0d expected %0d",
                                  what, a1, b1, got, exp);
    end
  endtask

  // One published case: operands, product, and the inner values.
  task automatic published(input int a, input int b, input int prod,
                           input int s1, input int s2, input int s3,
                           input int s4, input int r1, input bit inner);
    a1 = a[7:0]; b1 = b[7:0];
    #1;
    check("finalprod", int'(finalprod), prod);
    if (inner) begin
      check("aL*bL", int'(dut.u_kom.g_lvl[3].g_i[0].g_j[0].g_stage.u_comb.p_ll), s1);
      check("aH*bH", int'(dut.u_kom.g_lvl[3].g_i[0].g_j[0].g_stage.u_comb.p_hh), s2);
      check("aH*bL", int'(dut.u_kom.g_lvl[3].g_i[0].g_j[0].g_stage.u_comb.p_hl), s3);
      check("aL*bH", int'(dut.u_kom.g_lvl[3].g_i[0].g_j[0].g_stage.u_comb.p_lh), s4);
      check("middle sum", int'({dut.u_kom.g_lvl[3].g_i[0].g_j[0].g_stage.u_comb.c0, dut.u_kom.g_lvl[3].g_i[0].g_j[0].g_stage.u_comb.mid}), r1);
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
    published(73, 195, 14235, 0, 0, 0, 0, 0, 1'b0);
    published(73, 10, 730, 'b01011010, 0, 'b00101000, 0, 'b000101000, 1'b1);
    published(85, 10, 850, 'b00110010, 0, 'b00110010, 0, 'b000110010, 1'b1);
    published(85, 20, 1700, 'b00010100, 'b00000101, 'b00010100, 'b00000101,
              'b000011001, 1'b1);
    published(12, 12, 144, 'b10010000, 0, 0, 0, 0, 1'b1);
    published(170, 17, 2890, 'b00001010, 'b00001010, 'b00001010, 'b00001010,
              'b000010100, 1'b1);

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a1 = 8'(i); b1 = 8'(j);
        #1;
        check("finalprod", int'(finalprod), i * j);
        if (dut.u_kom.g_lvl[3].g_i[0].g_j[0].g_stage.u_comb.c0) n_c0++;
        if (dut.u_kom.g_lvl[3].g_i[0].g_j[0].g_stage.u_comb.c1) n_c1++;
        if (dut.u_kom.g_lvl[2].g_i[1].g_j[1].g_stage.u_comb.c0) n_sub_c0++;
        if (dut.u_kom.g_lvl[2].g_i[1].g_j[1].g_stage.u_comb.c1) n_sub_c1++;
      end

    $display("top stage: middle carry c0 %0d times, low-half carry c1 %0d times",
             n_c0, n_c1);
    $display("4x4 stage: middle carry c0 %0d times, low-half carry c1 %0d times",
             n_sub_c0, n_sub_c1);
    checks++;
    if (n_c0 == 0 || n_c1 == 0 || n_sub_c0 == 0 || n_sub_c1 == 0) begin
      failures++;
      $display("FAIL a carry path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
