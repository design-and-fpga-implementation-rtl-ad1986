// tb_barrel_shifter -- self-checking test of the logarithmic left shifter.
// The default 8-bit shifter gets every data value with every shift amount;
// a 16-bit copy gets 20000 random cases. Each 2W-bit output is compared with
// the data shifted by the multiplication din * 2^shamt. Combinational: each
// result is read one step after its inputs. A watchdog ends the run.
module tb_barrel_shifter;
  logic [7:0]  din8;
  logic [2:0]  sh8;
  logic [15:0] dout8;
  logic [15:0] din16;
  logic [3:0]  sh16;
  logic [31:0] dout16;
  int checks = 0, failures = 0;

  barrel_shifter dut8 (.din(din8), .shamt(sh8), .dout(dout8));
  barrel_shifter #(.W(16)) dut16 (.din(din16), .shamt(sh16), .dout(dout16));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expect16;
    din16 = '0; sh16 = '0;
    for (int s = 0; s < 8; s++) begin
      for (int d = 0; d < 256; d++) begin
        din8 = 8'(d); sh8 = 3'(s);
        #1;
        checks++;
        if (dout8 !== 16'(d * (1 << s))) begin
          failures++;
          if (failures < 10) $display("FAIL W=8 %0d << %0d = %0d", d, s, dout8);
        end
      end
    end
    for (int n = 0; n < 20000; n++) begin
      din16 = 16'($urandom);
      sh16  = 4'($urandom);
      #1;
      expect16 = longint'(din16) * (longint'(1) << sh16);
      checks++;
      if (dout16 !== 32'(expect16)) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 %0d << %0d = %0d", din16, sh16, dout16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
