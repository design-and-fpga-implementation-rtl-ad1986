// kom8x8 -- 8 x 8 bit unsigned Karatsuba-Ofman multiplier, the top level.
//
// finalprod = a1 * b1, computed by one KOM stage (kom_mult, N = 8) that
// forms aH*bH, aH*bL, aL*bH and aL*bL with four 4 x 4 KOM multipliers, each
// built in turn from four 2 x 2 bit multipliers, and joins them with three
// 8-bit adders, a shift by 4 and a zero extension. The port names and
// widths (a1[7:0], b1[7:0], finalprod[15:0]) and the 8-bit size are the
// design's; operands are unsigned.
//
// The multiplier is purely combinational: 32 signal pins, no clock, no
// reset, and finalprod follows the operands after the logic delay.
module kom8x8 (
  input  logic [7:0]  a1,
  input  logic [7:0]  b1,
  output logic [15:0] finalprod
);
  kom_mult #(.N(8)) u_kom (.a(a1), .b(b1), .p(finalprod));
endmodule
