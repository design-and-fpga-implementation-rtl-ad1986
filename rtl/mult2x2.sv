// mult2x2 -- 2 x 2 bit unsigned multiplier, the leaf of the Karatsuba-Ofman
// recursion.
//
// The four product bits are formed from the four AND partial products and
// two half adders:
//   p0 = a0&b0
//   p1 = a1&b0 ^ a0&b1            (carry k = a1&b0 & a0&b1)
//   p2 = a1&b1 ^ k
//   p3 = a1&b1 & k
// An 8 x 8 KOM multiplier contains sixteen of these. Only the role of the
// cell (a 2 x 2 bit multiplier at the bottom of the recursion) is given by
// the design; the gate structure above is this implementation's choice.
//
// Interface: a[1:0], b[1:0] in, p[3:0] = a*b out. Purely combinational, no
// clock and no latency.
module mult2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp01, pp10, pp11;  // partial products pp<i><j> = a[i] & b[j]
  logic k;                       // carry out of bit 1

  always_comb begin
    pp00 = a[0] & b[0];
    pp01 = a[0] & b[1];
    pp10 = a[1] & b[0];
    pp11 = a[1] & b[1];
    k    = pp10 & pp01;
    p[0] = pp00;
    p[1] = pp10 ^ pp01;
    p[2] = pp11 ^ k;
    p[3] = pp11 & k;
  end
endmodule
