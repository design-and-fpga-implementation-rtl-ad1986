// kom_combine -- the adder, shifter and zero-extension network of one
// Karatsuba-Ofman (KOM) stage.
//
// Given the four half-width products of an N x N multiplication, with
// a = aH*2^(N/2) + aL and b = bH*2^(N/2) + bL,
//   P = aL*bL + (aH*bL + aL*bH)*2^(N/2) + aH*bH*2^N
// is assembled without any wide adder:
//   1. An N-bit adder (carry in 0) sums the two cross products into mid,
//      with carry c0.
//   2. A barrel shifter moves mid left by N/2. Its low N bits
//      {mid[N/2-1:0], 0...} go to the low adder; the N/2 bits above,
//      mid[N-1:N/2], go to the high adder.
//   3. The low adder (carry in 0) adds aL*bL and gives the low product half
//      P[N-1:0] and carry c1.
//   4. The high operand is {0..., c0, mid[N-1:N/2]}: the middle carry and
//      the shifted-out bits, zero extended to N bits. The high adder adds it
//      to aH*bH with c1 as carry in and gives P[2N-1:N].
// The high adder's own carry out is always 0 (the product fits 2N bits), as
// are the shifter bits above N+N/2; assertions check both. The three N-bit
// adders with their carries c0 and c1, the zero extension and the shifter
// follow the design's stage diagram and its worked 4-bit example; the
// ripple-carry adders and the general shifter are this implementation's
// choices.
//
// Interface: p_hh = aH*bH, p_hl = aH*bL, p_lh = aL*bH, p_ll = aL*bL, each
// [N-1:0], in; p [2N-1:0] out. N must be even and at least 4. Purely
// combinational.
module kom_combine #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   p_hh,
  input  logic [N-1:0]   p_hl,
  input  logic [N-1:0]   p_lh,
  input  logic [N-1:0]   p_ll,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  if (N < 4 || N % 2 != 0) begin : g_bad_n
    $error("kom_combine: N = %0d is not an even number >= 4", N);
  end

  logic [N-1:0]   mid;          // aH*bL + aL*bH, low N bits
  logic           c0;           // carry of the middle adder
  logic [2*N-1:0] mid_shifted;  // mid << N/2
  logic [N-1:0]   hi_operand;   // zero-extended {c0, mid high half}
  logic           c1;           // carry of the low adder
  logic           c2;           // carry of the high adder (always 0)

  full_adder_n #(.W(N)) u_mid_add (
    .a(p_hl), .b(p_lh), .cin(1'b0), .sum(mid), .cout(c0)
  );

  barrel_shifter #(.W(N)) u_shift (
    .din(mid), .shamt($clog2(N)'(H)), .dout(mid_shifted)
  );

  full_adder_n #(.W(N)) u_lo_add (
    .a(p_ll), .b(mid_shifted[N-1:0]), .cin(1'b0), .sum(p[N-1:0]), .cout(c1)
  );

  // Zero extension of the middle carry and the bits shifted above N.
  // mid_shifted[2N-1:N+H] is always zero; only the assertion reads it.
  assign hi_operand = {{(H-1){1'b0}}, c0, mid_shifted[N+H-1:N]};

  full_adder_n #(.W(N)) u_hi_add (
    .a(p_hh), .b(hi_operand), .cin(c1), .sum(p[2*N-1:N]), .cout(c2)
  );

  always_comb begin
    assert final (c2 == 1'b0) else $error("kom_combine: carry out of the high adder");
    assert final (mid_shifted[2*N-1:N+H] == '0)
      else $error("kom_combine: shifter output above bit N+N/2 is not zero");
  end
endmodule
