// kom_mult -- N x N bit unsigned Karatsuba-Ofman (KOM) multiplier.
//
// An N-bit KOM multiplier splits each operand into halves and builds its
// product from four N/2 x N/2 KOM products (aH*bH, aH*bL, aL*bH, aL*bL),
// all computed side by side and joined by a kom_combine network of adders,
// a shift by N/2 and a zero extension. Each half-width product is built the
// same way, down to 2 x 2 bit multipliers (mult2x2). For N = 8 that is one
// 8-bit stage over four 4x4 KOM multipliers over sixteen 2x2 multipliers.
//
// The recursion is written out level by level rather than as a module that
// instantiates itself. Level l works on digits of W = 2^l bits; each operand
// has D = N/W such digits, and the level holds every digit product
// prod[i][j] = a_digit(i) * b_digit(j), i, j < D. Level 1 forms them with
// mult2x2 cells; level l > 1 forms prod[i][j] from the four products of
// level l-1 whose digits are the halves of digit i of a and digit j of b:
//   aH*bH = [2i+1][2j+1], aH*bL = [2i+1][2j], aL*bH = [2i][2j+1],
//   aL*bL = [2i][2j].
// The top level has one digit, and prod[0][0] is the product. Level l thus
// holds the (N/2^l)^2 KOM multipliers of width 2^l of the recursive tree.
// The four-product split, the recursion to a directly computed small
// multiplier and its 2x2 size follow the design; the generic N is this
// implementation's generalisation.
//
// Interface: a, b [N-1:0] in; p [2N-1:0] = a*b out. N must be a power of
// two, at least 2. Purely combinational: no clock, no register, the result
// is valid one propagation delay after the operands.
module kom_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned LEVELS = $clog2(N);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("kom_mult: N = %0d is not a power of two >= 2", N);
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned W = 2 ** l;  // digit width at this level
    localparam int unsigned D = N / W;   // digits per operand

    logic [2*W-1:0] prod [D][D];         // prod[i][j] = a digit i * b digit j

    for (genvar i = 0; i < D; i++) begin : g_i
      for (genvar j = 0; j < D; j++) begin : g_j
        if (l == 1) begin : g_leaf
          mult2x2 u_mult (.a(a[W*i +: W]), .b(b[W*j +: W]), .p(prod[i][j]));
        end else begin : g_stage
          kom_combine #(.N(W)) u_comb (
            .p_hh(g_lvl[l-1].prod[2*i+1][2*j+1]),
            .p_hl(g_lvl[l-1].prod[2*i+1][2*j]),
            .p_lh(g_lvl[l-1].prod[2*i][2*j+1]),
            .p_ll(g_lvl[l-1].prod[2*i][2*j]),
            .p   (prod[i][j])
          );
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0][0];
endmodule
