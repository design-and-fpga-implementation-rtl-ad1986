// barrel_shifter -- logarithmic left shifter with a double-width output.
//
// In a Karatsuba-Ofman stage the sum of the two cross products has to be
// multiplied by 2^(n/2) before it joins the outer products. The shifter does
// that radix shift: its output is din << shamt with no bit lost, so the
// caller can take the lower W bits (the part that lands in the low product
// half) and the bits above them (the part that goes, zero extended, to the
// high half). It is built as $clog2(W) rows of 2:1 multiplexers; row k
// shifts by 2^k when shamt[k] is set. Inside the multiplier the shift amount
// is the constant n/2, so synthesis folds the multiplexers into wiring; the
// general shift input is kept so the block is a real barrel shifter and can
// be tested on its own.
//
// Interface: din [W-1:0], shamt [$clog2(W)-1:0] in; dout [2W-1:0] out.
// W must be at least 2. Purely combinational.
module barrel_shifter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]         din,
  input  logic [$clog2(W)-1:0] shamt,
  output logic [2*W-1:0]       dout
);
  localparam int unsigned S = $clog2(W);

  logic [2*W-1:0] row [S+1];  // row[k]: din shifted by shamt[k-1:0]

  assign row[0] = {{W{1'b0}}, din};

  for (genvar k = 0; k < S; k++) begin : g_row
    assign row[k+1] = shamt[k] ? (row[k] << (2**k)) : row[k];
  end

  assign dout = row[S];
endmodule
