// full_adder_n -- W-bit ripple-carry adder with carry in and carry out.
//
// This is the "n bit full adder" used three times in every Karatsuba-Ofman
// stage: once to add the two cross products, once to form the low half of
// the product and once, taking the low adder's carry as its carry in, to
// form the high half. Each bit is a full adder cell (sum = a ^ b ^ c,
// carry = majority(a, b, c)) and the carry ripples from bit 0 upwards.
// The ripple-carry structure is this implementation's choice; the design
// only asks for an n-bit adder with carry in and carry out.
//
// Interface: a, b [W-1:0], cin in; sum [W-1:0], cout out, with
// {cout, sum} = a + b + cin. Purely combinational.
module full_adder_n #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[W];
endmodule
