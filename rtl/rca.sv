// rca: W-bit ripple-carry adder built from full adders.
//
// Used as the building block of the carry-select adder (csel_adder): each
// 4-bit group there is a ripple-carry adder, as in the adder diagram of the
// design. Purely combinational: sum = a + b + cin, carry out in cout.
module rca #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1]   = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end
  assign cout = c[W];
endmodule
