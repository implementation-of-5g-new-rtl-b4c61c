// csel_adder: W-bit carry-select adder (default 16 bits).
//
// The operands are cut into 4-bit groups. The lowest group is a plain
// ripple-carry adder fed with cin. Every higher group holds two ripple-carry
// adders, one computing its sum for carry-in 0 and one for carry-in 1; the
// carry out of the group below drives multiplexers that pick the right sum
// and carry. The carry therefore passes one multiplexer per group instead of
// rippling through every bit. This follows the 16-bit carry-select adder of
// the design (four groups: S3..S0 ripple, S7..S4, S11..S8, S15..S12 dual);
// making the width a parameter (a multiple of 4) is this implementation's
// choice, so the same adder serves 4-, 8- and 20-bit additions.
// Combinational: sum = a + b + cin (mod 2^W), cout is the carry out.
module csel_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int G = 4;
  localparam int NG = W / G;

  logic [NG:0] c;
  assign c[0] = cin;

  rca #(.W(G)) u_rca0 (
    .a(a[G-1:0]), .b(b[G-1:0]), .cin(c[0]), .sum(sum[G-1:0]), .cout(c[1])
  );

  for (genvar g = 1; g < NG; g++) begin : g_sel
    logic [G-1:0] s0, s1;
    logic         c0, c1;
    rca #(.W(G)) u_rca_c0 (
      .a(a[g*G +: G]), .b(b[g*G +: G]), .cin(1'b0), .sum(s0), .cout(c0)
    );
    rca #(.W(G)) u_rca_c1 (
      .a(a[g*G +: G]), .b(b[g*G +: G]), .cin(1'b1), .sum(s1), .cout(c1)
    );
    assign sum[g*G +: G] = c[g] ? s1 : s0;
    assign c[g+1]        = c[g] ? c1 : c0;
  end

  assign cout = c[NG];

  initial begin
    assert (W % G == 0 && W >= G)
      else $error("csel_adder: W must be a positive multiple of 4");
  end
endmodule
