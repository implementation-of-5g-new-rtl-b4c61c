// vedic_mul8: 8x8-bit unsigned Vedic multiplier.
//
// Follows the documented 8-bit Vedic multiplier: the operands are split into
// 4-bit halves and four 4x4 Vedic multipliers form A[7:4]*B[7:4],
// A[3:0]*B[7:4], A[7:4]*B[3:0] and A[3:0]*B[3:0]. Three 8-bit carry-select
// adders combine them:
//   1. the two cross products (carry C1),
//   2. that sum plus {0000, upper nibble of A[3:0]*B[3:0]} (carry C2),
//   3. A[7:4]*B[7:4] plus {000, C1|C2, upper nibble of sum 2} (carry C3).
// S[3:0] is the lower nibble of A[3:0]*B[3:0], S[7:4] the lower nibble of
// sum 2 and S[15:8] the result of adder 3. C3 is always zero.
// Combinational: p = a * b.
module vedic_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q_hh, q_lh, q_hl, q_ll;
  logic [7:0] s1, s2, s3;
  logic       c1, c2, c, c3;

  vedic_mul4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q_hh));
  vedic_mul4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q_lh));
  vedic_mul4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q_hl));
  vedic_mul4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q_ll));

  csel_adder #(.W(8)) u_add1 (
    .a(q_lh), .b(q_hl), .cin(1'b0), .sum(s1), .cout(c1)
  );
  csel_adder #(.W(8)) u_add2 (
    .a(s1), .b({4'b0000, q_ll[7:4]}), .cin(1'b0), .sum(s2), .cout(c2)
  );
  assign c = c1 | c2;
  csel_adder #(.W(8)) u_add3 (
    .a(q_hh), .b({3'b000, c, s2[7:4]}), .cin(1'b0), .sum(s3), .cout(c3)
  );

  assign p = {s3, s2[3:0], q_ll[3:0]};

  // c3 is always 0 since a*b < 2^16; it is left unused on purpose.
  logic unused_c3;
  assign unused_c3 = c3;
endmodule
