// vedic_mul4: 4x4-bit unsigned Vedic multiplier.
//
// Criss-cross scheme: the operands are split into 2-bit halves; four 2x2
// Vedic multipliers form the products LSB*LSB, the two cross products
// LSB*MSB and MSB*LSB, and MSB*MSB. The cross products and the upper half of
// LSB*LSB are summed by 4-bit carry-select adders, and the final upper
// nibble is MSB*MSB plus the carries. The design gives this cell only as a
// "4X4 Vedic multiplier" box; its inside here mirrors the documented 8x8
// structure one level down (an implementation choice).
// Combinational: p = a * b.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q_ll, q_lh, q_hl, q_hh;
  logic [3:0] s_cross, s_mid, s_hi;
  logic       c_cross, c_mid, c_any, c_hi;

  vedic_mul2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q_ll));
  vedic_mul2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q_lh));
  vedic_mul2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q_hl));
  vedic_mul2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q_hh));

  // Cross products.
  csel_adder #(.W(4)) u_add_cross (
    .a(q_lh), .b(q_hl), .cin(1'b0), .sum(s_cross), .cout(c_cross)
  );
  // Add the upper half of LSB*LSB.
  csel_adder #(.W(4)) u_add_mid (
    .a(s_cross), .b({2'b00, q_ll[3:2]}), .cin(1'b0), .sum(s_mid), .cout(c_mid)
  );
  assign c_any = c_cross | c_mid;
  // Upper nibble: MSB*MSB + carry + upper half of the middle sum.
  csel_adder #(.W(4)) u_add_hi (
    .a(q_hh), .b({1'b0, c_any, s_mid[3:2]}), .cin(1'b0), .sum(s_hi), .cout(c_hi)
  );

  assign p = {s_hi, s_mid[1:0], q_ll[1:0]};

  // c_hi is always 0 since a*b < 2^8; it is left unused on purpose.
  logic unused_c_hi;
  assign unused_c_hi = c_hi;
endmodule
