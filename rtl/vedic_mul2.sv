// vedic_mul2: 2x2-bit unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// The vertical products a0*b0 and a1*b1 and the cross products a1*b0, a0*b1
// are combined with two half adders. Leaf cell of vedic_mul4; combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic cross_c;
  assign p[0]    = a[0] & b[0];
  assign p[1]    = (a[1] & b[0]) ^ (a[0] & b[1]);
  assign cross_c = (a[1] & b[0]) & (a[0] & b[1]);
  assign p[2]    = (a[1] & b[1]) ^ cross_c;
  assign p[3]    = (a[1] & b[1]) & cross_c;
endmodule
