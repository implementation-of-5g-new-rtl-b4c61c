// systolic_pe: one processing element of the systolic FIR filter.
//
// Each PE holds one filter coefficient w (stationary, loaded with load_w),
// multiplies the sample arriving on the x line by it and adds the product to
// the partial sum arriving on the y line, as in the documented PE (Vedic
// multiplier, carry-select adder and flip-flops). The x line passes through
// two registers per PE and the y line through one, so samples move at half
// the speed of the partial sums; a chain of T PEs then computes
//   y_out(t) = sum_{i=0}^{T-1} w_i * x(t - T - i)
// with PE i holding w_i (see systolic_fir).
//
// Signed arithmetic: the coefficient is kept in sign/magnitude form and the
// sample is converted to it, the 8x8 Vedic multiplier forms the magnitude
// product, and the product is negated when exactly one operand is negative.
// The accumulation runs through a YW-bit carry-select adder (YW = 20 by
// default so that 16 products of 8-bit operands cannot overflow; the width is
// this implementation's choice).
//
// Timing: x_out is x_in delayed by 2 clocks, y_out = y_in + w*x_in delayed by
// 1 clock. Synchronous active-low reset clears all registers.
module systolic_pe
  import sss_pkg::*;
#(
  parameter int YW = CORR_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load_w,
  input  sm8_t                        w_in,
  input  logic signed [SAMPLE_W-1:0]  x_in,
  input  logic signed [YW-1:0]        y_in,
  output logic signed [SAMPLE_W-1:0]  x_out,
  output logic signed [YW-1:0]        y_out
);
  sm8_t                       w_q;
  logic signed [SAMPLE_W-1:0] x_d1, x_d2;
  sm8_t                       x_sm;
  logic [15:0]                mag_prod;
  logic signed [YW-1:0]       prod;
  logic [YW-1:0]              sum;
  logic                       sum_c;

  assign x_sm = to_sm(x_in);

  vedic_mul8 u_mul (.a(w_q.mag), .b(x_sm.mag), .p(mag_prod));

  always_comb begin
    prod = YW'(signed'({1'b0, mag_prod}));
    if (w_q.neg ^ x_sm.neg) prod = -prod;
  end

  csel_adder #(.W(YW)) u_add (
    .a(y_in), .b(prod), .cin(1'b0), .sum(sum), .cout(sum_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_q   <= '0;
      x_d1  <= '0;
      x_d2  <= '0;
      y_out <= '0;
    end else begin
      if (load_w) w_q <= w_in;
      x_d1  <= x_in;
      x_d2  <= x_d1;
      y_out <= signed'(sum);
    end
  end

  assign x_out = x_d2;

  // The carry out of a two's complement addition carries no information.
  logic unused_sum_c;
  assign unused_sum_c = sum_c;
endmodule
