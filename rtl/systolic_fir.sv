// systolic_fir: TAPS-tap systolic FIR filter (default 16 taps).
//
// A chain of TAPS processing elements (systolic_pe). Coefficients stay in the
// PEs; the sample line x (two registers per PE) and the partial-sum line y
// (one register per PE) both run from PE 0 to PE TAPS-1, and the last PE's
// partial sum is the filter output. With w[i] loaded into PE i:
//   y_out(t) = sum_{i=0}^{TAPS-1} w[i] * x_in(t - TAPS - i)
// i.e. an FIR with impulse response w[0..TAPS-1] and a latency of TAPS
// clocks. A new sample is accepted every clock. x_out is the sample line
// leaving the last PE (x_in delayed by 2*TAPS clocks).
//
// load_w writes all TAPS coefficients in parallel; outputs depending only on
// samples that entered after the load use the new coefficients. The 16-PE
// chain follows the documented 16-tap systolic filter; the parallel load is
// this implementation's choice.
module systolic_fir
  import sss_pkg::*;
#(
  parameter int NTAPS = TAPS,
  parameter int YW    = CORR_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load_w,
  input  sm8_t                        w_in [NTAPS],
  input  logic signed [SAMPLE_W-1:0]  x_in,
  output logic signed [YW-1:0]        y_out,
  output logic signed [SAMPLE_W-1:0]  x_out
);
  logic signed [SAMPLE_W-1:0] x_line [NTAPS+1];
  logic signed [YW-1:0]       y_line [NTAPS+1];

  assign x_line[0] = x_in;
  assign y_line[0] = '0;

  for (genvar i = 0; i < NTAPS; i++) begin : g_pe
    systolic_pe #(.YW(YW)) u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .load_w(load_w),
      .w_in  (w_in[i]),
      .x_in  (x_line[i]),
      .y_in  (y_line[i]),
      .x_out (x_line[i+1]),
      .y_out (y_line[i+1])
    );
  end

  assign y_out = y_line[NTAPS];
  assign x_out = x_line[NTAPS];
endmodule
