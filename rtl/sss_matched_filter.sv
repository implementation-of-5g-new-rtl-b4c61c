// sss_matched_filter: one SSS cross-correlation branch (systolic matched
// filter plus its reference-coefficient stream).
//
// The branch correlates one segment of NTAPS de-spread samples z(n0..n0+15)
// (n0 = NTAPS*seg) against the x1 sequence for every shift m1 = 0..111:
//   corr(m1) = sum_{j=0}^{NTAPS-1} z(n0+j) * [1 - 2 x1((n0 + j + m1) mod 127)]
// To do so the segment is loaded, reversed, as the coefficients of a
// systolic FIR (the received data are the matched-filter template) and the
// +-1 reference s1(n0 + tau), tau = 0..126, is streamed through it, one
// value per clock. Because the FIR output is sum_i w[i] * x(t - NTAPS - i),
// the output at clock t = 2*NTAPS - 1 + m1 after the load is corr(m1): the
// filter delivers one new shift per clock, 112 shifts in 112 clocks.
//
// Interface: a one-clock start pulse loads w_seg and seg_base (n0) and
// begins a pass. During the pass corr_valid marks the 112 clocks on which
// corr holds corr(m1) for m1 = m1_idx (0, 1, .., 111 in order); done pulses
// on the last of them. A pass takes 2*NTAPS - 1 + 112 clocks after start.
// The reference is read from the x1 coefficient register (mseq_gen).
// Streaming the reference through data-loaded coefficients is this
// implementation's way of using the documented 16-tap systolic filter for a
// 127-sample SSS.
module sss_matched_filter
  import sss_pkg::*;
#(
  parameter int NTAPS = TAPS,
  parameter int YW    = CORR_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  sm8_t                  w_seg [NTAPS],
  input  logic [6:0]            seg_base,
  input  logic [SEQ_LEN-1:0]    x1_seq,
  output logic signed [YW-1:0]  corr,
  output logic                  corr_valid,
  output logic [6:0]            m1_idx,
  output logic                  done,
  output logic                  busy
);
  localparam int LAT  = 2 * NTAPS - 1;     // clock of corr(0) after start
  localparam int LAST = LAT + N_M1 - 1;    // clock of corr(111)

  sm8_t                       w_rev [NTAPS];
  logic [7:0]                 t;
  logic [6:0]                 n0;
  logic signed [SAMPLE_W-1:0] x_ref;
  logic signed [SAMPLE_W-1:0] x_unused;

  for (genvar i = 0; i < NTAPS; i++) begin : g_rev
    assign w_rev[i] = w_seg[NTAPS-1-i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      t    <= '0;
      n0   <= '0;
    end else if (start) begin
      busy <= 1'b1;
      t    <= '0;
      n0   <= seg_base;
    end else if (busy) begin
      t <= t + 8'd1;
      if (t == 8'(LAST)) busy <= 1'b0;
    end
  end

  always_comb begin
    x_ref = '0;
    if (busy && t < 8'(SEQ_LEN))
      x_ref = x1_seq[mod127({1'b0, n0}, t)] ? -SAMPLE_W'(1) : SAMPLE_W'(1);
  end

  systolic_fir #(.NTAPS(NTAPS), .YW(YW)) u_fir (
    .clk   (clk),
    .rst_n (rst_n),
    .load_w(start),
    .w_in  (w_rev),
    .x_in  (x_ref),
    .y_out (corr),
    .x_out (x_unused)
  );

  assign corr_valid = busy && t >= 8'(LAT);
  assign m1_idx     = 7'(t - 8'(LAT));
  assign done       = busy && t == 8'(LAST);

  logic unused_x;
  assign unused_x = ^x_unused;
endmodule
