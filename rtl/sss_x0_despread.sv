// sss_x0_despread: the SSS X0(m0) stage.
//
// For hypothesis group q (N_ID1 div 112, 0..2) and the sector N_ID2 from the
// PSS stage it forms m0 = 15*q + 5*N_ID2 and strips the x0 factor from one
// segment of TAPS received samples:
//   z(n) = r(n) * [1 - 2 x0((n + m0) mod 127)],   n = TAPS*seg + j
// What remains of a true SSS is the x1 sequence shifted by m1, which the
// matched filters then search. Multiplying by +-1 only flips the sign bit of
// the sign/magnitude sample. Position 127 is padding (the SSS has 127
// samples, the segments cover 128) and yields zero.
// Combinational; m0 is also output.
module sss_x0_despread
  import sss_pkg::*;
#(
  parameter int NTAPS = TAPS
) (
  input  logic [SEQ_LEN-1:0]          x0_seq,
  input  logic [1:0]                  n_id2,
  input  logic [1:0]                  q,
  input  logic [2:0]                  seg,
  input  logic signed [SAMPLE_W-1:0]  r_seg [NTAPS],
  output sm8_t                        z_seg [NTAPS],
  output logic [6:0]                  m0
);
  always_comb begin
    m0 = 7'(15 * q) + 7'(5 * n_id2);
    for (int j = 0; j < NTAPS; j++) begin
      logic [7:0] n;
      sm8_t       r_sm;
      n    = 8'(seg * NTAPS + j);
      r_sm = to_sm(r_seg[j]);
      if (n >= 8'(SEQ_LEN)) begin
        z_seg[j] = '0;
      end else begin
        z_seg[j].mag = r_sm.mag;
        z_seg[j].neg = r_sm.neg ^ x0_seq[mod127(n, {1'b0, m0})];
      end
    end
  end
endmodule
