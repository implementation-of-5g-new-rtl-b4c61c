// sss_detector: 5G NR secondary synchronization signal (SSS) detector.
//
// Given the 127 frequency-domain SSS samples of a received SS block (the
// "pre-SSS" data, one real 8-bit sample per subcarrier after OFDM
// demodulation and equalization) and the sector N_ID2 found by the PSS
// stage, it finds the cell ID group N_ID1 (0..335) whose SSS correlates best
// with the samples, and the cell ID 3*N_ID1 + N_ID2.
//
// How it works. The SSS of group N_ID1 is the product of x0 shifted by
// m0 = 15*q + 5*N_ID2 and x1 shifted by m1, with q = N_ID1 div 112 and
// m1 = N_ID1 mod 112. For each q = 0..2:
//   * the X0(m0) stage (sss_x0_despread) removes the x0 factor, leaving x1
//     shifted by m1 when q is right;
//   * two systolic matched filters (sss_matched_filter, an "even" and an
//     "odd" branch) correlate the result against x1 for all 112 shifts m1 at
//     one shift per clock. The 127 samples (padded to 128) are cut into eight
//     16-sample segments; in pass p = 0..3 the even branch takes segment 2p
//     and the odd branch segment 2p+1, and their outputs are summed into a
//     112-entry accumulator;
//   * on the last pass the complete correlations of the 112 hypotheses
//     N_ID1 = 112*q + m1 go to the comparator (sss_comp), which keeps the
//     maximum.
// The x0 and x1 sequences are produced once after reset by two LFSRs
// (mseq_gen) and kept in coefficient registers.
//
// Interface and timing. ready is high when a new SSS may start. A sample is
// taken on every clock with in_valid high; in_head marks the first of the
// 127 samples (subcarrier 0 of the SSS) and captures n_id2_in. A new head
// while loading restarts the load. After the 127th sample the search takes
// 3 groups x 4 passes x (1 + 2*16 - 1 + 112) clocks
// (1728 clocks). Then
// out_valid rises and holds n_id1, cell_id and the peak correlation until
// the next head is accepted. Heads arriving during the search are ignored
// (ready is low). Synchronous active-low reset; ready rises 128 clocks after
// reset, once the sequence registers are filled.
//
// The split into X0(m0) and X1(m1) stages, the two correlation branches, the
// systolic matched filters and the comparator follow the design's block
// diagram; the segment schedule, accumulator, sample format, handshake and
// the use of the maximum (signed) correlation are this implementation's
// choices.
module sss_detector
  import sss_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic                        in_head,
  input  logic signed [SAMPLE_W-1:0]  in_sample,
  input  logic [1:0]                  n_id2_in,
  output logic                        ready,
  output logic                        out_valid,
  output logic [8:0]                  n_id1,
  output logic [9:0]                  cell_id,
  output logic signed [CORR_W-1:0]    peak
);
  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_LOAD, S_START, S_RUN, S_DONE
  } state_t;

  state_t                     state;
  logic signed [SAMPLE_W-1:0] sbuf [SEQ_LEN];
  logic [6:0]                 wr_idx;
  logic [1:0]                 n_id2_q;
  logic [1:0]                 q;
  logic [1:0]                 pass;
  logic signed [CORR_W-1:0]   acc [N_M1];

  // ---------------------------------------------------------------- sequences
  logic [SEQ_LEN-1:0] x0_seq, x1_seq;
  logic               x0_ready, x1_ready;

  mseq_gen #(.TAP(X0_TAP)) u_x0_gen (
    .clk(clk), .rst_n(rst_n), .seq(x0_seq), .ready(x0_ready)
  );
  mseq_gen #(.TAP(X1_TAP)) u_x1_gen (
    .clk(clk), .rst_n(rst_n), .seq(x1_seq), .ready(x1_ready)
  );

  // ------------------------------------------------------- X0(m0) de-spread
  logic [2:0]                 seg_e, seg_o;
  logic signed [SAMPLE_W-1:0] r_e [TAPS];
  logic signed [SAMPLE_W-1:0] r_o [TAPS];
  sm8_t                       z_e [TAPS];
  sm8_t                       z_o [TAPS];
  logic [6:0]                 m0_e, m0_o;

  assign seg_e = {pass, 1'b0};
  assign seg_o = {pass, 1'b1};

  always_comb begin
    for (int j = 0; j < TAPS; j++) begin
      logic [6:0] ne;
      logic [7:0] no;
      ne = 7'(int'(seg_e) * TAPS + j);
      no = 8'(int'(seg_o) * TAPS + j);
      r_e[j] = sbuf[ne];
      r_o[j] = (no < 8'(SEQ_LEN)) ? sbuf[no[6:0]] : '0;
    end
  end

  sss_x0_despread u_x0_even (
    .x0_seq(x0_seq), .n_id2(n_id2_q), .q(q), .seg(seg_e),
    .r_seg(r_e), .z_seg(z_e), .m0(m0_e)
  );
  sss_x0_despread u_x0_odd (
    .x0_seq(x0_seq), .n_id2(n_id2_q), .q(q), .seg(seg_o),
    .r_seg(r_o), .z_seg(z_o), .m0(m0_o)
  );

  // ------------------------------------------------ X1(m1) matched filters
  logic                     mf_start;
  logic signed [CORR_W-1:0] corr_e, corr_o;
  logic                     cv_e, cv_o, done_e, done_o, busy_e, busy_o;
  logic [6:0]               m1_e, m1_o;

  assign mf_start = (state == S_START);

  sss_matched_filter u_mf_even (
    .clk(clk), .rst_n(rst_n), .start(mf_start), .w_seg(z_e),
    .seg_base(7'(int'(seg_e) * TAPS)), .x1_seq(x1_seq),
    .corr(corr_e), .corr_valid(cv_e), .m1_idx(m1_e), .done(done_e),
    .busy(busy_e)
  );
  sss_matched_filter u_mf_odd (
    .clk(clk), .rst_n(rst_n), .start(mf_start), .w_seg(z_o),
    .seg_base(7'(int'(seg_o) * TAPS)), .x1_seq(x1_seq),
    .corr(corr_o), .corr_valid(cv_o), .m1_idx(m1_o), .done(done_o),
    .busy(busy_o)
  );

  // ------------------------------------------------------------ accumulator
  logic signed [CORR_W-1:0] acc_sum;
  logic                     last_pass;

  assign last_pass = (pass == 2'd3);
  assign acc_sum   = corr_e + corr_o + ((pass == 2'd0) ? '0 : acc[m1_e]);

  always_ff @(posedge clk) begin
    if (state == S_RUN && cv_e && !last_pass) acc[m1_e] <= acc_sum;
  end

  // ------------------------------------------------------------- comparator
  logic [8:0] hyp_idx;
  logic       cmp_updated;

  assign hyp_idx = 9'(int'(q) * N_M1) + 9'(m1_e);

  sss_comp #(.VW(CORR_W), .IW(9)) u_comp (
    .clk(clk), .rst_n(rst_n),
    .clear(state == S_START && q == 2'd0 && pass == 2'd0),
    .in_valid(state == S_RUN && cv_e && last_pass),
    .value(acc_sum), .index(hyp_idx),
    .best_value(peak), .best_index(n_id1), .updated(cmp_updated)
  );

  // ------------------------------------------------------------- controller
  logic head_ok;
  assign ready   = (state == S_IDLE || state == S_LOAD || state == S_DONE);
  assign head_ok = ready && in_valid && in_head;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_INIT;
      wr_idx  <= '0;
      n_id2_q <= '0;
      q       <= '0;
      pass    <= '0;
    end else begin
      unique case (state)
        S_INIT: if (x0_ready && x1_ready) state <= S_IDLE;
        S_IDLE, S_DONE, S_LOAD: begin
          if (head_ok) begin
            sbuf[0] <= in_sample;
            wr_idx  <= 7'd1;
            n_id2_q <= n_id2_in;
            state   <= S_LOAD;
          end else if (state == S_LOAD && in_valid) begin
            sbuf[wr_idx] <= in_sample;
            wr_idx       <= wr_idx + 7'd1;
            if (wr_idx == 7'(SEQ_LEN - 1)) begin
              q     <= '0;
              pass  <= '0;
              state <= S_START;
            end
          end
        end
        S_START: state <= S_RUN;
        S_RUN: begin
          if (done_e) begin
            if (!last_pass) begin
              pass  <= pass + 2'd1;
              state <= S_START;
            end else if (q != 2'(N_Q - 1)) begin
              q     <= q + 2'd1;
              pass  <= '0;
              state <= S_START;
            end else begin
              state <= S_DONE;
            end
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end

  assign out_valid = (state == S_DONE);
  assign cell_id   = 10'(3 * int'(n_id1)) + 10'(n_id2_q);

  // Both branches are started together and run in lockstep.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (cv_e == cv_o && m1_e == m1_o && done_e == done_o)
        else $error("sss_detector: matched filter branches out of step");
      assert (!(state == S_RUN) || busy_e)
        else $error("sss_detector: branch idle during a pass");
    end
  end

  logic unused;
  assign unused = ^{m0_e, m0_o, busy_o, cmp_updated};
endmodule
