// tb_sss_matched_filter: loads random 16-sample segments (at every segment
// base 0, 16, .., 112) into one correlation branch and checks that it
// delivers corr(m1) = sum_j z(n0+j) * (1 - 2 x1((n0+j+m1) mod 127)) for
// m1 = 0..111 in order, one per clock, with the first value 31 clocks and
// done 142 clocks after the start pulse.
module tb_sss_matched_filter;
  import sss_pkg::*;
  import sss_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  sm8_t w_seg [16];
  logic [6:0] seg_base, m1_idx;
  logic [126:0] x1_seq;
  logic signed [19:0] corr;
  logic corr_valid, done, busy;

  sss_matched_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [126:0] x1r;
    int z [16];
    x1r = ref_mseq(1);
    x1_seq = x1r;
    seg_base = 0;
    for (int j = 0; j < 16; j++) w_seg[j] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int run = 0; run < 16; run++) begin
      int n0, t, got_m1, first_t, done_t;
      n0 = 16 * (run % 8);
      for (int j = 0; j < 16; j++) begin
        w_seg[j].neg = 1'($urandom);
        w_seg[j].mag = 8'($urandom % 129);
        z[j] = w_seg[j].neg ? -int'(w_seg[j].mag) : int'(w_seg[j].mag);
      end
      seg_base = 7'(n0);
      start = 1;
      @(posedge clk); #1;
      start = 0;
      t = 1;
      got_m1 = 0;
      first_t = -1;
      done_t = -1;
      while (t < 200 && done_t < 0) begin
        if (corr_valid) begin
          int exp_c;
          if (first_t < 0) first_t = t;
          exp_c = 0;
          for (int j = 0; j < 16; j++)
            exp_c += z[j] * (1 - 2 * int'(x1r[(n0 + j + got_m1) % 127]));
          checks++;
          if (int'(m1_idx) != got_m1 || int'(corr) != exp_c) begin
            failures++;
            $display("FAIL run %0d m1 %0d/%0d corr %0d expected %0d",
                     run, m1_idx, got_m1, corr, exp_c);
          end
          got_m1++;
        end
        if (done) done_t = t;
        @(posedge clk); #1;
        t++;
      end
      checks++;
      if (got_m1 != 112 || first_t != 32 || done_t != 143 || busy) begin
        failures++;
        $display("FAIL run %0d: %0d outputs, first at %0d, done at %0d",
                 run, got_m1, first_t, done_t);
      end
      repeat ($urandom % 3) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
