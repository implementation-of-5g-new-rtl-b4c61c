// tb_sss_detector: end-to-end test of the SSS detector at its default size.
//
// Sends complete SSS blocks and checks the detected N_ID1, the cell ID
// 3*N_ID1 + N_ID2 and the peak correlation against a reference search over
// all 336 hypotheses (sss_ref_pkg), and the search latency (1728 clocks from
// the last sample to out_valid). Cases: N_ID1 = 140 for every N_ID2, the
// boundaries of the three m0 groups, full-scale samples (+-127 and -128),
// and random cells with additive noise. Along the way it exercises, and
// counts, every mechanism of the controller: gaps in in_valid while loading,
// a new head restarting a load, heads ignored during a search, out_valid
// held over idle clocks, all 12 matched-filter passes per search and
// comparator updates. A mechanism that never happens counts as a failure.
module tb_sss_detector;
  import sss_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_head = 0;
  logic signed [7:0] in_sample = 0;
  logic [1:0] n_id2_in = 0;
  logic ready, out_valid;
  logic [8:0] n_id1;
  logic [9:0] cell_id;
  logic signed [19:0] peak;

  sss_detector dut (.*);

  always #5 clk = ~clk;

  int n_gap = 0, n_restart = 0, n_ignored = 0, n_hold = 0;
  int n_pass = 0, n_update = 0;
  int n_noisy = 0, n_noisy_hit = 0;

  always @(posedge clk) begin
    if (dut.mf_start) n_pass++;
    if (dut.cmp_updated) n_update++;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  // Send 127 samples, then wait for the result and check it.
  task automatic run_case(int n1, int n2, int amp, int noise, bit full_scale,
                          bit gaps, bit restart, bit poke);
    int r [127];
    int best, best_n1, c, lat, pass0;
    for (int n = 0; n < 127; n++) begin
      int v;
      v = amp * ref_chip(n1, n2, n);
      if (noise > 0) v += int'($urandom % (2 * noise + 1)) - noise;
      if (full_scale) v = (ref_chip(n1, n2, n) > 0) ? 127 : -128;
      r[n] = clip8(v);
    end
    // Reference search over all 336 hypotheses (first maximum wins).
    best = 0; best_n1 = -1;
    for (int h = 0; h < 336; h++) begin
      c = ref_corr(r, h, n2);
      if (best_n1 < 0 || c > best) begin
        best = c; best_n1 = h;
      end
    end
    while (!ready) @(posedge clk);
    #1;
    // A partial block that a new head must discard.
    if (restart) begin
      in_valid = 1; in_head = 1; n_id2_in = 2'((n2 + 1) % 3);
      for (int n = 0; n < 40; n++) begin
        in_sample = 8'($urandom);
        @(posedge clk); #1;
        in_head = 0;
      end
      n_restart++;
    end
    for (int n = 0; n < 127; n++) begin
      if (gaps && ($urandom % 5 == 0)) begin
        in_valid = 0;
        in_sample = 8'($urandom);
        @(posedge clk); #1;
        n_gap++;
      end
      in_valid = 1;
      in_head = (n == 0);
      n_id2_in = 2'(n2);
      in_sample = 8'(r[n]);
      @(posedge clk); #1;
    end
    in_valid = 0; in_head = 0;
    pass0 = n_pass;
    lat = 1;
    while (!out_valid && lat < 5000) begin
      // Heads sent during a search must be ignored.
      if (poke && lat == 500) begin
        in_valid = 1; in_head = 1; in_sample = 8'sd99; n_id2_in = 2'((n2 + 2) % 3);
        checks++;
        if (ready) begin
          failures++;
          $display("FAIL ready high during search");
        end
        n_ignored++;
      end else begin
        in_valid = 0; in_head = 0;
      end
      @(posedge clk); #1;
      lat++;
    end
    in_valid = 0; in_head = 0;
    lat--;
    checks++;
    if (lat != 1728) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 1728", lat);
    end
    checks++;
    if (n_pass - pass0 != 12) begin
      failures++;
      $display("FAIL %0d passes, expected 12", n_pass - pass0);
    end
    checks++;
    if (int'(n_id1) != best_n1 || int'(cell_id) != 3 * best_n1 + n2 ||
        int'(peak) != best) begin
      failures++;
      $display("FAIL N_ID1 %0d cell %0d peak %0d, expected %0d %0d %0d (sent %0d)",
               n_id1, cell_id, peak, best_n1, 3 * best_n1 + n2, best, n1);
    end
    // With a clean signal the sent cell must be found.
    if (noise == 0) begin
      checks++;
      if (int'(n_id1) != n1) begin
        failures++;
        $display("FAIL sent N_ID1 %0d, detected %0d", n1, n_id1);
      end
    end
    if (noise > 0) begin
      n_noisy++;
      if (int'(n_id1) == n1) n_noisy_hit++;
    end
    // out_valid and the result hold until the next head.
    repeat (5 + $urandom % 20) @(posedge clk);
    #1;
    checks++;
    if (!out_valid || int'(n_id1) != best_n1) begin
      failures++;
      $display("FAIL result not held");
    end else n_hold++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // The example of the design's simulation: N_ID1 = 140 (8Ch).
    for (int n2 = 0; n2 < 3; n2++) run_case(140, n2, 50, 0, 0, 0, 0, 0);
    $display("N_ID1=140: detected %0d (%h), cell ID %0d", n_id1, n_id1, cell_id);
    // Boundaries of the three m0 groups.
    run_case(0, 0, 30, 0, 0, 1, 0, 0);
    run_case(111, 1, 30, 0, 0, 0, 1, 0);
    run_case(112, 2, 30, 0, 0, 1, 0, 1);
    run_case(223, 0, 30, 0, 0, 0, 0, 0);
    run_case(224, 1, 30, 0, 0, 0, 0, 0);
    run_case(335, 2, 30, 0, 1, 0, 0, 0);
    // Random cells with noise.
    for (int k = 0; k < 12; k++)
      run_case($urandom % 336, $urandom % 3, 20 + $urandom % 60, 60,
               0, k % 2, k % 3 == 0, k % 4 == 1);
    checks++;
    if (n_gap == 0 || n_restart == 0 || n_ignored == 0 || n_hold == 0 ||
        n_pass == 0 || n_update == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("noisy blocks: sent cell found in %0d of %0d", n_noisy_hit, n_noisy);
    $display("mechanisms: load gaps %0d, load restarts %0d, heads ignored %0d, results held %0d, filter passes %0d, comparator updates %0d",
             n_gap, n_restart, n_ignored, n_hold, n_pass, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
