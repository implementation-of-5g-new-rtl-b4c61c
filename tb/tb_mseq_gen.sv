// tb_mseq_gen: builds the x0 (tap 4) and x1 (tap 1) generators, checks that
// ready rises exactly 127 clocks after reset and that the stored sequences
// equal the reference recursions. Also checks they are maximal-length
// (64 ones per period) and that the register holds still afterwards.
module tb_mseq_gen;
  import sss_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [126:0] seq0, seq1;
  logic rdy0, rdy1;

  mseq_gen #(.TAP(4)) dut0 (.clk, .rst_n, .seq(seq0), .ready(rdy0));
  mseq_gen #(.TAP(1)) dut1 (.clk, .rst_n, .seq(seq1), .ready(rdy1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cycles = 0;
    while (!rdy0) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles != 127 || !rdy1) begin
      failures++;
      $display("FAIL ready after %0d clocks", cycles);
    end
    checks++;
    if (seq0 !== ref_mseq(4)) begin
      failures++;
      $display("FAIL x0 %h expected %h", seq0, ref_mseq(4));
    end
    checks++;
    if (seq1 !== ref_mseq(1)) begin
      failures++;
      $display("FAIL x1 %h expected %h", seq1, ref_mseq(1));
    end
    checks++;
    if ($countones(seq0) != 64 || $countones(seq1) != 64) begin
      failures++;
      $display("FAIL weight %0d %0d", $countones(seq0), $countones(seq1));
    end
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (seq0 !== ref_mseq(4) || seq1 !== ref_mseq(1) || !rdy0 || !rdy1) begin
      failures++;
      $display("FAIL register changed after ready");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
