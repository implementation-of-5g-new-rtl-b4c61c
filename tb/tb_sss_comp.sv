// tb_sss_comp: streams random (value, index) pairs with gaps into the
// comparator, checks the running maximum and its index after every input
// (first of equal values wins) and that clear starts a new search.
module tb_sss_comp;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [19:0] value, best_value;
  logic [8:0] index, best_index;
  logic updated;

  sss_comp dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mv, mi, have;
    value = 0; index = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      have = 0;
      for (int k = 0; k < 336; k++) begin
        in_valid = ($urandom % 4 != 0);
        // Small range so that ties occur.
        value = 20'(signed'(($urandom % 64) - 40 - run * 100));
        index = 9'(k);
        @(posedge clk); #1;
        if (in_valid && (!have || int'(value) > mv)) begin
          mv = int'(value);
          mi = k;
          have = 1;
        end
        if (have) begin
          checks++;
          if (int'(best_value) != mv || int'(best_index) != mi) begin
            failures++;
            $display("FAIL run %0d k %0d: %0d@%0d expected %0d@%0d",
                     run, k, best_value, best_index, mv, mi);
          end
        end
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
