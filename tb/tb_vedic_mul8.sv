// tb_vedic_mul8: exhaustive check of the 8x8 Vedic multiplier (all 65536
// operand pairs) against integer multiplication.
module tb_vedic_mul8;
  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
