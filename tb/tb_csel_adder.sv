// tb_csel_adder: checks the carry-select adder at 16 bits (the documented
// width) and at 20 bits (the width used in the filter) against plain
// integer addition: corner cases that stress every group carry, then random
// operands, both carry-in values.
module tb_csel_adder;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [19:0] a20, b20, s20;
  logic        ci20, co20;

  csel_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  csel_adder #(.W(20)) dut20 (.a(a20), .b(b20), .cin(ci20), .sum(s20), .cout(co20));

  task automatic check16(logic [15:0] a, logic [15:0] b, logic c);
    logic [16:0] exp;
    a16 = a; b16 = b; ci16 = c;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      $display("FAIL16 %h + %h + %0d = %h, expected %h", a, b, c, {co16, s16}, exp);
    end
  endtask

  task automatic check20(logic [19:0] a, logic [19:0] b, logic c);
    logic [20:0] exp;
    a20 = a; b20 = b; ci20 = c;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 21'(c);
    checks++;
    if ({co20, s20} !== exp) begin
      failures++;
      $display("FAIL20 %h + %h + %0d = %h, expected %h", a, b, c, {co20, s20}, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16(16'hFFFF, 16'h0001, 0);
    check16(16'hFFFF, 16'h0000, 1);
    check16(16'h0FFF, 16'h0001, 0);
    check16(16'h00FF, 16'h0001, 0);
    check16(16'h000F, 16'h0001, 0);
    check16(16'h8000, 16'h8000, 0);
    check16(16'h0000, 16'h0000, 0);
    for (int g = 0; g < 4; g++) begin
      check16(16'hF << (4*g), 16'h1 << (4*g), 0);
      check16(16'hF << (4*g), 16'h0, 1);
    end
    for (int i = 0; i < 4000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    check20(20'hFFFFF, 20'h00001, 0);
    check20(20'h0FFFF, 20'h00001, 0);
    for (int i = 0; i < 4000; i++)
      check20(20'($urandom), 20'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
