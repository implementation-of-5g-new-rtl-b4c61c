// tb_systolic_pe: drives one processing element with random coefficients
// (sign/magnitude, magnitude 0..128), samples and incoming partial sums,
// and checks each clock that y_out = y_in + w*x_in of the previous clock
// (20-bit wrap-around) and that x_out is x_in delayed by two clocks.
module tb_systolic_pe;
  import sss_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, load_w = 0;
  sm8_t w_in;
  logic signed [7:0]  x_in, x_out;
  logic signed [19:0] y_in, y_out;

  systolic_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w_model;
    int x_h [3];
    int exp_y;
    w_in = '0; x_in = 0; y_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    w_model = 0;
    x_h = '{0, 0, 0};
    exp_y = 0;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk); #1;
      // Outputs of the previous clock's inputs.
      if (t > 0) begin
        checks++;
        if (y_out !== 20'(exp_y)) begin
          failures++;
          $display("FAIL t=%0d y_out=%0d expected %0d", t, y_out, 20'(exp_y));
        end
        checks++;
        if (int'(x_out) != x_h[1]) begin
          failures++;
          $display("FAIL t=%0d x_out=%0d expected %0d", t, x_out, x_h[1]);
        end
      end
      if (load_w) w_model = w_in.neg ? -int'(w_in.mag) : int'(w_in.mag);
      // New inputs for this clock.
      load_w   = ($urandom % 8 == 0);
      w_in.neg = 1'($urandom);
      w_in.mag = ($urandom % 4 == 0) ? 8'd128 : 8'($urandom % 129);
      x_in     = ($urandom % 10 == 0) ? -8'sd128 : 8'($urandom);
      y_in     = 20'($urandom);
      x_h[1]   = x_h[0];
      x_h[0]   = int'(x_in);
      exp_y    = int'(y_in) + w_model * int'(x_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
