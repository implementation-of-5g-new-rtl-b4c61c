// tb_systolic_fir: loads random coefficients into the 16-tap systolic FIR,
// streams random samples and checks every output against the direct-form
// sum  y(t) = sum_i w[i] * x(t - 16 - i). Also checks the latency with an
// impulse (first response exactly 16 clocks after it enters) and a reload of
// the coefficients in the middle of the stream.
module tb_systolic_fir;
  import sss_pkg::*;
  localparam int T = 16;
  localparam int N = 600;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, load_w = 0;
  sm8_t w_in [T];
  logic signed [7:0]  x_in, x_out;
  logic signed [19:0] y_out;

  systolic_fir dut (.clk, .rst_n, .load_w, .w_in, .x_in, .y_out, .x_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xh [N];
  int w1 [T], w2 [T];

  task automatic set_w(output int w [T]);
    for (int i = 0; i < T; i++) begin
      w_in[i].neg = 1'($urandom);
      w_in[i].mag = 8'($urandom % 129);
      w[i] = w_in[i].neg ? -int'(w_in[i].mag) : int'(w_in[i].mag);
    end
  endtask

  initial begin
    int reload_t, exp_y, first_resp;
    x_in = 0;
    for (int i = 0; i < T; i++) w_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // Impulse: weights 1..16, one sample 1 at t=0.
    for (int i = 0; i < T; i++) w_in[i] = '{neg: 1'b0, mag: 8'(i + 1)};
    load_w = 1;
    @(posedge clk); #1;
    load_w = 0;
    first_resp = -1;
    for (int t = 0; t < 3 * T; t++) begin
      if (first_resp < 0 && y_out != 0) first_resp = t;
      if (t >= T && t < 2 * T) begin
        checks++;
        if (int'(y_out) != t - T + 1) begin
          failures++;
          $display("FAIL impulse t=%0d y=%0d", t, y_out);
        end
      end
      x_in = (t == 0) ? 8'sd1 : 8'sd0;
      @(posedge clk); #1;
    end
    checks++;
    if (first_resp != T) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", first_resp, T);
    end

    // Random stream with a coefficient reload in the middle.
    set_w(w1);
    load_w = 1;
    @(posedge clk); #1;
    load_w = 0;
    reload_t = N / 2;
    for (int t = 0; t < N; t++) begin
      if (t >= 2 * T) begin
        if (t < reload_t || t >= reload_t + 1 + T) begin
          exp_y = 0;
          for (int i = 0; i < T; i++)
            exp_y += ((t < reload_t) ? w1[i] : w2[i]) * xh[t - T - i];
          checks++;
          if (int'(y_out) != exp_y) begin
            failures++;
            $display("FAIL t=%0d y=%0d expected %0d", t, y_out, exp_y);
          end
        end
      end
      x_in  = ($urandom % 16 == 0) ? -8'sd128 : 8'($urandom);
      xh[t] = int'(x_in);
      if (t == reload_t) begin
        set_w(w2);
        load_w = 1;
      end else begin
        load_w = 0;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
