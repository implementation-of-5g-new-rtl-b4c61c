// tb_sss_x0_despread: applies random samples, segments, N_ID2 and q to the
// X0(m0) stage and checks m0 = 15q + 5 N_ID2 and every output sample
// z(n) = r(n) * (1 - 2 x0((n+m0) mod 127)), with z(127) = 0.
module tb_sss_x0_despread;
  import sss_pkg::*;
  import sss_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [126:0]      x0_seq;
  logic [1:0]        n_id2, q;
  logic [2:0]        seg;
  logic signed [7:0] r_seg [16];
  sm8_t              z_seg [16];
  logic [6:0]        m0;

  sss_x0_despread dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [126:0] x0r;
    x0r = ref_mseq(4);
    x0_seq = x0r;
    for (int it = 0; it < 500; it++) begin
      int qi, n2, sg, exp_m0;
      qi = $urandom % 3;
      n2 = $urandom % 3;
      sg = (it < 8) ? it : $urandom % 8;
      q = 2'(qi); n_id2 = 2'(n2); seg = 3'(sg);
      for (int j = 0; j < 16; j++)
        r_seg[j] = ($urandom % 8 == 0) ? -8'sd128 : 8'($urandom);
      #1;
      exp_m0 = ref_m0(qi * 112, n2);
      checks++;
      if (int'(m0) != exp_m0) begin
        failures++;
        $display("FAIL m0=%0d expected %0d", m0, exp_m0);
      end
      for (int j = 0; j < 16; j++) begin
        int n, exp_z, got;
        n = sg * 16 + j;
        exp_z = (n >= 127) ? 0 :
                int'(r_seg[j]) * (1 - 2 * int'(x0r[(n + exp_m0) % 127]));
        got = z_seg[j].neg ? -int'(z_seg[j].mag) : int'(z_seg[j].mag);
        checks++;
        if (got != exp_z) begin
          failures++;
          $display("FAIL n=%0d z=%0d expected %0d", n, got, exp_z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
