// sss_ref_pkg: reference model of the 5G NR SSS used by the testbenches.
//
// Builds x0 and x1 directly from their recursions, the SSS of any
// (N_ID1, N_ID2), and the full correlation of a received block with every
// hypothesis. Written independently of the RTL: plain integer arithmetic,
// no shared code with the design.
package sss_ref_pkg;

  // x(j+7) = x(j+tap) xor x(j), x(0..6) = 1,0,0,0,0,0,0; returns x(0..126).
  function automatic bit [126:0] ref_mseq(int tap);
    int x [127+7];
    bit [126:0] r;
    for (int j = 0; j < 7; j++) x[j] = (j == 0) ? 1 : 0;
    for (int j = 0; j < 127; j++) x[j+7] = (x[j+tap] + x[j]) % 2;
    for (int j = 0; j < 127; j++) r[j] = bit'(x[j]);
    return r;
  endfunction

  function automatic int ref_m0(int n1, int n2);
    return 15 * (n1 / 112) + 5 * n2;
  endfunction

  function automatic int ref_m1(int n1);
    return n1 % 112;
  endfunction

  // One SSS chip, +1 or -1.
  function automatic int ref_chip(int n1, int n2, int n);
    bit [126:0] x0, x1;
    x0 = ref_mseq(4);
    x1 = ref_mseq(1);
    return (1 - 2 * int'(x0[(n + ref_m0(n1, n2)) % 127])) *
           (1 - 2 * int'(x1[(n + ref_m1(n1)) % 127]));
  endfunction

  // Correlation of samples r with the SSS of (n1, n2).
  function automatic int ref_corr(int r [127], int n1, int n2);
    bit [126:0] x0, x1;
    int s, m0, m1;
    x0 = ref_mseq(4);
    x1 = ref_mseq(1);
    m0 = ref_m0(n1, n2);
    m1 = ref_m1(n1);
    s  = 0;
    for (int n = 0; n < 127; n++)
      s += r[n] * (1 - 2 * int'(x0[(n + m0) % 127])) *
                  (1 - 2 * int'(x1[(n + m1) % 127]));
    return s;
  endfunction

endpackage
