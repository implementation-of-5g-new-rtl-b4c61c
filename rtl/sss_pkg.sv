// sss_pkg: constants and types shared by the 5G NR secondary synchronization
// (SSS) detector.
//
// The SSS of 5G NR is a length-127 BPSK sequence built from two m-sequences,
// x0 and x1, cyclically shifted by m0 and m1 (3GPP TS 38.211 7.4.2.3):
//   d(n) = [1 - 2 x0((n+m0) mod 127)] [1 - 2 x1((n+m1) mod 127)]
//   m0   = 15 * floor(N_ID1 / 112) + 5 * N_ID2,   m1 = N_ID1 mod 112
// N_ID1 (0..335) is the cell ID group, N_ID2 (0..2) the sector found by the
// PSS stage, and the cell ID is 3*N_ID1 + N_ID2.
//
// Samples are 8-bit two's complement. Inside the correlator a sample is kept
// in sign/magnitude form (sm8_t) because the multipliers are unsigned Vedic
// multipliers; the magnitude of -128 (128) still fits in 8 bits.
package sss_pkg;

  localparam int SEQ_LEN   = 127;  // SSS length in subcarriers
  localparam int N_M1      = 112;  // number of m1 shifts
  localparam int N_Q       = 3;    // number of m0 groups (336 / 112)
  localparam int SAMPLE_W  = 8;    // width of one received sample
  localparam int TAPS      = 16;   // taps of the systolic matched filter
  localparam int CORR_W    = 20;   // width of correlation sums

  // Tap positions of the two m-sequence recursions:
  //   x0(j+7) = x0(j+4) xor x0(j),  x1(j+7) = x1(j+1) xor x1(j)
  localparam int X0_TAP = 4;
  localparam int X1_TAP = 1;

  typedef struct packed {
    logic       neg;  // 1: value is negative
    logic [7:0] mag;  // magnitude, 0..128
  } sm8_t;

  // Two's complement sample to sign/magnitude.
  function automatic sm8_t to_sm(input logic signed [SAMPLE_W-1:0] s);
    sm8_t r;
    r.neg = s[SAMPLE_W-1];
    r.mag = s[SAMPLE_W-1] ? 8'(-s) : 8'(s);
    return r;
  endfunction

  // (a + b) mod 127 for a, b in 0..127.
  function automatic logic [6:0] mod127(input logic [7:0] a, input logic [7:0] b);
    logic [8:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= 9'd254) s = s - 9'd254;
    else if (s >= 9'd127) s = s - 9'd127;
    return s[6:0];
  endfunction

endpackage
