// fft8_pkg: shared types, constants and the butterfly arithmetic of the
// 8-point real-input FFT engines.
//
// All four engines compute the same radix-2 decimation-in-time flow graph
// for N = 8, rearranged so that only two non-trivial multiplications remain,
// both by sin(pi/4). The flow graph is split into two groups of add/subtract
// operations: fft8_pre (everything up to and including the operands of the
// two multiplications) and fft8_post (everything that needs the products).
// A multiplication by j only swaps the real and imaginary parts and negates
// one, so it costs no hardware.
//
// Number format: 16-bit signed two's complement, Q8.8 (8 fraction bits),
// for inputs, intermediates and outputs. Sums wrap at 16 bits; inputs in
// [-8, 8) never overflow. The inputs are real, so the intermediates are each
// either purely real or purely imaginary and are stored as one 16-bit value.
package fft8_pkg;

  localparam int unsigned DW   = 16;  // sample width
  localparam int unsigned FRAC = 8;   // fraction bits (Q8.8)
  localparam int unsigned NPT  = 8;   // transform length

  typedef logic signed [DW-1:0] sample_t;
  typedef sample_t samples_t [NPT];

  // sin(pi/4) and sin(7*pi/4) = -sin(pi/4) in Q8.8: round(0.70711 * 256) = 181
  localparam sample_t SIN45  = 16'sd181;
  localparam sample_t SIN315 = -16'sd181;

  // Angles for the CORDIC multiplier, radians in signed Q2.30.
  // round(pi/4 * 2^30) = 843314857
  localparam logic signed [31:0] ANGLE_P45 = 32'sd843314857;
  localparam logic signed [31:0] ANGLE_M45 = -32'sd843314857;

  // Results of group 1. Real-valued: t1 t2 t3 t5 t7 t8 m0 m1 m2 m3.
  // Imaginary-valued (stored as the imaginary part): m5 m6.
  // mul_a / mul_b are the scalars that get multiplied by sin(pi/4):
  //   m4      =  sin(pi/4) * (t4 - t6)           (real)
  //   Im(m7)  = -sin(pi/4) * (t4 + t6)           (m7 = -j*sin(pi/4)*(t4+t6))
  typedef struct packed {
    sample_t m0, m1, m2, m3;
    sample_t m5_im, m6_im;
    sample_t mul_a, mul_b;
  } group1_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef cplx_t spectrum_t [NPT];

  // Group 1: input sums and differences, up to the multiplier operands.
  function automatic group1_t fft8_pre(input samples_t d);
    group1_t g;
    sample_t t1, t2, t3, t4, t5, t6, t7, t8;
    t1 = d[0] + d[4];
    t2 = d[6] + d[2];
    t3 = d[1] + d[5];
    t4 = d[1] - d[5];
    t5 = d[3] + d[7];
    t6 = d[3] - d[7];
    t7 = t1 + t2;
    t8 = t5 + t3;
    g.m3    = d[0] - d[4];
    g.m6_im = d[6] - d[2];
    g.m5_im = t5 - t3;
    g.m2    = t1 - t2;
    g.m0    = t7 + t8;
    g.m1    = t7 - t8;
    g.mul_a = t4 - t6;
    g.mul_b = t4 + t6;
    return g;
  endfunction

  // Group 2: combine the group-1 results with the two products
  // m4 (real) and m7_im (imaginary part of m7) into the eight bins.
  function automatic spectrum_t fft8_post(input group1_t g, input sample_t m4,
                                          input sample_t m7_im);
    spectrum_t x;
    sample_t s1, s2, s3_im, s4_im;
    s1    = g.m3 + m4;
    s2    = g.m3 - m4;
    s3_im = g.m6_im + m7_im;
    s4_im = g.m6_im - m7_im;
    x[0] = '{re: g.m0, im: '0};
    x[4] = '{re: g.m1, im: '0};
    x[1] = '{re: s1,   im: s3_im};
    x[7] = '{re: s1,   im: -s3_im};
    x[2] = '{re: g.m2, im: g.m5_im};
    x[6] = '{re: g.m2, im: -g.m5_im};
    x[5] = '{re: s2,   im: s4_im};
    x[3] = '{re: s2,   im: -s4_im};
    return x;
  endfunction

endpackage
