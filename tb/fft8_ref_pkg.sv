// fft8_ref_pkg: reference values for the FFT testbenches.
//
// dft_re / dft_im compute the 8-point DFT X[k] = sum x[n] exp(-j*2*pi*k*n/8)
// of Q8.8 samples in double precision, directly from the definition, so
// they share no arithmetic with the hardware. FIG_* hold a worked example:
// the spectrum of the ramp x[n] = n (n = 0..7), whose printed Q8.8 values
// the engines with the 181/256 constant must reproduce bit for bit.
package fft8_ref_pkg;
  import fft8_pkg::*;

  localparam real PI = 3.14159265358979323846;

  function automatic real q2r(input sample_t v);
    return real'(v) / 256.0;
  endfunction

  function automatic real dft_re(input samples_t x, input int k);
    real acc = 0.0;
    for (int n = 0; n < NPT; n++) acc += q2r(x[n]) * $cos(2.0 * PI * k * n / 8.0);
    return acc;
  endfunction

  function automatic real dft_im(input samples_t x, input int k);
    real acc = 0.0;
    for (int n = 0; n < NPT; n++) acc -= q2r(x[n]) * $sin(2.0 * PI * k * n / 8.0);
    return acc;
  endfunction

  // Ramp 0..7 and its spectrum in Q8.8 (bins 0..7).
  localparam sample_t FIG_IN  [NPT] = '{16'h0000, 16'h0100, 16'h0200, 16'h0300,
                                        16'h0400, 16'h0500, 16'h0600, 16'h0700};
  localparam sample_t FIG_RE  [NPT] = '{16'h1C00, 16'hFC00, 16'hFC00, 16'hFC00,
                                        16'hFC00, 16'hFC00, 16'hFC00, 16'hFC00};
  localparam sample_t FIG_IM  [NPT] = '{16'h0000, 16'h09A8, 16'h0400, 16'h01A8,
                                        16'h0000, 16'hFE58, 16'hFC00, 16'hF658};

  // Test vector number v: 0 ramp, 1 zeros, 2 all max, 3 all min, 4 impulse,
  // 5 alternating +-max, 6 min/max mix, then random values in [-8, 8).
  function automatic samples_t vector(input int v);
    samples_t x;
    for (int n = 0; n < NPT; n++) begin
      unique case (v)
        0: x[n] = FIG_IN[n];
        1: x[n] = '0;
        2: x[n] = 16'sd2047;
        3: x[n] = -16'sd2048;
        4: x[n] = (n == 0) ? 16'sd2047 : '0;
        5: x[n] = n[0] ? -16'sd2048 : 16'sd2047;
        6: x[n] = (n < 4) ? -16'sd2048 : 16'sd2047;
        default: x[n] = sample_t'($signed(12'($urandom)));
      endcase
    end
    return x;
  endfunction
endpackage
