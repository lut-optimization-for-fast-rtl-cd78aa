// q_mult: signed Q8.8 x Q8.8 multiplier, the hardware (DSP) multiplier of
// the FFT engines.
//
// Combinational. The full 32-bit product is Q16.16; bits [23:8] are kept,
// which is truncation toward minus infinity back to Q8.8 (the upper bits are
// dropped, so a product outside [-128, 128) wraps). A synthesis tool maps the
// '*' onto one hardware multiplier block. The Q8.8 scaling follows
// the original design; truncation rather than rounding is this design's choice.
module q_mult
  import fft8_pkg::*;
(
  input  sample_t a,
  input  sample_t b,
  output sample_t p
);
  logic signed [2*DW-1:0] full;

  always_comb begin
    full = a * b;
    p    = full[DW+FRAC-1:FRAC];
  end
endmodule
