// fft8_top: the four 8-point FFT engines side by side.
//
// a1: fft8_parallel    two hardware multipliers, one result per clock
// a2: fft8_dsp_shared  one hardware multiplier shared, one result per 3 clocks
// a3: fft8_shift_add   shift-and-add multiplier, no hardware multiplier,
//                      result 2*SA_N + 5 clocks after reset
// a4: fft8_cordic      CORDIC multiplier, result 2*CORDIC_ITER + 5 clocks
//                      after reset
// They are alternatives that trade multiplier blocks, logic and speed for
// the same function; each keeps its own reset, inputs and outputs, and only
// the clock is shared. Formats and port meanings are those of the engines:
// 16-bit signed Q8.8 samples, X[k] = out_real[k] + j*out_imag[k].
module fft8_top
  import fft8_pkg::*;
#(
  parameter int unsigned SA_N        = 16,
  parameter int unsigned CORDIC_ITER = 32
) (
  input  logic    clk,

  input  logic    a1_rst,
  input  sample_t a1_inp      [NPT],
  output sample_t a1_out_real [NPT],
  output sample_t a1_out_imag [NPT],
  output logic    a1_out_stb,

  input  logic    a2_rst,
  input  sample_t a2_inp      [NPT],
  output sample_t a2_out_real [NPT],
  output sample_t a2_out_imag [NPT],
  output logic    a2_out_stb,

  input  logic    a3_rst,
  input  sample_t a3_inp      [NPT],
  output sample_t a3_out_real [NPT],
  output sample_t a3_out_imag [NPT],
  output logic    a3_out_stb,

  input  logic    a4_rst,
  input  sample_t a4_inp      [NPT],
  output sample_t a4_out_real [NPT],
  output sample_t a4_out_imag [NPT],
  output logic    a4_out_stb
);
  fft8_parallel u_a1 (
    .clk(clk), .rst(a1_rst), .inp(a1_inp),
    .out_real(a1_out_real), .out_imag(a1_out_imag), .out_stb(a1_out_stb)
  );

  fft8_dsp_shared u_a2 (
    .clk(clk), .rst(a2_rst), .inp(a2_inp),
    .out_real(a2_out_real), .out_imag(a2_out_imag), .out_stb(a2_out_stb)
  );

  fft8_shift_add #(.SA_N(SA_N)) u_a3 (
    .clk(clk), .rst(a3_rst), .inp(a3_inp),
    .out_real(a3_out_real), .out_imag(a3_out_imag), .out_stb(a3_out_stb)
  );

  fft8_cordic #(.CORDIC_ITER(CORDIC_ITER)) u_a4 (
    .clk(clk), .rst(a4_rst), .inp(a4_inp),
    .out_real(a4_out_real), .out_imag(a4_out_imag), .out_stb(a4_out_stb)
  );
endmodule
