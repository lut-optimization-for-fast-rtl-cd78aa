// fft8_parallel: 8-point FFT of real Q8.8 samples with both sin(pi/4)
// multiplications done in parallel on two hardware multipliers (Algo-1).
//
// The whole flow graph (group 1 adds, two q_mult multipliers, group 2 adds,
// see fft8_pkg) is combinational between the inputs and one bank of output
// registers. Every clock the engine samples inp[0..7] and one clock later
// out_real/out_imag hold X[0..7]; it is the fastest of the four engines and
// the one that uses the most multiplier blocks.
//
// Interface: inp[k] is x[k]; out_real[k] + j*out_imag[k] is X[k]. All
// values are 16-bit signed Q8.8. rst is synchronous and active high; it
// clears the outputs and out_stb. out_stb rises on the first clock edge
// after rst is released and stays high. The flow graph and formats follow
// the original design; the single-register timing is this design's choice.
// For real inputs X[0] and X[4] are real, so out_imag[0] and out_imag[4] are
// constant zero.
module fft8_parallel
  import fft8_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t inp      [NPT],
  output sample_t out_real [NPT],
  output sample_t out_imag [NPT],
  output logic    out_stb
);
  group1_t   g;
  sample_t   m4, m7_im;
  spectrum_t x;

  always_comb g = fft8_pre(inp);

  q_mult u_mul_m4 (.a(g.mul_a), .b(SIN45),  .p(m4));
  q_mult u_mul_m7 (.a(g.mul_b), .b(SIN315), .p(m7_im));

  always_comb x = fft8_post(g, m4, m7_im);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_stb <= 1'b0;
      for (int k = 0; k < NPT; k++) begin
        out_real[k] <= '0;
        out_imag[k] <= '0;
      end
    end else begin
      out_stb <= 1'b1;
      for (int k = 0; k < NPT; k++) begin
        out_real[k] <= x[k].re;
        out_imag[k] <= x[k].im;
      end
    end
  end
endmodule
