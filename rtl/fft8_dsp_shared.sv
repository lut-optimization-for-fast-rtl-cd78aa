// fft8_dsp_shared: 8-point FFT of real Q8.8 samples with one hardware
// multiplier reused for both sin(pi/4) multiplications (Algo-2).
//
// The flow graph is that of fft8_parallel, cut into three clock stages so
// that the two multiplications fall into different cycles and can share
// one q_mult behind an operand_mux:
//   ST_G1  samples inp[] and stores the group-1 results (fft8_pkg::fft8_pre)
//   ST_MA  mux select 0: multiplies (t4 - t6) by sin(pi/4), stores m4
//   ST_MB  mux select 1: multiplies (t4 + t6) by -sin(pi/4) giving Im(m7),
//          forms group 2 (fft8_post) and writes the outputs
// and then starts again at ST_G1 with fresh inputs, so a new result appears
// every three clocks. out_stb rises with the first result, three clock edges
// after rst is released, and stays high. rst is synchronous, active high.
// Sharing one multiplier through a select-driven operand multiplexer follows
// the original design; the exact stage boundaries are this design's choice.
// For real inputs X[0] and X[4] are real, so out_imag[0] and out_imag[4] are
// constant zero.
module fft8_dsp_shared
  import fft8_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t inp      [NPT],
  output sample_t out_real [NPT],
  output sample_t out_imag [NPT],
  output logic    out_stb
);
  typedef enum logic [1:0] {ST_G1, ST_MA, ST_MB} stage_t;

  stage_t    stage;
  group1_t   g;
  sample_t   m4;
  sample_t   op1, op2, prod;
  logic      sel;
  spectrum_t x;

  assign sel = (stage == ST_MB);

  operand_mux #(.W1(DW), .W2(DW)) u_mux (
    .operand_1a(g.mul_a), .operand_1b(g.mul_b),
    .operand_2a(SIN45),   .operand_2b(SIN315),
    .sel(sel), .operand_1(op1), .operand_2(op2)
  );

  q_mult u_mul (.a(op1), .b(op2), .p(prod));

  always_comb x = fft8_post(g, m4, prod);

  always_ff @(posedge clk) begin
    if (rst) begin
      stage   <= ST_G1;
      g       <= '0;
      m4      <= '0;
      out_stb <= 1'b0;
      for (int k = 0; k < NPT; k++) begin
        out_real[k] <= '0;
        out_imag[k] <= '0;
      end
    end else begin
      unique case (stage)
        ST_G1: begin
          g     <= fft8_pre(inp);
          stage <= ST_MA;
        end
        ST_MA: begin
          m4    <= prod;
          stage <= ST_MB;
        end
        ST_MB: begin
          for (int k = 0; k < NPT; k++) begin
            out_real[k] <= x[k].re;
            out_imag[k] <= x[k].im;
          end
          out_stb <= 1'b1;
          stage   <= ST_G1;
        end
        default: stage <= ST_G1;
      endcase
    end
  end
endmodule
