// fft8_cordic: 8-point FFT of real Q8.8 samples whose two sin(pi/4)
// multiplications run one after the other on a CORDIC multiplier (Algo-4).
//
// The controller is the same as in fft8_shift_add; the multiplier is
// cordic_mult, which forms a*sin(theta) by scaling the CORDIC start vector
// by a (one hardware multiplication) and rotating it through theta:
//   S_G1    samples inp[] and stores the group-1 results (fft8_pre)
//   S_STA   starts (t4 - t6) rotated by +pi/4: m4 = (t4 - t6)*sin(pi/4)
//   S_WA    waits for done, stores m4
//   S_STB   starts (t4 + t6) rotated by -pi/4: Im(m7) = -(t4 + t6)*sin(pi/4)
//   S_WB    waits for done, forms group 2 (fft8_post), writes the outputs
//   S_HOLD  holds the result with out_stb high until the next reset
// The operand multiplexer selects the scalar (16 bits) and the angle
// (32 bits, Q2.30 radians). Each multiplication takes CORDIC_ITER + 2
// clocks, so out_stb rises 2*CORDIC_ITER + 5 clock edges after rst is
// released (69 for 32 steps). rst is synchronous and active high. Because
// the CORDIC uses the exact sine rather than the 181/256 constant of the
// other engines, results can differ from theirs in the last bits.
// The use of a CORDIC multiplier follows the original design; the step count, the
// formats and the controller are this design's choice.
// For real inputs X[0] and X[4] are real, so out_imag[0] and out_imag[4] are
// constant zero.
// Only the sine output of the multiplier is used; its cosine port is left
// open.
module fft8_cordic
  import fft8_pkg::*;
#(
  parameter int unsigned CORDIC_ITER = 32
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t inp      [NPT],
  output sample_t out_real [NPT],
  output sample_t out_imag [NPT],
  output logic    out_stb
);
  typedef enum logic [2:0] {S_G1, S_STA, S_WA, S_STB, S_WB, S_HOLD} state_t;

  state_t    state;
  group1_t   g;
  sample_t   m4;
  logic [DW-1:0] op_scalar;
  logic [31:0]   op_angle;
  logic      sel, mul_start, mul_busy, mul_done;
  sample_t   prod;
  spectrum_t x;

  assign sel       = (state == S_STB) || (state == S_WB);
  assign mul_start = (state == S_STA) || (state == S_STB);

  operand_mux #(.W1(DW), .W2(32)) u_mux (
    .operand_1a(g.mul_a),   .operand_1b(g.mul_b),
    .operand_2a(ANGLE_P45), .operand_2b(ANGLE_M45),
    .sel(sel), .operand_1(op_scalar), .operand_2(op_angle)
  );

  cordic_mult #(.ITER(CORDIC_ITER), .AW(32)) u_mul (
    .clk(clk), .rst(rst), .start(mul_start),
    .scalar(op_scalar), .angle(op_angle),
    .busy(mul_busy), .done(mul_done),
    .sin_out(prod), .cos_out()
  );

  always_comb x = fft8_post(g, m4, prod);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_G1;
      g       <= '0;
      m4      <= '0;
      out_stb <= 1'b0;
      for (int k = 0; k < NPT; k++) begin
        out_real[k] <= '0;
        out_imag[k] <= '0;
      end
    end else begin
      unique case (state)
        S_G1: begin
          g     <= fft8_pre(inp);
          state <= S_STA;
        end
        S_STA: state <= S_WA;
        S_WA: if (mul_done) begin
          m4    <= prod;
          state <= S_STB;
        end
        S_STB: state <= S_WB;
        S_WB: if (mul_done) begin
          for (int k = 0; k < NPT; k++) begin
            out_real[k] <= x[k].re;
            out_imag[k] <= x[k].im;
          end
          out_stb <= 1'b1;
          state   <= S_HOLD;
        end
        S_HOLD: state <= S_HOLD;
        default: state <= S_G1;
      endcase
    end
  end

`ifndef SYNTHESIS
  // A multiplication is only started when the multiplier is idle, and the
  // controller only waits while one is in progress or just finished.
  a_start_idle : assert property (@(posedge clk) disable iff (rst) mul_start |-> !mul_busy);
  a_wait_busy  : assert property (@(posedge clk) disable iff (rst)
                   (state == S_WA || state == S_WB) |-> (mul_busy || mul_done));
`endif
endmodule
