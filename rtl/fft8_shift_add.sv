// fft8_shift_add: 8-point FFT of real Q8.8 samples whose two sin(pi/4)
// multiplications run one after the other on a shift-and-add multiplier
// built from logic, so the engine needs no hardware multiplier (Algo-3).
//
// A controller walks through
//   S_G1    samples inp[] and stores the group-1 results (fft8_pre)
//   S_STA   starts the multiplier on (t4 - t6) * sin(pi/4)   (mux select 0)
//   S_WA    waits for done, stores m4
//   S_STB   starts the multiplier on (t4 + t6) * -sin(pi/4)  (mux select 1)
//   S_WB    waits for done, forms group 2 (fft8_post), writes the outputs
//   S_HOLD  holds the result with out_stb high until the next reset
// Each multiplication takes SA_N + 2 clocks (start, SA_N steps, done), so
// out_stb rises 2*SA_N + 5 clock edges after rst is released (37 for
// 16-bit operands). rst is synchronous, active high, and starts a new
// transform when released. The scheme (one shared shift-add multiplier
// behind an operand multiplexer) follows the original design; the controller states
// and the one-transform-per-reset behaviour are this design's choice.
// For real inputs X[0] and X[4] are real, so out_imag[0] and out_imag[4] are
// constant zero.
// Only the Q8.8 output of the multiplier is used; its full-width product
// port is left open.
module fft8_shift_add
  import fft8_pkg::*;
#(
  parameter int unsigned SA_N = 16
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
  sample_t   op1, op2;
  logic      sel, mul_start, mul_busy, mul_done;
  logic signed [SA_N-1:0]   mul_q;
  sample_t   prod;
  spectrum_t x;

  assign sel       = (state == S_STB) || (state == S_WB);
  assign mul_start = (state == S_STA) || (state == S_STB);

  operand_mux #(.W1(DW), .W2(DW)) u_mux (
    .operand_1a(g.mul_a), .operand_1b(g.mul_b),
    .operand_2a(SIN45),   .operand_2b(SIN315),
    .sel(sel), .operand_1(op1), .operand_2(op2)
  );

  shift_add_mult #(.N(SA_N), .FRAC(FRAC)) u_mul (
    .clk(clk), .rst(rst), .start(mul_start),
    .x(SA_N'(op1)), .y(SA_N'(op2)),
    .busy(mul_busy), .done(mul_done),
    .product(), .q_out(mul_q)
  );

  assign prod = DW'(mul_q);

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
