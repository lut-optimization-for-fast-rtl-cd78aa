// shift_add_mult: sequential shift-and-add multiplier made of plain logic
// (no hardware multiplier block).
//
// Datapath: a 2N-bit product register A, a 2N-bit multiplicand register B
// and an N-bit multiplier register Q. A start pulse loads B with |x| (upper
// half zero), Q with |y|, clears A and sets the step counter to N. Each
// following clock does one step: if Q[0] is 1, A <= A + B; then B shifts
// left by one and Q right by one, and the counter decrements. After N steps
// the unsigned product |x|*|y| is in A. That is the original algorithm.
//
// Signed operands are this design's addition: the multiplier works on the
// magnitudes and the product is negated when the operand signs differ.
//
// Timing: start is sampled on a clock edge; N further edges do the N steps;
// done is a one-cycle pulse in the cycle after the last step, and product /
// q_out stay valid from then until the next start. busy is high during the
// steps. A start while busy restarts the multiplication.
// q_out is the product scaled back to the operand format (FRAC fraction
// bits), truncated toward minus infinity, for Q-format operands.
module shift_add_mult #(
  parameter int unsigned N    = 16,
  parameter int unsigned FRAC = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic signed [N-1:0]   x,
  input  logic signed [N-1:0]   y,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*N-1:0] product,
  output logic signed [N-1:0]   q_out
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [2*N-1:0] a_reg;   // A: product
  logic [2*N-1:0] b_reg;   // B: multiplicand, shifted left
  logic [N-1:0]   q_reg;   // Q: multiplier, shifted right
  logic [CW-1:0]  cnt;     // steps left
  logic           neg;     // product sign

  logic [N-1:0] x_mag, y_mag;

  always_comb begin
    x_mag = x[N-1] ? N'(-x) : N'(x);
    y_mag = y[N-1] ? N'(-y) : N'(y);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_reg <= '0;
      b_reg <= '0;
      q_reg <= '0;
      cnt   <= '0;
      neg   <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else if (start) begin
      a_reg <= '0;
      b_reg <= {{N{1'b0}}, x_mag};
      q_reg <= y_mag;
      cnt   <= CW'(N);
      neg   <= x[N-1] ^ y[N-1];
      busy  <= 1'b1;
      done  <= 1'b0;
    end else if (busy) begin
      if (q_reg[0]) a_reg <= a_reg + b_reg;
      b_reg <= b_reg << 1;
      q_reg <= q_reg >> 1;
      cnt   <= cnt - 1'b1;
      if (cnt == CW'(1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else begin
      done <= 1'b0;
    end
  end

  always_comb begin
    product = neg ? -$signed(a_reg) : $signed(a_reg);
    q_out   = product[N+FRAC-1:FRAC];
  end

`ifndef SYNTHESIS
  // The step counter never runs past zero while busy.
  a_cnt : assert property (@(posedge clk) disable iff (rst) busy |-> cnt != '0);
`endif
endmodule
