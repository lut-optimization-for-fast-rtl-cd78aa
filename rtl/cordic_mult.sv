// cordic_mult: multiplies a Q8.8 scalar a by sin(theta) and cos(theta) with
// one hardware multiplication and a rotation-mode CORDIC.
//
// The vector (K*a, 0), where K = 0.60725... is the CORDIC gain correction,
// is rotated through theta by ITER micro-rotations. Step i turns the vector
// by +-atan(2^-i): x' = x - s*(y >>> i), y' = y + s*(x >>> i),
// z' = z - s*atan(2^-i), with s = +1 while the residual angle z is not
// negative and -1 otherwise. Each step needs only shifts and adds; the
// elementary angles atan(2^-i) are a small table computed at elaboration.
// After the last step (x, y) = (a*cos(theta), a*sin(theta)). The only
// multiplication is K*a, done once when the operation starts. This scheme
// (start vector K times the scalar, then rotate) follows the original design; the
// widths and the number of steps are this design's choice.
//
// Formats: angle is radians in signed Q2.30 (valid for |theta| <= 1.74);
// x and y are kept in 32-bit Q8.24; sin_out / cos_out are Q8.8, truncated
// toward minus infinity.
//
// Timing: start is sampled on a clock edge (this loads x = K*a, y = 0,
// z = angle); ITER further edges do one micro-rotation each; done pulses for
// one cycle after the last one and the outputs stay valid until the next
// start. busy is high during the steps.
module cordic_mult #(
  parameter int unsigned ITER = 32,
  parameter int unsigned AW   = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic signed [15:0]   scalar,
  input  logic signed [AW-1:0] angle,
  output logic                 busy,
  output logic                 done,
  output logic signed [15:0]   sin_out,
  output logic signed [15:0]   cos_out
);
  localparam int unsigned CW = $clog2(ITER + 1);
  localparam int unsigned IW = (ITER > 1) ? $clog2(ITER) : 1; // ROM index width
  localparam int unsigned VW = 32;      // x / y width, Q8.24
  localparam int unsigned AFRAC = AW - 2; // angle fraction bits (Q2.30 for AW = 32)

  // K = prod 1/sqrt(1 + 2^-2i) in Q2.30: round(0.6072529350088813 * 2^30)
  localparam logic signed [31:0] K_Q30 = 32'sd652032874;

  // atan(2^-i) in Q2.(AFRAC). i = 0 is pi/4; for i >= 1 the series
  // atan(x) = x - x^3/3 + x^5/5 - ... with x = 2^-i is summed in 62-bit
  // fixed point and rounded.
  function automatic logic signed [AW-1:0] atan_pow2(input int unsigned i);
    longint acc;
    longint term;
    int     k;
    if (i == 0) begin
      // round(pi/4 * 2^62) >> (62 - AFRAC)
      acc = 64'sd3622009729038561421;
    end else begin
      acc = 0;
      for (k = 0; (2 * k + 1) * i <= 62; k++) begin
        term = (64'sd1 <<< (62 - (2 * k + 1) * i)) / longint'(2 * k + 1);
        acc  = (k % 2 == 0) ? acc + term : acc - term;
      end
    end
    acc = (acc + (64'sd1 <<< (62 - AFRAC - 1))) >>> (62 - AFRAC);
    return AW'(acc);
  endfunction

  typedef logic signed [AW-1:0] angle_t;
  typedef angle_t atan_tab_t [ITER];

  function automatic atan_tab_t atan_table();
    atan_tab_t t;
    for (int unsigned n = 0; n < ITER; n++) t[n] = atan_pow2(n);
    return t;
  endfunction

  // Elementary-angle ROM, indexed by the step number.
  localparam atan_tab_t ATAN = atan_table();

  logic signed [VW-1:0] x_reg, y_reg;
  logic signed [AW-1:0] z_reg;
  logic [CW-1:0]        step;
  logic signed [47:0]   ka;       // K * a, Q10.38
  logic signed [VW-1:0] x_sh, y_sh;
  angle_t               beta;

  always_comb begin
    ka   = K_Q30 * scalar;
    x_sh = x_reg >>> step;
    y_sh = y_reg >>> step;
    beta = (step < CW'(ITER)) ? ATAN[IW'(step)] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_reg <= '0;
      y_reg <= '0;
      z_reg <= '0;
      step  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else if (start) begin
      x_reg <= VW'(ka >>> 14);   // Q10.38 -> Q8.24
      y_reg <= '0;
      z_reg <= angle;
      step  <= '0;
      busy  <= 1'b1;
      done  <= 1'b0;
    end else if (busy) begin
      if (!z_reg[AW-1]) begin
        x_reg <= x_reg - y_sh;
        y_reg <= y_reg + x_sh;
        z_reg <= z_reg - beta;
      end else begin
        x_reg <= x_reg + y_sh;
        y_reg <= y_reg - x_sh;
        z_reg <= z_reg + beta;
      end
      step <= step + 1'b1;
      if (step == CW'(ITER - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else begin
      done <= 1'b0;
    end
  end

  always_comb begin
    sin_out = y_reg[VW-1 -: 16];
    cos_out = x_reg[VW-1 -: 16];
  end
endmodule
