// fft8_top_tb: end-to-end test of the four FFT engines in fft8_top, at the
// default parameters (16-bit shift-add multiplier, 32 CORDIC steps).
//
// Each round gives every engine its own input vector, pulses the four
// resets together and waits for the four output strobes. It checks each
// engine's latency (1, 3, 2*16+5 and 2*32+5 clock edges), its eight bins
// against a double-precision DFT (3 LSB), and, in rounds where all engines
// get the same vector, that the three engines with the 181/256 constant
// agree bit for bit. It then changes the inputs of the two free-running
// engines without a reset and checks that they follow.
// It counts how often each mechanism occurred and fails if one never did:
// both selections of the shared multiplier's operand mux, completed
// shift-add and CORDIC multiplications with each operand selection,
// multiplications with a negative operand in the shift-add unit, and
// re-sampling without a reset.
module fft8_top_tb;
  import fft8_pkg::*;
  import fft8_ref_pkg::*;

  localparam int NROUND = 40;
  localparam int TOL    = 3;
  localparam int LAT [4] = '{1, 3, 37, 69};

  logic clk = 1'b0;
  logic rst [4];
  sample_t inp [4][NPT];
  sample_t ore [4][NPT];
  sample_t oim [4][NPT];
  logic stb [4];

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_mux_a2_sel0 = 0, n_mux_a2_sel1 = 0;
  int n_sa_done_a = 0, n_sa_done_b = 0, n_sa_neg = 0;
  int n_cd_done_a = 0, n_cd_done_b = 0;
  int n_resample = 0;

  always #5 clk = ~clk;

  fft8_top dut (
    .clk(clk),
    .a1_rst(rst[0]), .a1_inp(inp[0]), .a1_out_real(ore[0]), .a1_out_imag(oim[0]), .a1_out_stb(stb[0]),
    .a2_rst(rst[1]), .a2_inp(inp[1]), .a2_out_real(ore[1]), .a2_out_imag(oim[1]), .a2_out_stb(stb[1]),
    .a3_rst(rst[2]), .a3_inp(inp[2]), .a3_out_real(ore[2]), .a3_out_imag(oim[2]), .a3_out_stb(stb[2]),
    .a4_rst(rst[3]), .a4_inp(inp[3]), .a4_out_real(ore[3]), .a4_out_imag(oim[3]), .a4_out_stb(stb[3])
  );

  always @(posedge clk) begin
    if (!rst[1] && dut.u_a2.stage == dut.u_a2.ST_MA && !dut.u_a2.sel) n_mux_a2_sel0++;
    if (!rst[1] && dut.u_a2.stage == dut.u_a2.ST_MB &&  dut.u_a2.sel) n_mux_a2_sel1++;
    if (dut.u_a3.mul_done && !dut.u_a3.sel) n_sa_done_a++;
    if (dut.u_a3.mul_done &&  dut.u_a3.sel) n_sa_done_b++;
    if (dut.u_a3.mul_start && dut.u_a3.op1[DW-1]) n_sa_neg++;
    if (dut.u_a4.mul_done && !dut.u_a4.sel) n_cd_done_a++;
    if (dut.u_a4.mul_done &&  dut.u_a4.sel) n_cd_done_b++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_engine(input int e, input samples_t x, input string tag);
    real tol;
    tol = TOL / 256.0;
    for (int k = 0; k < NPT; k++) begin
      real er, ei;
      er = q2r(ore[e][k]) - dft_re(x, k);
      ei = q2r(oim[e][k]) - dft_im(x, k);
      checks += 2;
      if (er > tol || er < -tol || ei > tol || ei < -tol) begin
        failures++;
        $display("%s engine a%0d bin %0d: got %f,%f expected %f,%f", tag, e + 1, k,
                 q2r(ore[e][k]), q2r(oim[e][k]), dft_re(x, k), dft_im(x, k));
      end
    end
  endtask

  initial begin
    samples_t x [4];
    int cyc, got [4];
    bit same;
    for (int e = 0; e < 4; e++) begin
      rst[e] = 1'b1;
      for (int n = 0; n < NPT; n++) inp[e][n] = '0;
    end
    for (int r = 0; r < NROUND; r++) begin
      same = (r % 4 == 0);
      for (int e = 0; e < 4; e++) x[e] = (same && e > 0) ? x[0] : vector(r == 0 ? 0 : 7 + 4 * r + e);
      @(negedge clk);
      for (int e = 0; e < 4; e++) begin
        inp[e] = x[e];
        rst[e] = 1'b1;
      end
      @(negedge clk);
      @(negedge clk);
      for (int e = 0; e < 4; e++) rst[e] = 1'b0;
      for (int e = 0; e < 4; e++) got[e] = -1;
      cyc = 0;
      do begin
        @(posedge clk);
        #1;
        cyc++;
        for (int e = 0; e < 4; e++) if (stb[e] && got[e] < 0) got[e] = cyc;
      end while (got[3] < 0 && cyc < 200);
      for (int e = 0; e < 4; e++) begin
        checks++;
        if (got[e] != LAT[e]) begin
          failures++;
          $display("round %0d engine a%0d: out_stb after %0d edges, expected %0d", r, e + 1, got[e], LAT[e]);
        end
        check_engine(e, x[e], "reset");
      end
      if (same) begin
        for (int k = 0; k < NPT; k++) begin
          checks++;
          if (ore[0][k] !== ore[1][k] || ore[0][k] !== ore[2][k] ||
              oim[0][k] !== oim[1][k] || oim[0][k] !== oim[2][k]) begin
            failures++;
            $display("round %0d bin %0d: engines a1..a3 disagree", r, k);
          end
        end
      end
      // free-running engines follow new inputs without a reset
      x[0] = vector(1000 + 2 * r);
      x[1] = vector(1001 + 2 * r);
      @(negedge clk);
      inp[0] = x[0];
      inp[1] = x[1];
      repeat (6) @(negedge clk);
      check_engine(0, x[0], "resample");
      check_engine(1, x[1], "resample");
      n_resample++;
      // engines a3 and a4 hold their result until the next reset
      checks++;
      if (!stb[2] || !stb[3]) begin
        failures++;
        $display("round %0d: a3/a4 strobe dropped", r);
      end
    end
    $display("mechanisms: mux_sel0=%0d mux_sel1=%0d sa_mul_a=%0d sa_mul_b=%0d sa_negative=%0d cordic_a=%0d cordic_b=%0d resample=%0d",
             n_mux_a2_sel0, n_mux_a2_sel1, n_sa_done_a, n_sa_done_b, n_sa_neg, n_cd_done_a, n_cd_done_b, n_resample);
    checks += 8;
    if (n_mux_a2_sel0 == 0) failures++;
    if (n_mux_a2_sel1 == 0) failures++;
    if (n_sa_done_a == 0) failures++;
    if (n_sa_done_b == 0) failures++;
    if (n_sa_neg == 0) failures++;
    if (n_cd_done_a == 0) failures++;
    if (n_cd_done_b == 0) failures++;
    if (n_resample == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
