// fft8_cordic_tb: self-checking testbench for fft8_cordic.
//
// For each test vector the engine is reset, the reset released, and the
// number of clock edges until out_stb rises is checked against the expected
// latency (69 edges); out_stb must stay low before that. The eight output
// bins are then compared with a double-precision DFT of the same Q8.8 inputs
// (tolerance 3 LSB, covering the truncated products and the 181/256
// approximation of sin(pi/4)). For the ramp 0..7 the Q8.8 outputs are also
// compared only within tolerance (the CORDIC uses the exact sine). Vectors: ramp, zeros, all max, all min, impulse,
// alternating, step, then 100 random vectors with values in [-8, 8).
module fft8_cordic_tb;
  import fft8_pkg::*;
  import fft8_ref_pkg::*;

  localparam int LAT     = 69;
  localparam int TOL     = 3;
  localparam bit EXACT   = 0;
  localparam bit CONT    = 0;
  localparam int NVEC    = 107;  // 7 fixed vectors + 100 random ones

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  sample_t inp [NPT];
  sample_t out_real [NPT], out_imag [NPT];
  logic    out_stb;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  fft8_cordic dut (.clk(clk), .rst(rst), .inp(inp), .out_real(out_real),
             .out_imag(out_imag), .out_stb(out_stb));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_bins(input samples_t x, input int v);
    for (int k = 0; k < NPT; k++) begin
      real er, ei;
      er = q2r(out_real[k]) - dft_re(x, k);
      ei = q2r(out_imag[k]) - dft_im(x, k);
      checks += 2;
      if (er > TOL / 256.0 || er < -TOL / 256.0) begin
        failures++;
        $display("vec %0d bin %0d real %f expected %f", v, k, q2r(out_real[k]), dft_re(x, k));
      end
      if (ei > TOL / 256.0 || ei < -TOL / 256.0) begin
        failures++;
        $display("vec %0d bin %0d imag %f expected %f", v, k, q2r(out_imag[k]), dft_im(x, k));
      end
      if (v == 0 && EXACT) begin
        checks += 2;
        if (out_real[k] !== FIG_RE[k] || out_imag[k] !== FIG_IM[k]) begin
          failures++;
          $display("ramp bin %0d got %h %h expected %h %h", k, out_real[k], out_imag[k],
                   FIG_RE[k], FIG_IM[k]);
        end
      end
    end
  endtask

  initial begin
    samples_t x;
    int cyc;
    bit early;
    for (int n = 0; n < NPT; n++) inp[n] = '0;
    for (int v = 0; v < NVEC; v++) begin
      x = vector(v);
      @(negedge clk);
      inp = x;
      rst = 1'b1;
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (out_stb !== 1'b0) begin
        failures++;
        $display("out_stb not cleared by reset");
      end
      rst = 1'b0;
      cyc = 0;
      early = 1'b0;
      do begin
        @(posedge clk);
        #1;
        cyc++;
        if (out_stb && cyc < LAT) early = 1'b1;
      end while (!out_stb && cyc < 4 * LAT + 10);
      checks++;
      if (cyc != LAT || early) begin
        failures++;
        $display("vec %0d: out_stb after %0d edges, expected %0d", v, cyc, LAT);
      end
      check_bins(x, v);
    end
    if (CONT) begin
      // Without a reset, the engine keeps sampling its inputs.
      for (int v = NVEC; v < NVEC + 20; v++) begin
        x = vector(v);
        @(negedge clk);
        inp = x;
        repeat (2 * LAT) @(negedge clk);
        checks++;
        if (!out_stb) failures++;
        check_bins(x, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
