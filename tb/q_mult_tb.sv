// q_mult_tb: checks the Q8.8 multiplier against floor(a*b/256) worked out
// in double precision, for corner operands and random ones whose product
// fits in Q8.8 (|a*b| < 128).
module q_mult_tb;
  import fft8_pkg::*;

  sample_t a, b, p;
  int checks = 0;
  int failures = 0;

  q_mult dut (.a(a), .b(b), .p(p));

  task automatic check(input sample_t ta, input sample_t tb_);
    real exact;
    int  expect_v;
    a = ta;
    b = tb_;
    #1;
    exact    = real'(ta) * real'(tb_) / 256.0;
    expect_v = int'($floor(exact));
    checks++;
    if (int'(p) != expect_v) begin
      failures++;
      $display("%0d * %0d: got %0d expected %0d", ta, tb_, p, expect_v);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'sh0100, 16'sh0100);     //  1.0 *  1.0
    check(SIN45, 16'sh0800);         //  0.707 * 8
    check(SIN315, 16'sh0800);        // -0.707 * 8
    check(SIN45, -16'sd2048);
    check(SIN315, -16'sd8192);       // -0.707 * -32
    check(SIN45, 16'sd1);            // truncation of a tiny product
    check(SIN315, 16'sd1);           // floor of a negative tiny product
    check('0, 16'sh7FFF);
    for (int i = 0; i < 2000; i++) begin
      sample_t ra, rb;
      ra = sample_t'($signed(14'($urandom)));   // [-32, 32)
      rb = sample_t'($signed(10'($urandom)));   // [-2, 2)
      check(ra, rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
