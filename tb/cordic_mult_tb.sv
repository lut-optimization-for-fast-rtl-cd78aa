// cordic_mult_tb: checks the CORDIC multiplier.
//
// For each (scalar a, angle theta) pair the unit is started with a
// one-cycle pulse; the clocks until done must equal ITER, and sin_out /
// cos_out must match a*sin(theta) and a*cos(theta) from double-precision
// $sin/$cos within 3 LSB of Q8.8. Angles cover +-pi/4 (the values the FFT
// uses), 0, +-1.5 rad, and random angles in [-1.5, 1.5] rad; scalars are
// random in [-64, 64).
module cordic_mult_tb;
  localparam int ITER = 32;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic start = 1'b0;
  logic signed [15:0] scalar;
  logic signed [31:0] angle;
  logic               busy, done;
  logic signed [15:0] sin_out, cos_out;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  cordic_mult #(.ITER(ITER), .AW(32)) dut (
    .clk(clk), .rst(rst), .start(start), .scalar(scalar), .angle(angle),
    .busy(busy), .done(done), .sin_out(sin_out), .cos_out(cos_out)
  );

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rot(input logic signed [15:0] a, input real theta);
    real es, ec, gs, gc;
    int cyc;
    @(negedge clk);
    scalar = a;
    angle  = 32'(longint'($rtoi(theta * 1073741824.0)));
    start  = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;  // edges after the one that sampled start
    while (!done && cyc < 4 * ITER) begin
      @(negedge clk);
      cyc++;
    end
    es = real'(a) / 256.0 * $sin(theta);
    ec = real'(a) / 256.0 * $cos(theta);
    gs = real'(sin_out) / 256.0;
    gc = real'(cos_out) / 256.0;
    checks += 3;
    if (cyc != ITER) begin
      failures++;
      $display("done after %0d clocks, expected %0d", cyc, ITER);
    end
    if (gs - es > 3.0 / 256.0 || es - gs > 3.0 / 256.0) begin
      failures++;
      $display("a=%0d theta=%f: sin %f expected %f", a, theta, gs, es);
    end
    if (gc - ec > 3.0 / 256.0 || ec - gc > 3.0 / 256.0) begin
      failures++;
      $display("a=%0d theta=%f: cos %f expected %f", a, theta, gc, ec);
    end
  endtask

  initial begin
    scalar = '0;
    angle  = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    rot(16'sh0100, PI / 4.0);
    rot(16'sh0100, -PI / 4.0);
    rot(-16'sh0800, PI / 4.0);
    rot(16'sh2000, -PI / 4.0);
    rot(16'sh1000, 0.0);
    rot(16'sh1000, 1.5);
    rot(-16'sh1000, -1.5);
    for (int i = 0; i < 200; i++) begin
      logic signed [15:0] a;
      real th;
      a  = 16'($signed(15'($urandom)));
      th = (real'($urandom % 30001) / 10000.0) - 1.5;
      rot(a, th);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
