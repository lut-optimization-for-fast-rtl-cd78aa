// shift_add_mult_tb: checks the shift-and-add multiplier.
//
// Each multiplication is started with a one-cycle start pulse; the number
// of clock edges until done is checked to be N (one step per operand bit),
// done must be a single-cycle pulse, and the full signed product is
// compared with x*y formed in 64-bit integer arithmetic, and q_out with the
// Q8.8 value floor(x*y/256). Operands cover signs, zero, one and the most
// negative value, then random values.
module shift_add_mult_tb;
  localparam int N = 16;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic start = 1'b0;
  logic signed [N-1:0]   x, y;
  logic                  busy, done;
  logic signed [2*N-1:0] product;
  logic signed [N-1:0]   q_out;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  shift_add_mult #(.N(N), .FRAC(8)) dut (
    .clk(clk), .rst(rst), .start(start), .x(x), .y(y),
    .busy(busy), .done(done), .product(product), .q_out(q_out)
  );

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(input logic signed [N-1:0] tx, input logic signed [N-1:0] ty);
    longint expect_p;
    int cyc;
    @(negedge clk);
    x = tx;
    y = ty;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;  // edges after the one that sampled start
    while (!done && cyc < 4 * N) begin
      @(negedge clk);
      cyc++;
    end
    expect_p = longint'(tx) * longint'(ty);
    checks += 3;
    if (cyc != N) begin
      failures++;
      $display("%0d * %0d: done after %0d clocks, expected %0d", tx, ty, cyc, N);
    end
    if (longint'(product) != expect_p) begin
      failures++;
      $display("%0d * %0d: got %0d expected %0d", tx, ty, product, expect_p);
    end
    if (longint'(q_out) != (expect_p >>> 8) && expect_p < 64'sd8388608 && expect_p >= -64'sd8388608) begin
      failures++;
      $display("%0d * %0d: q_out %0d", tx, ty, q_out);
    end
    @(negedge clk);
    checks += 2;
    if (done) begin
      failures++;
      $display("done longer than one cycle");
    end
    if (longint'(product) != expect_p) begin
      failures++;
      $display("product not held");
    end
  endtask

  initial begin
    x = '0;
    y = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    mul(16'sd3, 16'sd5);
    mul(-16'sd3, 16'sd5);
    mul(16'sd3, -16'sd5);
    mul(-16'sd3, -16'sd5);
    mul(16'sd0, 16'sd12345);
    mul(16'sd181, 16'sh0800);
    mul(-16'sd181, 16'sh0800);
    mul(-16'sd32768, -16'sd32768);
    mul(-16'sd32768, 16'sd32767);
    mul(16'sd32767, 16'sd32767);
    for (int i = 0; i < 300; i++) mul(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
