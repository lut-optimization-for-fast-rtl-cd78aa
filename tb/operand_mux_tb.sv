// operand_mux_tb: drives random operand pairs and checks that select 0
// passes (operand_1a, operand_2a) and select 1 passes (operand_1b,
// operand_2b), with a 16-bit and a 32-bit second operand as the engines use.
module operand_mux_tb;
  logic [15:0] o1a, o1b, o1;
  logic [31:0] o2a, o2b, o2;
  logic        sel;
  int checks = 0;
  int failures = 0;

  operand_mux #(.W1(16), .W2(32)) dut (
    .operand_1a(o1a), .operand_1b(o1b), .operand_2a(o2a), .operand_2b(o2b),
    .sel(sel), .operand_1(o1), .operand_2(o2)
  );

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      o1a = 16'($urandom);
      o1b = 16'($urandom);
      o2a = $urandom;
      o2b = $urandom;
      sel = i[0];
      #1;
      checks += 2;
      if (o1 !== (i[0] ? o1b : o1a)) failures++;
      if (o2 !== (i[0] ? o2b : o2a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
