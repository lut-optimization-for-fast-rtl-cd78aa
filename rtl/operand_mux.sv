// operand_mux: the operand selector in front of a shared multiplier.
//
// Two 2:1 multiplexers share one select line. With sel = 0 the multiplier
// sees the operand pair (operand_1a, operand_2a), with sel = 1 the pair
// (operand_1b, operand_2b), so one multiplier can do two different
// multiplications in successive clock cycles. Purely combinational. The
// structure follows the original design; the widths are parameters so that the CORDIC
// engine can route its wider angle operand through the same block.
module operand_mux #(
  parameter int unsigned W1 = 16,
  parameter int unsigned W2 = 16
) (
  input  logic [W1-1:0] operand_1a,
  input  logic [W1-1:0] operand_1b,
  input  logic [W2-1:0] operand_2a,
  input  logic [W2-1:0] operand_2b,
  input  logic          sel,
  output logic [W1-1:0] operand_1,
  output logic [W2-1:0] operand_2
);
  always_comb begin
    operand_1 = sel ? operand_1b : operand_1a;
    operand_2 = sel ? operand_2b : operand_2a;
  end
endmodule
