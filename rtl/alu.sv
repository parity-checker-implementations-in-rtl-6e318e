// alu - combinational ALU of the component library.
//
// Computes y = a op b in one combinational step. Arithmetic and logic
// operations return a full word; the six unsigned compares return 1 or 0 in
// bit 0. ALU_NOT and ALU_NEG use only operand a. The operation set and the
// codes 0..8 are the library's; codes 9..11 (or, not, negate) complete the
// list of operations the library table gives and are numbered by this design.
// No clock: the result is valid one combinational delay after the inputs.
module alu
  import parity_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      op,
  output logic [W-1:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_LT:  y = W'(a <  b);
      ALU_LE:  y = W'(a <= b);
      ALU_GT:  y = W'(a >  b);
      ALU_GE:  y = W'(a >= b);
      ALU_NE:  y = W'(a != b);
      ALU_EQ:  y = W'(a == b);
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_NOT: y = ~a;
      ALU_NEG: y = -a;
      default: y = '0;
    endcase
  end

endmodule
