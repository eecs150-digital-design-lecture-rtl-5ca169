// alu: the 32-bit arithmetic/logic unit of the MIPS150 X stage.
//
// One ALU computes the result of an arithmetic or logic instruction, the
// address of a load or store, and the comparison of a conditional branch
// (the X stage subtracts the two operands and looks at `zero` and the sign
// of `y`). Shifts move operand B by the amount in the low five bits of
// operand A, so the pipeline places either the shamt field or rs there.
// ALU_LUI places the low half of B in the upper half of the result.
// Purely combinational; no overflow trap is raised (add and sub behave as
// addu and subu), which is this design's choice.
module alu
  import mips150_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        zero
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = $unsigned($signed(b) >>> a[4:0]);
      ALU_LUI:  y = {b[15:0], 16'd0};
      default:  y = '0;
    endcase
  end
  assign zero = (y == 32'd0);
endmodule
