// alu32: 32-bit integer ALU of the Execute stage.
// Combinational. Performs add, subtract, set-less-than (signed/unsigned),
// logic operations and the three shifts of RV32I, plus a pass-through of
// operand B used by LUI. The operation set is that of RV32I; the
// single-module organisation (the adder, subtractor and shifter that the
// original splits into separate units are here one case statement) is this
// design's choice.
module alu32
  import rv32x_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'd0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = a + b;
    endcase
  end
endmodule
