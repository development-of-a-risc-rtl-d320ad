// amoalu: the read-modify-write arithmetic of the A extension.
// Combinational. Given the word read from memory (mem) and the register
// operand (src), returns the word to store back for AMOSWAP, AMOADD,
// AMOXOR, AMOAND, AMOOR, AMOMIN, AMOMAX, AMOMINU and AMOMAXU (RV32A).
module amoalu
  import rv32x_pkg::*;
(
  input  amo_op_e     op,
  input  logic [31:0] mem,
  input  logic [31:0] src,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      AMO_SWAP: y = src;
      AMO_ADD:  y = mem + src;
      AMO_XOR:  y = mem ^ src;
      AMO_AND:  y = mem & src;
      AMO_OR:   y = mem | src;
      AMO_MIN:  y = ($signed(mem) < $signed(src)) ? mem : src;
      AMO_MAX:  y = ($signed(mem) > $signed(src)) ? mem : src;
      AMO_MINU: y = (mem < src) ? mem : src;
      AMO_MAXU: y = (mem > src) ? mem : src;
      default:  y = src;
    endcase
  end
endmodule
