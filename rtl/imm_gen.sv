// imm_gen: immediate generator of the Decode stage.
// Combinational. Selects and sign-extends the immediate of an RV32
// instruction from its major opcode (I, S, B, U and J formats; the CSR
// immediate form uses the zero-extended rs1 field and is produced in the
// core). AMO instructions get 0, so that their address is rs1 alone. Formats follow the RISC-V base ISA.
module imm_gen (
  input  logic [31:0] inst,
  output logic [31:0] imm
);
  logic [6:0] opc;
  assign opc = inst[6:0];
  always_comb begin
    unique case (opc)
      7'b0100011: imm = {{21{inst[31]}}, inst[30:25], inst[11:7]};                         // S
      7'b1100011: imm = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};          // B
      7'b0110111,
      7'b0010111: imm = {inst[31:12], 12'd0};                                             // U
      7'b1101111: imm = {{12{inst[31]}}, inst[19:12], inst[20], inst[30:21], 1'b0};       // J
      7'b0101111: imm = 32'd0;                                                            // AMO: rs1 only
      default:    imm = {{21{inst[31]}}, inst[30:20]};                                    // I
    endcase
  end
endmodule
