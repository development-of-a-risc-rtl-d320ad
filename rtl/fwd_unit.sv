// fwd_unit: read-after-write bypass selection for the Execute stage.
// Combinational. For each source operand of the instruction in Execute it
// compares the source register with the destination of the instruction in
// Memory (newest) and in Writeback, and selects the newest producer. The
// Memory-stage value is the ALU result; a load or CSR result is not yet
// known there, which the core handles as a one-cycle load hazard stall.
// sel encoding: 0 = register file value, 1 = Memory stage, 2 = Writeback.
module fwd_unit (
  input  logic [4:0] ex_rs1,
  input  logic [4:0] ex_rs2,
  input  logic       mem_we,
  input  logic [4:0] mem_rd,
  input  logic       wb_we,
  input  logic [4:0] wb_rd,
  output logic [1:0] sel1,
  output logic [1:0] sel2
);
  function automatic logic [1:0] pick(input logic [4:0] rs);
    if (rs != 5'd0 && mem_we && mem_rd == rs)     return 2'd1;
    else if (rs != 5'd0 && wb_we && wb_rd == rs)  return 2'd2;
    else                                          return 2'd0;
  endfunction
  assign sel1 = pick(ex_rs1);
  assign sel2 = pick(ex_rs2);
endmodule
