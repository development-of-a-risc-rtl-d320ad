// inst_dec: instruction decoder of the Decode stage.
// Combinational. Turns a 32-bit RV32IMA/Zicsr/Zifencei instruction (plus
// the privileged MRET, SRET, WFI and SFENCE.VMA) into the control bundle
// ctrl_t that travels down the pipeline: ALU operation and operand
// selection, branch/jump kind, multiply/divide operation, memory access
// kind (load, store, AMO, LR, SC), CSR access and system operation.
// Anything else is flagged illegal (valid_op = 0); the illegal-instruction
// trap is raised later, in the Memory stage. Privilege checks on MRET/SRET
// and CSR accesses are made in the CSR file, not here.
module inst_dec
  import rv32x_pkg::*;
(
  input  logic [31:0] inst,
  output ctrl_t       c
);
  logic [6:0] opc, f7;
  logic [2:0] f3;
  logic [4:0] rd, rs1, rs2, f5;
  assign opc = inst[6:0];
  assign f3  = inst[14:12];
  assign f7  = inst[31:25];
  assign f5  = inst[31:27];
  assign rd  = inst[11:7];
  assign rs1 = inst[19:15];
  assign rs2 = inst[24:20];

  always_comb begin
    c = '0;
    c.alu_op = ALU_ADD;
    c.md_op  = MD_MUL;
    c.mem    = MEM_NONE;
    c.amo_op = AMO_SWAP;
    c.sys    = SYS_NONE;
    c.funct3 = f3;
    unique case (opc)
      7'b0110111: begin // LUI
        c.valid_op = 1'b1; c.rd_we = 1'b1; c.alu_op = ALU_PASSB; c.alu_b_imm = 1'b1;
      end
      7'b0010111: begin // AUIPC
        c.valid_op = 1'b1; c.rd_we = 1'b1; c.alu_a_pc = 1'b1; c.alu_b_imm = 1'b1;
      end
      7'b1101111: begin // JAL
        c.valid_op = 1'b1; c.rd_we = 1'b1; c.is_jal = 1'b1;
      end
      7'b1100111: begin // JALR
        c.valid_op = (f3 == 3'b000); c.rd_we = 1'b1; c.is_jalr = 1'b1; c.rs1_used = 1'b1;
      end
      7'b1100011: begin // branches
        c.valid_op = (f3 != 3'b010) && (f3 != 3'b011);
        c.is_branch = 1'b1; c.rs1_used = 1'b1; c.rs2_used = 1'b1;
      end
      7'b0000011: begin // loads
        c.valid_op = (f3 == 3'b000) || (f3 == 3'b001) || (f3 == 3'b010) ||
                     (f3 == 3'b100) || (f3 == 3'b101);
        c.rd_we = 1'b1; c.rs1_used = 1'b1; c.alu_b_imm = 1'b1; c.mem = MEM_LOAD;
      end
      7'b0100011: begin // stores
        c.valid_op = (f3 == 3'b000) || (f3 == 3'b001) || (f3 == 3'b010);
        c.rs1_used = 1'b1; c.rs2_used = 1'b1; c.alu_b_imm = 1'b1; c.mem = MEM_STORE;
      end
      7'b0010011: begin // OP-IMM
        c.valid_op = 1'b1; c.rd_we = 1'b1; c.rs1_used = 1'b1; c.alu_b_imm = 1'b1;
        unique case (f3)
          3'b000: c.alu_op = ALU_ADD;
          3'b010: c.alu_op = ALU_SLT;
          3'b011: c.alu_op = ALU_SLTU;
          3'b100: c.alu_op = ALU_XOR;
          3'b110: c.alu_op = ALU_OR;
          3'b111: c.alu_op = ALU_AND;
          3'b001: begin c.alu_op = ALU_SLL; c.valid_op = (f7 == 7'b0000000); end
          3'b101: begin
            c.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
            c.valid_op = (f7 == 7'b0000000) || (f7 == 7'b0100000);
          end
          default: ;
        endcase
      end
      7'b0110011: begin // OP
        c.rd_we = 1'b1; c.rs1_used = 1'b1; c.rs2_used = 1'b1;
        if (f7 == 7'b0000001) begin
          c.valid_op = 1'b1; c.is_md = 1'b1; c.md_op = md_op_e'(f3);
        end else begin
          c.valid_op = (f7 == 7'b0000000) || (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101));
          unique case (f3)
            3'b000: c.alu_op = f7[5] ? ALU_SUB : ALU_ADD;
            3'b001: c.alu_op = ALU_SLL;
            3'b010: c.alu_op = ALU_SLT;
            3'b011: c.alu_op = ALU_SLTU;
            3'b100: c.alu_op = ALU_XOR;
            3'b101: c.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
            3'b110: c.alu_op = ALU_OR;
            3'b111: c.alu_op = ALU_AND;
            default: ;
          endcase
        end
      end
      7'b0001111: begin // FENCE / FENCE.I
        c.valid_op = (f3 == 3'b000) || (f3 == 3'b001);
        c.is_fence = (f3 == 3'b000);
        if (f3 == 3'b001) c.sys = SYS_FENCEI;
      end
      7'b0101111: begin // AMO (word only)
        c.valid_op = (f3 == 3'b010); c.rd_we = 1'b1; c.rs1_used = 1'b1; c.rs2_used = 1'b1;
        c.alu_op = ALU_ADD; c.alu_b_imm = 1'b1; // address = rs1 + 0
        unique case (f5)
          5'b00010: begin c.mem = MEM_LR; c.rs2_used = 1'b0; c.valid_op = (f3 == 3'b010) && (rs2 == 5'd0); end
          5'b00011: c.mem = MEM_SC;
          5'b00001: begin c.mem = MEM_AMO; c.amo_op = AMO_SWAP; end
          5'b00000: begin c.mem = MEM_AMO; c.amo_op = AMO_ADD;  end
          5'b00100: begin c.mem = MEM_AMO; c.amo_op = AMO_XOR;  end
          5'b01100: begin c.mem = MEM_AMO; c.amo_op = AMO_AND;  end
          5'b01000: begin c.mem = MEM_AMO; c.amo_op = AMO_OR;   end
          5'b10000: begin c.mem = MEM_AMO; c.amo_op = AMO_MIN;  end
          5'b10100: begin c.mem = MEM_AMO; c.amo_op = AMO_MAX;  end
          5'b11000: begin c.mem = MEM_AMO; c.amo_op = AMO_MINU; end
          5'b11100: begin c.mem = MEM_AMO; c.amo_op = AMO_MAXU; end
          default:  c.valid_op = 1'b0;
        endcase
      end
      7'b1110011: begin // SYSTEM
        if (f3 == 3'b000) begin
          if (inst == 32'h00000073)      begin c.valid_op = 1'b1; c.sys = SYS_ECALL;  end
          else if (inst == 32'h00100073) begin c.valid_op = 1'b1; c.sys = SYS_EBREAK; end
          else if (inst == 32'h30200073) begin c.valid_op = 1'b1; c.sys = SYS_MRET;   end
          else if (inst == 32'h10200073) begin c.valid_op = 1'b1; c.sys = SYS_SRET;   end
          else if (inst == 32'h10500073) begin c.valid_op = 1'b1; c.sys = SYS_WFI;    end
          else if (f7 == 7'b0001001 && rd == 5'd0) begin
            c.valid_op = 1'b1; c.sys = SYS_SFENCE; c.rs1_used = 1'b1; c.rs2_used = 1'b1;
          end
        end else if (f3 != 3'b100) begin
          c.valid_op = 1'b1; c.is_csr = 1'b1; c.rd_we = 1'b1;
          c.rs1_used = ~f3[2];
        end
      end
      default: ;
    endcase
  end
endmodule
