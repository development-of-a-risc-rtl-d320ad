// tb_inst_dec: decodes hand-encoded instructions of every class and checks
// the fields of the control bundle that define each class, plus illegal
// encodings.
module tb_inst_dec;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] inst; ctrl_t c;
  inst_dec dut (.inst, .c);
  task automatic chk(input string n, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", n); end
  endtask
  initial begin
    repeat (1000) #1;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    inst = 32'h00b50633; #1; chk("add", c.valid_op && c.alu_op == ALU_ADD && c.rd_we && c.rs1_used && c.rs2_used && !c.alu_b_imm);
    inst = 32'h40b50633; #1; chk("sub", c.valid_op && c.alu_op == ALU_SUB);
    inst = 32'h40b55633; #1; chk("sra", c.valid_op && c.alu_op == ALU_SRA);
    inst = 32'h4055d613; #1; chk("srai", c.valid_op && c.alu_op == ALU_SRA && c.alu_b_imm);
    inst = 32'h00a5a613; #1; chk("slti", c.valid_op && c.alu_op == ALU_SLT && c.alu_b_imm);
    inst = 32'h00a5b613; #1; chk("sltiu", c.valid_op && c.alu_op == ALU_SLTU && c.alu_b_imm);
    inst = 32'h00b53633; #1; chk("sltu", c.valid_op && c.alu_op == ALU_SLTU && !c.alu_b_imm);
    inst = 32'h123452b7; #1; chk("lui", c.valid_op && c.alu_op == ALU_PASSB && c.alu_b_imm && !c.rs1_used);
    inst = 32'h00000297; #1; chk("auipc", c.valid_op && c.alu_a_pc && c.alu_b_imm);
    inst = 32'h008000ef; #1; chk("jal", c.valid_op && c.is_jal && c.rd_we);
    inst = 32'h000280e7; #1; chk("jalr", c.valid_op && c.is_jalr && c.rs1_used);
    inst = 32'h00b50463; #1; chk("beq", c.valid_op && c.is_branch && !c.rd_we && c.funct3 == 3'b000);
    inst = 32'h00b57463; #1; chk("bgeu", c.valid_op && c.is_branch && c.funct3 == 3'b111);
    inst = 32'h0045a503; #1; chk("lw", c.valid_op && c.mem == MEM_LOAD && c.rd_we && c.funct3 == 3'b010);
    inst = 32'h0045c503; #1; chk("lbu", c.valid_op && c.mem == MEM_LOAD && c.funct3 == 3'b100);
    inst = 32'h00a5a223; #1; chk("sw", c.valid_op && c.mem == MEM_STORE && !c.rd_we && c.rs2_used);
    inst = 32'h02b50633; #1; chk("mul", c.valid_op && c.is_md && c.md_op == MD_MUL);
    inst = 32'h02b57633; #1; chk("remu", c.valid_op && c.is_md && c.md_op == MD_REMU);
    inst = 32'h00b5262f; #1; chk("amoadd", c.valid_op && c.mem == MEM_AMO && c.amo_op == AMO_ADD && c.alu_b_imm);
    inst = 32'h08b5262f; #1; chk("amoswap", c.valid_op && c.mem == MEM_AMO && c.amo_op == AMO_SWAP);
    inst = 32'he0b5262f; #1; chk("amomaxu", c.valid_op && c.mem == MEM_AMO && c.amo_op == AMO_MAXU);
    inst = 32'h1005262f; #1; chk("lr.w", c.valid_op && c.mem == MEM_LR && !c.rs2_used);
    inst = 32'h18b5262f; #1; chk("sc.w", c.valid_op && c.mem == MEM_SC && c.rs2_used);
    inst = 32'h00b5362f; #1; chk("amo.d illegal", !c.valid_op);
    inst = 32'h00000073; #1; chk("ecall", c.valid_op && c.sys == SYS_ECALL);
    inst = 32'h00100073; #1; chk("ebreak", c.valid_op && c.sys == SYS_EBREAK);
    inst = 32'h30200073; #1; chk("mret", c.valid_op && c.sys == SYS_MRET);
    inst = 32'h10200073; #1; chk("sret", c.valid_op && c.sys == SYS_SRET);
    inst = 32'h10500073; #1; chk("wfi", c.valid_op && c.sys == SYS_WFI);
    inst = 32'h12000073; #1; chk("sfence.vma", c.valid_op && c.sys == SYS_SFENCE);
    inst = 32'h0000100f; #1; chk("fence.i", c.valid_op && c.sys == SYS_FENCEI);
    inst = 32'h0ff0000f; #1; chk("fence", c.valid_op && c.is_fence);
    inst = 32'h30529073; #1; chk("csrw mtvec", c.valid_op && c.is_csr && c.rs1_used && c.funct3 == 3'b001);
    inst = 32'h30046073; #1; chk("csrsi", c.valid_op && c.is_csr && !c.rs1_used);
    inst = 32'hffffffff; #1; chk("all ones illegal", !c.valid_op);
    inst = 32'h00000000; #1; chk("zero illegal", !c.valid_op);
    inst = 32'h02b50653; #1; chk("fp op illegal", !c.valid_op);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
