// tb_imm_gen: checks imm_gen on hand-encoded instructions of every format
// (values from the RISC-V instruction encoding, worked out by hand), then
// on random S-, I- and B-type encodings against the field layout.
module tb_imm_gen;
  int checks = 0, failures = 0;
  logic [31:0] inst, imm;
  imm_gen dut (.inst, .imm);
  task automatic t(input logic [31:0] i, input logic [31:0] e, input string n);
    inst = i; #1; checks++;
    if (imm !== e) begin failures++; $display("FAIL %s: %h exp %h", n, imm, e); end
  endtask
  initial begin
    repeat (100000) #1;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    t(32'hffc58513, 32'hfffffffc, "addi a0,a1,-4");
    t(32'h7ff00093, 32'h000007ff, "addi x1,x0,2047");
    t(32'hfea42e23, 32'hfffffffc, "sw a0,-4(s0)");
    t(32'h02a42023, 32'h00000020, "sw a0,32(s0)");
    t(32'hfe0508e3, 32'hfffffff0, "beqz a0,-16");
    t(32'h00b50463, 32'h00000008, "beq a0,a1,8");
    t(32'h123452b7, 32'h12345000, "lui t0,0x12345");
    t(32'hfffff297, 32'hfffff000, "auipc t0,0xfffff");
    t(32'h008000ef, 32'h00000008, "jal ra,8");
    t(32'hffdff06f, 32'hfffffffc, "j -4");
    t(32'h80000537, 32'h80000000, "lui a0,0x80000");
    t(32'h00b5262f, 32'h00000000, "amoadd.w");
    t(32'h00a422a3, 32'h00000005, "sw a0,5(s0)");
    // random S-type and I-type encodings against the field layout of the ISA
    for (int k = 0; k < 500; k++) begin
      logic [31:0] r;
      r = $urandom;
      t({r[31:7], 7'b0100011}, {{20{r[31]}}, r[31:25], r[11:7]}, "random S");
      t({r[31:7], 7'b0010011}, {{20{r[31]}}, r[31:20]}, "random I");
      t({r[31:7], 7'b1100011}, {{19{r[31]}}, r[31], r[7], r[30:25], r[11:8], 1'b0}, "random B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
