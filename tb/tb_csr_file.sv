// tb_csr_file: CSR read/write/set/clear semantics, read-only and privilege
// violations, trap entry to M-mode and (delegated) to S-mode with the
// mstatus/sstatus stacks, MRET and SRET privilege changes, interrupt
// enabling, delegation and priority, vectored mtvec, and that a machine
// trap right after a supervisor trap keeps sepc/scause intact.
// Expected values follow the RISC-V privileged specification.
module tb_csr_file;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [11:0] addr; logic [2:0] f3; logic [31:0] src, rdata, ttgt, xtgt;
  logic src_zero, illegal, commit = 0, trap = 0, tirq = 0, xret = 0, xs = 0, xill, ipend;
  logic [4:0] tcause, icause; logic [31:0] tpc, ttval;
  logic msip = 0, mtip = 0, meip = 0, seip = 0;
  priv_e priv, mpp; logic smode, mprv, sum, mxr, tvm, tsr; logic [21:0] sppn;
  csr_file dut (.clk, .rst_n, .csr_addr(addr), .csr_f3(f3), .csr_src(src), .csr_src_zero(src_zero),
    .csr_rdata(rdata), .csr_illegal(illegal), .csr_commit(commit), .trap, .trap_irq(tirq),
    .trap_cause(tcause), .trap_pc(tpc), .trap_tval(ttval), .trap_target(ttgt), .xret, .xret_s(xs),
    .xret_target(xtgt), .xret_illegal(xill), .instret_inc(1'b0), .msip, .mtip, .meip, .seip,
    .mtime(64'h1234_5678_9abc_def0), .irq_pending(ipend), .irq_cause(icause), .priv,
    .satp_mode(smode), .satp_ppn(sppn), .st_mprv(mprv), .st_mpp(mpp), .st_sum(sum), .st_mxr(mxr),
    .st_tvm(tvm), .st_tsr(tsr));

  task automatic chk(string n, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", n); end endtask
  task automatic csr(logic [11:0] a, logic [2:0] f, logic [31:0] s, output logic [31:0] old);
    @(negedge clk); addr = a; f3 = f; src = s; src_zero = (s == 0); #1; old = rdata;
    commit = !illegal; @(negedge clk); commit = 0;
  endtask
  task automatic rd(logic [11:0] a, output logic [31:0] v);
    @(negedge clk); addr = a; f3 = 3'b010; src = 0; src_zero = 1; #1; v = rdata;
  endtask
  task automatic take(logic irq, logic [4:0] c, logic [31:0] pc, logic [31:0] tv, output logic [31:0] tg);
    @(negedge clk); tirq = irq; tcause = c; tpc = pc; ttval = tv; #1; tg = ttgt; trap = 1;
    @(negedge clk); trap = 0; tirq = 0;
  endtask
  task automatic ret(logic s, output logic [31:0] tg);
    @(negedge clk); xs = s; #1; tg = xtgt; xret = 1; @(negedge clk); xret = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] v, t;
    addr = 0; f3 = 0; src = 0; src_zero = 1; tcause = 0; tpc = 0; ttval = 0;
    #12 rst_n = 1;
    chk("reset M", priv == PRV_M);
    rd(CSR_MISA, v); chk("misa", v == 32'h4014_1101);
    rd(CSR_TIMEH, v); chk("timeh", v == 32'h1234_5678);
    csr(CSR_MSCRATCH, 3'b001, 32'hcafe0000, v);
    csr(CSR_MSCRATCH, 3'b010, 32'h0000_00ff, v); chk("csrrw/old", v == 32'hcafe0000);
    csr(CSR_MSCRATCH, 3'b011, 32'h0000_000f, v); chk("csrrs old", v == 32'hcafe00ff);
    rd(CSR_MSCRATCH, v); chk("csrrc", v == 32'hcafe00f0);
    @(negedge clk); addr = CSR_MHARTID; f3 = 3'b001; src = 1; src_zero = 0; #1; chk("write RO illegal", illegal);
    @(negedge clk); addr = 12'h7c0; f3 = 3'b010; src = 0; src_zero = 1; #1; chk("unknown illegal", illegal);
    csr(CSR_MTVEC, 3'b001, 32'h8000_1001, v);           // vectored
    csr(CSR_STVEC, 3'b001, 32'h8000_2000, v);
    csr(CSR_MEDELEG, 3'b001, 32'h0000_0100, v);         // delegate ecall from U
    csr(CSR_MIDELEG, 3'b001, 32'h0000_0222, v);
    // enter U via mret with MPP = U
    csr(CSR_MEPC, 3'b001, 32'h8000_0400, v);
    ret(0, t); chk("mret target", t == 32'h8000_0400); chk("to U", priv == PRV_U);
    // ecall from U is delegated to S
    take(0, 5'd8, 32'h8000_0404, 0, t); chk("deleg target", t == 32'h8000_2000); chk("in S", priv == PRV_S);
    @(negedge clk); addr = CSR_MSTATUS; f3 = 3'b010; src = 0; src_zero = 1; #1; chk("S cannot read mstatus", illegal);
    rd(CSR_SCAUSE, v); chk("scause", v == 32'd8);
    rd(CSR_SEPC, v);   chk("sepc", v == 32'h8000_0404);
    // machine timer interrupt while in S with MIE = 0: taken (S < M)
    csr(CSR_SIE, 3'b001, 32'h0, v);
    mtip = 1; @(negedge clk); #1; chk("no mtip without mie", !ipend);
    @(negedge clk); xs = 0; #1; chk("mret illegal in S", xill);
    take(1, 5'd7, 32'h8000_2010, 0, t);
    chk("vectored target", t == 32'h8000_1000 + 4 * 7); chk("in M", priv == PRV_M);
    rd(CSR_MCAUSE, v); chk("mcause irq", v == 32'h8000_0007);
    rd(CSR_SEPC, v);   chk("sepc kept", v == 32'h8000_0404);
    rd(CSR_SCAUSE, v); chk("scause kept", v == 32'd8);
    rd(CSR_MSTATUS, v); chk("MPP = S", v[12:11] == 2'b01);
    // interrupt enables in M
    mtip = 0;
    csr(CSR_MIE, 3'b001, 32'h0000_0888, v);
    msip = 1; mtip = 1; meip = 1; @(negedge clk); #1; chk("MIE=0 masks in M", !ipend);
    csr(CSR_MSTATUS, 3'b010, 32'h8, v);
    @(negedge clk); #1; chk("MEI has priority", ipend && icause == 5'd11);
    meip = 0; @(negedge clk); #1; chk("MSI next", ipend && icause == 5'd3);
    msip = 0; @(negedge clk); #1; chk("MTI next", ipend && icause == 5'd7);
    mtip = 0; seip = 1; @(negedge clk); #1; chk("delegated SEI not taken in M", !ipend);
    csr(CSR_MSTATUS, 3'b011, 32'h8, v);                 // MIE off
    // mret back to S, then SEI with SIE enabled in sie
    ret(0, t); chk("back to S", priv == PRV_S);
    csr(CSR_SIE, 3'b001, 32'h200, v);
    @(negedge clk); #1; chk("SEI pending in S needs SIE", !ipend);
    csr(CSR_SSTATUS, 3'b010, 32'h2, v);
    @(negedge clk); #1; chk("SEI taken in S", ipend && icause == 5'd9);
    take(1, 5'd9, 32'h8000_0500, 0, t); chk("S irq target (direct)", t == 32'h8000_2000 && priv == PRV_S);
    rd(CSR_SSTATUS, v); chk("SIE cleared, SPIE set, SPP=S", v[1] == 0 && v[5] == 1 && v[8] == 1);
    seip = 0;
    ret(1, t); chk("sret target", t == 32'h8000_0500); chk("sret to S", priv == PRV_S);
    rd(CSR_SSTATUS, v); chk("SIE restored", v[1] == 1);
    csr(CSR_SATP, 3'b001, 32'h8008_0010, v); chk("satp", smode && sppn == 22'h80010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
