// rv32x_core: the RV32IMA processor core (with Zicsr, Zifencei, M/S/U
// privilege modes and Sv32 virtual memory), built as an in-order five-stage
// pipeline: Ifetch, Decode, Execute, Memory, Writeback.
//
// Ifetch   translates the PC through a 4-entry instruction TLB, reads the
//          4 KiB direct-mapped instruction cache and predicts the next PC
//          with the 32-entry BTB and its 2-bit counters. A cache or TLB miss
//          holds the PC and sends bubbles down.
// Decode   decodes, generates the immediate and reads the register file. A
//          source that depends on a load, AMO or CSR instruction in Execute
//          stalls Decode for one cycle (the result exists only after Memory).
// Execute  runs the ALU, resolves branches and jumps, updates the BTB and
//          redirects the PC on a misprediction (flushing Ifetch/Decode).
//          Operands come through the forwarding unit from Memory or
//          Writeback. MUL/DIV run in the multi-cycle unit, stalling Execute.
// Memory   does loads, stores, AMOs and LR/SC (load_store_unit, data TLB,
//          4 KiB 2-way data cache), CSR instructions, and takes all traps:
//          exceptions found in any stage travel with their instruction and
//          are taken here, interrupts are taken on the instruction here
//          before it has any effect. A trap, MRET/SRET, FENCE.I, SFENCE.VMA
//          and every CSR instruction flush the younger stages and restart
//          fetch, so a change of privilege, translation or status is seen by
//          the next instruction.
// Writeback writes the register file.
//
// The page walker is shared by both TLBs and the data side has priority.
// Caches and walker share one memory bus through a fixed-priority arbiter.
// The stage split, hazard list and structure sizes follow the document;
// the stall/flush scheme, the taking of traps in Memory and the memory bus
// are this design's choices.
//
// Interface: bus_req/bus_rsp is the single memory master port (see
// rv32x_pkg); msip/mtip come from the CLINT, meip/seip from the PLIC;
// mtime feeds the time CSR. Execution starts at RESET_PC in machine mode.
module rv32x_core
  import rv32x_pkg::*;
#(
  parameter logic [31:0] RESET_PC     = 32'h0000_0000,
  parameter int unsigned ITLB_ENTRIES = 4,
  parameter int unsigned DTLB_ENTRIES = 32,
  parameter int unsigned BTB_ENTRIES  = 32,
  parameter int unsigned IC_BYTES     = 4096,
  parameter int unsigned DC_BYTES     = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  output bus_req_t    bus_req,
  input  bus_rsp_t    bus_rsp,
  input  logic        msip,
  input  logic        mtip,
  input  logic        meip,
  input  logic        seip,
  input  logic [63:0] mtime
);
  // ------------------------------------------------------------------
  // pipeline registers
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] inst;
    logic        pred_taken;
    logic [31:0] pred_target;
    logic        exc;
    logic [4:0]  cause;
  } ifid_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] inst;
    ctrl_t       c;
    logic [31:0] imm;
    logic [31:0] rs1v;
    logic [31:0] rs2v;
    logic        pred_taken;
    logic [31:0] pred_target;
    logic        exc;
    logic [4:0]  cause;
    logic [31:0] tval;
  } idex_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] inst;
    ctrl_t       c;
    logic [31:0] res;     // ALU result, link address or memory address
    logic [31:0] rs1v;
    logic [31:0] rs2v;
    logic        exc;
    logic [4:0]  cause;
    logic [31:0] tval;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        we;
    logic [4:0]  rd;
    logic [31:0] data;
  } memwb_t;

  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;
  logic [31:0] pc_q;

  // ------------------------------------------------------------------
  // CSR file / privilege state
  priv_e       priv, st_mpp;
  logic        satp_mode, st_mprv, st_sum, st_mxr, st_tvm, st_tsr;
  logic [21:0] satp_ppn;
  logic [31:0] csr_rdata, trap_target, xret_target;
  logic        csr_illegal, xret_illegal, irq_pending;
  logic [4:0]  irq_cause;
  logic        trap, trap_irq;
  logic [4:0]  trap_cause;
  logic [31:0] trap_tval;
  logic        csr_commit, xret_commit;

  priv_e eff_dpriv;
  logic  paging_i, paging_d;
  assign eff_dpriv = (st_mprv && priv == PRV_M) ? st_mpp : priv;
  assign paging_i  = satp_mode && priv != PRV_M;
  assign paging_d  = satp_mode && eff_dpriv != PRV_M;

  // ------------------------------------------------------------------
  // memory masters: 0 page walker, 1 data cache, 2 instruction cache
  bus_req_t m_req [3];
  bus_rsp_t m_rsp [3];
  mem_arbiter #(.N(3)) u_arb (.clk, .rst_n, .m_req, .m_rsp, .s_req(bus_req), .s_rsp(bus_rsp));

  // shared page walker
  logic        i_ptw_req, d_ptw_req, ptw_done, ptw_fault, ptw_active, ptw_own_d, ptw_sel_d;
  tlb_entry_t  ptw_entry;
  logic [31:0] d_vaddr;
  assign ptw_sel_d = ptw_active ? ptw_own_d : d_ptw_req;
  ptw u_ptw (
    .clk, .rst_n, .req(i_ptw_req || d_ptw_req), .va(ptw_sel_d ? d_vaddr : pc_q),
    .satp_ppn, .done(ptw_done), .fault(ptw_fault), .entry(ptw_entry),
    .bus_req(m_req[0]), .bus_rsp(m_rsp[0])
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptw_active <= 1'b0; ptw_own_d <= 1'b0;
    end else if (!ptw_active && (i_ptw_req || d_ptw_req)) begin
      ptw_active <= 1'b1; ptw_own_d <= d_ptw_req;
    end else if (ptw_done) begin
      ptw_active <= 1'b0;
    end
  end

  // ------------------------------------------------------------------
  // control signals computed below
  logic stall_mem, stall_ex, stall_id, if_ready;
  logic redir_mem, redir_ex;
  logic [31:0] redir_mem_pc, redir_ex_pc;
  logic tlb_flush, ic_inval;

  // ================== IFETCH ==================
  logic        it_hit;
  logic [33:0] it_pa;
  logic [5:0]  it_perm;
  tlb #(.ENTRIES(ITLB_ENTRIES)) u_itlb (
    .clk, .rst_n, .va(pc_q), .hit(it_hit), .pa(it_pa), .perm(it_perm),
    .fill(ptw_done && !ptw_fault && !ptw_own_d), .fill_entry(ptw_entry), .flush(tlb_flush)
  );

  logic        if_fault_q;
  logic [19:0] if_fault_page;
  logic        i_perm_ok, i_fault;
  assign i_perm_ok = it_perm[4] && it_perm[2] && ((priv == PRV_U) ? it_perm[3] : !it_perm[3]);
  assign i_fault   = paging_i && ((it_hit && !i_perm_ok) ||
                                  (!it_hit && if_fault_q && if_fault_page == pc_q[31:12]));
  assign i_ptw_req = paging_i && !it_hit && !(if_fault_q && if_fault_page == pc_q[31:12]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if_fault_q <= 1'b0; if_fault_page <= '0;
    end else if (ptw_done && !ptw_own_d) begin
      if_fault_q <= ptw_fault; if_fault_page <= pc_q[31:12];
    end else if (tlb_flush) begin
      if_fault_q <= 1'b0;
    end
  end

  logic        ic_done;
  logic [31:0] ic_rdata;
  cache #(.SIZE_BYTES(IC_BYTES), .WAYS(1), .LINE_BYTES(16)) u_icache (
    .clk, .rst_n,
    .c_req(!i_fault && (!paging_i || it_hit)), .c_we(1'b0), .c_uncached(1'b0),
    .c_addr(paging_i ? it_pa[31:0] : pc_q), .c_wdata('0), .c_wstrb('0),
    .c_done(ic_done), .c_rdata(ic_rdata), .inval(ic_inval),
    .bus_req(m_req[2]), .bus_rsp(m_rsp[2])
  );
  assign if_ready = ic_done || i_fault;

  logic        bp_taken, bu_valid, bu_taken;
  logic [31:0] bp_target, bu_target;
  btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n, .f_pc(pc_q), .f_taken(bp_taken), .f_target(bp_target),
    .u_valid(bu_valid), .u_pc(idex.pc), .u_taken(bu_taken), .u_target(bu_target)
  );

  // ================== DECODE ==================
  ctrl_t       id_c;
  logic [31:0] id_imm, id_rs1v, id_rs2v;
  logic [4:0]  id_rs1, id_rs2;
  assign id_rs1 = ifid.inst[19:15];
  assign id_rs2 = ifid.inst[24:20];
  inst_dec u_dec (.inst(ifid.inst), .c(id_c));
  imm_gen  u_imm (.inst(ifid.inst), .imm(id_imm));
  reg32    u_rf  (.clk, .rst_n, .ra1(id_rs1), .ra2(id_rs2), .rd1(id_rs1v), .rd2(id_rs2v),
                  .we(memwb.valid && memwb.we), .wa(memwb.rd), .wd(memwb.data));

  logic ex_late;  // Execute holds an instruction whose result appears in Memory
  assign ex_late = idex.valid && idex.c.rd_we && (idex.c.mem != MEM_NONE || idex.c.is_csr);
  assign stall_id = ifid.valid && ex_late && idex.inst[11:7] != 5'd0 &&
                    ((id_c.rs1_used && id_rs1 == idex.inst[11:7]) ||
                     (id_c.rs2_used && id_rs2 == idex.inst[11:7]));

  // ================== EXECUTE ==================
  logic [1:0]  fsel1, fsel2;
  logic [31:0] op1, op2, alu_a, alu_b, alu_y;
  fwd_unit u_fwd (
    .ex_rs1(idex.inst[19:15]), .ex_rs2(idex.inst[24:20]),
    .mem_we(exmem.valid && exmem.c.rd_we), .mem_rd(exmem.inst[11:7]),
    .wb_we(memwb.valid && memwb.we), .wb_rd(memwb.rd), .sel1(fsel1), .sel2(fsel2)
  );
  always_comb begin
    unique case (fsel1)
      2'd1:    op1 = exmem.res;
      2'd2:    op1 = memwb.data;
      default: op1 = idex.rs1v;
    endcase
    unique case (fsel2)
      2'd1:    op2 = exmem.res;
      2'd2:    op2 = memwb.data;
      default: op2 = idex.rs2v;
    endcase
  end
  assign alu_a = idex.c.alu_a_pc ? idex.pc : op1;
  assign alu_b = idex.c.alu_b_imm ? idex.imm : op2;
  alu32 u_alu (.op(idex.c.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  logic md_ready;
  logic [31:0] md_result;
  munit32 u_md (
    .clk, .rst_n, .req(idex.valid && idex.c.is_md && !idex.exc), .op(idex.c.md_op),
    .a(op1), .b(op2), .ack(!stall_mem), .kill(redir_mem), .ready(md_ready), .result(md_result)
  );
  assign stall_ex = idex.valid && idex.c.is_md && !idex.exc && !md_ready;

  logic        br_cond, ex_taken;
  logic [31:0] ex_target, ex_link, ex_next;
  always_comb begin
    unique case (idex.c.funct3)
      3'b000:  br_cond = op1 == op2;
      3'b001:  br_cond = op1 != op2;
      3'b100:  br_cond = $signed(op1) < $signed(op2);
      3'b101:  br_cond = $signed(op1) >= $signed(op2);
      3'b110:  br_cond = op1 < op2;
      3'b111:  br_cond = op1 >= op2;
      default: br_cond = 1'b0;
    endcase
    ex_taken  = idex.c.is_jal || idex.c.is_jalr || (idex.c.is_branch && br_cond);
    ex_target = idex.c.is_jalr ? ((op1 + idex.imm) & ~32'd1) : (idex.pc + idex.imm);
    ex_link   = idex.pc + 32'd4;
    ex_next   = ex_taken ? ex_target : ex_link;
  end
  logic ex_is_cf, ex_mispredict, ex_tmisal, ex_go;
  assign ex_is_cf      = idex.c.is_branch || idex.c.is_jal || idex.c.is_jalr;
  assign ex_tmisal     = ex_taken && ex_target[1];
  assign ex_go         = idex.valid && !idex.exc && !stall_ex && !stall_mem && !redir_mem;
  assign ex_mispredict = ex_is_cf && !ex_tmisal &&
                         ((ex_taken != idex.pred_taken) || (ex_taken && ex_target != idex.pred_target));
  assign redir_ex    = ex_go && ex_mispredict;
  assign redir_ex_pc = ex_next;
  assign bu_valid    = ex_go && ex_is_cf && !ex_tmisal;
  assign bu_taken    = ex_taken;
  assign bu_target   = ex_target;

  // ================== MEMORY ==================
  logic lsu_req, lsu_done, lsu_exc, mem_started;
  logic [4:0]  lsu_cause, pre_cause;
  logic [31:0] lsu_rdata, pre_tval;
  logic        irq_take, pre_exc;

  assign d_vaddr = exmem.res;
  assign irq_take = exmem.valid && irq_pending && !mem_started;

  always_comb begin
    pre_exc   = exmem.exc;
    pre_cause = exmem.cause;
    pre_tval  = exmem.tval;
    if (!exmem.exc) begin
      if (exmem.c.is_csr && csr_illegal) begin
        pre_exc = 1'b1; pre_cause = EXC_ILLEGAL; pre_tval = exmem.inst;
      end else if ((exmem.c.sys == SYS_MRET || exmem.c.sys == SYS_SRET) && xret_illegal) begin
        pre_exc = 1'b1; pre_cause = EXC_ILLEGAL; pre_tval = exmem.inst;
      end else if (exmem.c.sys == SYS_SFENCE && priv == PRV_S && st_tvm) begin
        pre_exc = 1'b1; pre_cause = EXC_ILLEGAL; pre_tval = exmem.inst;
      end else if (exmem.c.sys == SYS_ECALL) begin
        pre_exc = 1'b1; pre_cause = EXC_ECALL_U + {3'd0, priv}; pre_tval = '0;
      end else if (exmem.c.sys == SYS_EBREAK) begin
        pre_exc = 1'b1; pre_cause = EXC_BREAK; pre_tval = exmem.pc;
      end
    end
  end

  assign lsu_req = exmem.valid && exmem.c.mem != MEM_NONE && !pre_exc && !irq_take;

  logic        dc_req, dc_we, dc_unc, dc_done;
  logic [31:0] dc_addr, dc_wdata, dc_rdata;
  logic [3:0]  dc_wstrb;
  load_store_unit #(.DTLB_ENTRIES(DTLB_ENTRIES)) u_lsu (
    .clk, .rst_n, .req(lsu_req), .kind(exmem.c.mem), .f3(exmem.c.funct3),
    .amo_op(exmem.c.amo_op), .vaddr(exmem.res), .wdata(exmem.rs2v),
    .paging(paging_d), .eff_priv(eff_dpriv), .sum(st_sum), .mxr(st_mxr),
    .tlb_flush, .clr_resv(trap),
    .done(lsu_done), .exc(lsu_exc), .exc_cause(lsu_cause), .rdata(lsu_rdata),
    .ptw_req(d_ptw_req), .ptw_done(ptw_done && ptw_own_d), .ptw_fault, .ptw_entry,
    .dc_req, .dc_we, .dc_uncached(dc_unc), .dc_addr, .dc_wdata, .dc_wstrb, .dc_done, .dc_rdata
  );
  cache #(.SIZE_BYTES(DC_BYTES), .WAYS(2), .LINE_BYTES(16)) u_dcache (
    .clk, .rst_n, .c_req(dc_req), .c_we(dc_we), .c_uncached(dc_unc), .c_addr(dc_addr),
    .c_wdata(dc_wdata), .c_wstrb(dc_wstrb), .c_done(dc_done), .c_rdata(dc_rdata),
    .inval(1'b0), .bus_req(m_req[1]), .bus_rsp(m_rsp[1])
  );

  assign stall_mem = lsu_req && !lsu_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         mem_started <= 1'b0;
    else if (stall_mem) mem_started <= 1'b1;
    else                mem_started <= 1'b0;
  end

  assign trap       = exmem.valid && !stall_mem && (irq_take || pre_exc || (lsu_req && lsu_exc));
  assign trap_irq   = irq_take;
  always_comb begin
    if (irq_take)     begin trap_cause = irq_cause; trap_tval = '0; end
    else if (pre_exc) begin trap_cause = pre_cause; trap_tval = pre_tval; end
    else              begin trap_cause = lsu_cause; trap_tval = exmem.res; end
  end

  logic mem_ok;  // instruction completes normally this cycle
  assign mem_ok      = exmem.valid && !stall_mem && !trap;
  assign csr_commit  = mem_ok && exmem.c.is_csr;
  assign xret_commit = mem_ok && (exmem.c.sys == SYS_MRET || exmem.c.sys == SYS_SRET);
  assign ic_inval    = mem_ok && exmem.c.sys == SYS_FENCEI;
  assign tlb_flush   = (mem_ok && exmem.c.sys == SYS_SFENCE) ||
                       (csr_commit && exmem.inst[31:20] == CSR_SATP);

  assign redir_mem = trap || (mem_ok && (exmem.c.is_csr || exmem.c.sys != SYS_NONE));
  always_comb begin
    if (trap)             redir_mem_pc = trap_target;
    else if (xret_commit) redir_mem_pc = xret_target;
    else                  redir_mem_pc = exmem.pc + 32'd4;
  end

  csr_file u_csr (
    .clk, .rst_n,
    .csr_addr(exmem.inst[31:20]), .csr_f3(exmem.c.funct3),
    .csr_src(exmem.c.funct3[2] ? {27'd0, exmem.inst[19:15]} : exmem.rs1v),
    .csr_src_zero(exmem.inst[19:15] == 5'd0),
    .csr_rdata, .csr_illegal, .csr_commit,
    .trap, .trap_irq, .trap_cause, .trap_pc(exmem.pc), .trap_tval, .trap_target,
    .xret(xret_commit), .xret_s(exmem.c.sys == SYS_SRET), .xret_target, .xret_illegal,
    .instret_inc(mem_ok),
    .msip, .mtip, .meip, .seip, .mtime, .irq_pending, .irq_cause,
    .priv, .satp_mode, .satp_ppn, .st_mprv, .st_mpp, .st_sum, .st_mxr, .st_tvm, .st_tsr
  );

  logic [31:0] mem_result;
  always_comb begin
    if (exmem.c.mem != MEM_NONE) mem_result = lsu_rdata;
    else if (exmem.c.is_csr)     mem_result = csr_rdata;
    else                         mem_result = exmem.res;
  end

  // ================== pipeline register update ==================
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= RESET_PC;
      ifid  <= '0;
      idex  <= '0;
      exmem <= '0;
      memwb <= '0;
    end else begin
      // ---- Writeback register
      memwb.valid <= mem_ok;
      memwb.we    <= exmem.c.rd_we && exmem.inst[11:7] != 5'd0;
      memwb.rd    <= exmem.inst[11:7];
      memwb.data  <= mem_result;

      // ---- Memory register
      if (redir_mem) begin
        exmem.valid <= 1'b0;
      end else if (!stall_mem) begin
        if (stall_ex || !idex.valid) begin
          exmem.valid <= 1'b0;
        end else begin
          exmem.valid <= 1'b1;
          exmem.pc    <= idex.pc;
          exmem.inst  <= idex.inst;
          exmem.c     <= idex.c;
          exmem.res   <= idex.c.is_md ? md_result :
                         (idex.c.is_jal || idex.c.is_jalr) ? ex_link : alu_y;
          exmem.rs1v  <= op1;
          exmem.rs2v  <= op2;
          exmem.exc   <= idex.exc || ex_tmisal;
          exmem.cause <= idex.exc ? idex.cause : EXC_IMISALIGN;
          exmem.tval  <= idex.exc ? idex.tval : ex_target;
        end
      end

      // ---- Execute register
      if (redir_mem || (redir_ex)) begin
        idex.valid <= 1'b0;
      end else if (stall_mem || stall_ex) begin
        // hold, but keep operands current as producers retire
        idex.rs1v <= op1;
        idex.rs2v <= op2;
      end else if (stall_id || !ifid.valid) begin
        idex.valid <= 1'b0;
      end else begin
        idex.valid       <= 1'b1;
        idex.pc          <= ifid.pc;
        idex.inst        <= ifid.inst;
        idex.c           <= id_c;
        idex.imm         <= id_imm;
        idex.rs1v        <= id_rs1v;
        idex.rs2v        <= id_rs2v;
        idex.pred_taken  <= ifid.pred_taken;
        idex.pred_target <= ifid.pred_target;
        idex.exc         <= ifid.exc || !id_c.valid_op;
        idex.cause       <= ifid.exc ? ifid.cause : EXC_ILLEGAL;
        idex.tval        <= ifid.exc ? ifid.pc : ifid.inst;
      end

      // ---- Decode register and PC
      if (redir_mem) begin
        ifid.valid <= 1'b0;
        pc_q       <= redir_mem_pc;
      end else if (redir_ex) begin
        ifid.valid <= 1'b0;
        pc_q       <= redir_ex_pc;
      end else if (stall_mem || stall_ex || stall_id) begin
        // hold
      end else if (!if_ready) begin
        ifid.valid <= 1'b0;
      end else begin
        ifid.valid       <= 1'b1;
        ifid.pc          <= pc_q;
        ifid.inst        <= i_fault ? 32'h0000_0013 : ic_rdata;
        ifid.pred_taken  <= bp_taken && !i_fault;
        ifid.pred_target <= bp_target;
        ifid.exc         <= i_fault;
        ifid.cause       <= EXC_IPF;
        pc_q             <= (bp_taken && !i_fault) ? bp_target : pc_q + 32'd4;
      end
    end
  end
endmodule
