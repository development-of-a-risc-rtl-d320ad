// csr_file: control and status registers and trap control of the core.
// Holds the machine- and supervisor-mode CSRs needed by a Unix-like kernel
// (mstatus/sstatus, misa, medeleg, mideleg, mie/sie, mip/sip, mtvec/stvec,
// mscratch/sscratch, mepc/sepc, mcause/scause, mtval/stval, satp, the
// counter-enable registers, mcycle, minstret, time from the CLINT, mhartid)
// and the current privilege level (M, S or U).
// It is used by the Memory stage, where CSR instructions execute and traps
// are taken. The combinational outputs tell the core whether the CSR access
// is legal, what it reads, whether an interrupt is to be taken and where a
// trap or return goes; the state changes on the clock edge on which the
// core signals csr_commit, trap or xret. Interrupt inputs follow the
// document's wiring: CLINT drives MSIP and MTIP, PLIC context 0 drives MEIP
// and context 1 drives SEIP. Interrupt priority, delegation, the mstatus
// stacks and the vectored mtvec mode follow the RISC-V privileged
// specification (version 1.11); the register set kept is this design's
// reading of "minimum requirements" for Linux. Each privilege level has its
// own epc/cause/tval registers, so a machine trap taken right after a
// supervisor trap does not destroy the supervisor context.
module csr_file
  import rv32x_pkg::*;
#(
  parameter logic [31:0] HART_ID = 32'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  // CSR instruction in the Memory stage
  input  logic [11:0] csr_addr,
  input  logic [2:0]  csr_f3,
  input  logic [31:0] csr_src,       // rs1 value or zero-extended uimm
  input  logic        csr_src_zero,  // rs1 field is x0 / uimm is 0
  output logic [31:0] csr_rdata,
  output logic        csr_illegal,
  input  logic        csr_commit,
  // traps and returns
  input  logic        trap,          // take a trap this cycle
  input  logic        trap_irq,      // the trap is an interrupt
  input  logic [4:0]  trap_cause,
  input  logic [31:0] trap_pc,
  input  logic [31:0] trap_tval,
  output logic [31:0] trap_target,
  input  logic        xret,          // commit MRET (xret_s = 0) or SRET (1)
  input  logic        xret_s,
  output logic [31:0] xret_target,
  output logic        xret_illegal,
  input  logic        instret_inc,
  // interrupts
  input  logic        msip,
  input  logic        mtip,
  input  logic        meip,
  input  logic        seip,
  input  logic [63:0] mtime,
  output logic        irq_pending,
  output logic [4:0]  irq_cause,
  // state used by the core
  output priv_e       priv,
  output logic        satp_mode,
  output logic [21:0] satp_ppn,
  output logic        st_mprv,
  output priv_e       st_mpp,
  output logic        st_sum,
  output logic        st_mxr,
  output logic        st_tvm,
  output logic        st_tsr
);
  localparam logic [31:0] MISA = 32'h4014_1101; // RV32 I M A S U

  logic        sie, mie_b, spie, mpie, spp, mprv, sum, mxr, tvm, tsr;
  priv_e       mpp;
  logic [31:0] medeleg, mideleg, mie_r, mtvec, stvec, mscratch, sscratch;
  logic [31:0] mepc, sepc, mcause, scause, mtval, stval, satp;
  logic [31:0] mcounteren, scounteren;
  logic        ssip, stip, seip_sw;
  logic [63:0] mcycle, minstret;

  logic [31:0] mstatus_v, sstatus_v, mip_v;
  assign mstatus_v = {9'd0, tsr, 1'b0, tvm, mxr, sum, mprv, 4'd0, mpp, 2'd0, spp,
                      mpie, 1'b0, spie, 1'b0, mie_b, 1'b0, sie, 1'b0};
  assign sstatus_v = {12'd0, mxr, sum, 9'd0, spp, 2'd0, spie, 3'd0, sie, 1'b0};
  assign mip_v = {20'd0, meip, 1'b0, seip_sw | seip, 1'b0, mtip, 1'b0, stip, 1'b0,
                  msip, 1'b0, ssip, 1'b0};

  localparam logic [31:0] SMASK = 32'h0000_0222; // SEIP STIP SSIP

  // ---------------- read ----------------
  logic known;
  always_comb begin
    known = 1'b1;
    unique case (csr_addr)
      CSR_SSTATUS:   csr_rdata = sstatus_v;
      CSR_SIE:       csr_rdata = mie_r & mideleg & SMASK;
      CSR_STVEC:     csr_rdata = stvec;
      CSR_SCOUNTEREN:csr_rdata = scounteren;
      CSR_SSCRATCH:  csr_rdata = sscratch;
      CSR_SEPC:      csr_rdata = sepc;
      CSR_SCAUSE:    csr_rdata = scause;
      CSR_STVAL:     csr_rdata = stval;
      CSR_SIP:       csr_rdata = mip_v & mideleg & SMASK;
      CSR_SATP:      csr_rdata = satp;
      CSR_MSTATUS:   csr_rdata = mstatus_v;
      CSR_MISA:      csr_rdata = MISA;
      CSR_MEDELEG:   csr_rdata = medeleg;
      CSR_MIDELEG:   csr_rdata = mideleg;
      CSR_MIE:       csr_rdata = mie_r;
      CSR_MTVEC:     csr_rdata = mtvec;
      CSR_MCOUNTEREN:csr_rdata = mcounteren;
      CSR_MSCRATCH:  csr_rdata = mscratch;
      CSR_MEPC:      csr_rdata = mepc;
      CSR_MCAUSE:    csr_rdata = mcause;
      CSR_MTVAL:     csr_rdata = mtval;
      CSR_MIP:       csr_rdata = mip_v;
      CSR_MCYCLE, CSR_CYCLE:      csr_rdata = mcycle[31:0];
      CSR_MCYCLEH, CSR_CYCLEH:    csr_rdata = mcycle[63:32];
      CSR_MINSTRET, CSR_INSTRET:  csr_rdata = minstret[31:0];
      CSR_MINSTRETH, CSR_INSTRETH:csr_rdata = minstret[63:32];
      CSR_TIME:      csr_rdata = mtime[31:0];
      CSR_TIMEH:     csr_rdata = mtime[63:32];
      CSR_MHARTID:   csr_rdata = HART_ID;
      default: begin csr_rdata = '0; known = 1'b0; end
    endcase
  end

  logic do_write;
  assign do_write = (csr_f3[1:0] == 2'b01) || !csr_src_zero;

  always_comb begin
    csr_illegal = !known
               || (priv < csr_addr[9:8])
               || (do_write && csr_addr[11:10] == 2'b11)
               || (csr_addr == CSR_SATP && priv == PRV_S && tvm);
  end

  logic [31:0] wval;
  always_comb begin
    unique case (csr_f3[1:0])
      2'b01:   wval = csr_src;
      2'b10:   wval = csr_rdata | csr_src;
      2'b11:   wval = csr_rdata & ~csr_src;
      default: wval = csr_rdata;
    endcase
  end

  // ---------------- interrupts ----------------
  logic [31:0] pend, m_en, s_en;
  logic        m_glob, s_glob;
  always_comb begin
    pend   = mip_v & mie_r;
    m_glob = (priv != PRV_M) || mie_b;
    s_glob = (priv == PRV_U) || (priv == PRV_S && sie);
    m_en   = m_glob ? (pend & ~mideleg) : '0;
    s_en   = (s_glob && priv != PRV_M) ? (pend & mideleg) : '0;
    irq_pending = 1'b1;
    if      (m_en[11]) irq_cause = 5'd11;
    else if (m_en[3])  irq_cause = 5'd3;
    else if (m_en[7])  irq_cause = 5'd7;
    else if (m_en[9])  irq_cause = 5'd9;
    else if (m_en[1])  irq_cause = 5'd1;
    else if (m_en[5])  irq_cause = 5'd5;
    else if (s_en[9])  irq_cause = 5'd9;
    else if (s_en[1])  irq_cause = 5'd1;
    else if (s_en[5])  irq_cause = 5'd5;
    else begin irq_pending = 1'b0; irq_cause = 5'd0; end
  end

  // ---------------- trap / return targets ----------------
  logic to_s;
  always_comb begin
    to_s = (priv != PRV_M) && (trap_irq ? mideleg[trap_cause] : medeleg[trap_cause]);
    if (to_s)
      trap_target = (stvec[0] && trap_irq) ? {stvec[31:2], 2'b00} + {25'd0, trap_cause, 2'b00}
                                          : {stvec[31:2], 2'b00};
    else
      trap_target = (mtvec[0] && trap_irq) ? {mtvec[31:2], 2'b00} + {25'd0, trap_cause, 2'b00}
                                          : {mtvec[31:2], 2'b00};
    xret_target  = xret_s ? sepc : mepc;
    xret_illegal = xret_s ? (priv == PRV_U || (priv == PRV_S && tsr)) : (priv != PRV_M);
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      priv <= PRV_M;
      sie <= 1'b0; mie_b <= 1'b0; spie <= 1'b0; mpie <= 1'b0; spp <= 1'b0;
      mprv <= 1'b0; sum <= 1'b0; mxr <= 1'b0; tvm <= 1'b0; tsr <= 1'b0; mpp <= PRV_U;
      medeleg <= '0; mideleg <= '0; mie_r <= '0; mtvec <= '0; stvec <= '0;
      mscratch <= '0; sscratch <= '0; mepc <= '0; sepc <= '0; mcause <= '0;
      scause <= '0; mtval <= '0; stval <= '0; satp <= '0;
      mcounteren <= '0; scounteren <= '0; ssip <= 1'b0; stip <= 1'b0; seip_sw <= 1'b0;
      mcycle <= '0; minstret <= '0;
    end else begin
      mcycle <= mcycle + 64'd1;
      if (instret_inc) minstret <= minstret + 64'd1;
      if (trap) begin
        if (to_s) begin
          sepc   <= trap_pc;
          scause <= {trap_irq, 26'd0, trap_cause};
          stval  <= trap_tval;
          spie   <= sie;
          sie    <= 1'b0;
          spp    <= priv[0];
          priv   <= PRV_S;
        end else begin
          mepc   <= trap_pc;
          mcause <= {trap_irq, 26'd0, trap_cause};
          mtval  <= trap_tval;
          mpie   <= mie_b;
          mie_b  <= 1'b0;
          mpp    <= priv;
          priv   <= PRV_M;
        end
      end else if (xret) begin
        if (xret_s) begin
          priv <= spp ? PRV_S : PRV_U;
          sie  <= spie;
          spie <= 1'b1;
          spp  <= 1'b0;
          mprv <= 1'b0;
        end else begin
          priv <= mpp;
          mie_b <= mpie;
          mpie <= 1'b1;
          mpp  <= PRV_U;
          if (mpp != PRV_M) mprv <= 1'b0;
        end
      end else if (csr_commit && do_write) begin
        unique case (csr_addr)
          CSR_SSTATUS: begin
            sie <= wval[1]; spie <= wval[5]; spp <= wval[8]; sum <= wval[18]; mxr <= wval[19];
          end
          CSR_SIE:      mie_r <= (mie_r & ~(mideleg & SMASK)) | (wval & mideleg & SMASK);
          CSR_STVEC:    stvec <= wval;
          CSR_SCOUNTEREN: scounteren <= wval;
          CSR_SSCRATCH: sscratch <= wval;
          CSR_SEPC:     sepc <= {wval[31:2], 2'b00};
          CSR_SCAUSE:   scause <= wval;
          CSR_STVAL:    stval <= wval;
          CSR_SIP:      if (mideleg[1]) ssip <= wval[1];
          CSR_SATP:     satp <= {wval[31], 9'd0, wval[21:0]};
          CSR_MSTATUS: begin
            sie <= wval[1]; mie_b <= wval[3]; spie <= wval[5]; mpie <= wval[7];
            spp <= wval[8];
            mpp <= (wval[12:11] == 2'b10) ? PRV_U : priv_e'(wval[12:11]);
            mprv <= wval[17]; sum <= wval[18]; mxr <= wval[19];
            tvm <= wval[20]; tsr <= wval[22];
          end
          CSR_MEDELEG:  medeleg <= wval & 32'h0000_B3FF;
          CSR_MIDELEG:  mideleg <= wval & SMASK;
          CSR_MIE:      mie_r <= wval & 32'h0000_0AAA;
          CSR_MTVEC:    mtvec <= {wval[31:2], 1'b0, wval[0]};
          CSR_MCOUNTEREN: mcounteren <= wval;
          CSR_MSCRATCH: mscratch <= wval;
          CSR_MEPC:     mepc <= {wval[31:2], 2'b00};
          CSR_MCAUSE:   mcause <= wval;
          CSR_MTVAL:    mtval <= wval;
          CSR_MIP: begin ssip <= wval[1]; stip <= wval[5]; seip_sw <= wval[9]; end
          CSR_MCYCLE:   mcycle[31:0] <= wval;
          CSR_MCYCLEH:  mcycle[63:32] <= wval;
          CSR_MINSTRET: minstret[31:0] <= wval;
          CSR_MINSTRETH:minstret[63:32] <= wval;
          default: ;
        endcase
      end
    end
  end

  assign satp_mode = satp[31];
  assign satp_ppn  = satp[21:0];
  assign st_mprv   = mprv;
  assign st_mpp    = mpp;
  assign st_sum    = sum;
  assign st_mxr    = mxr;
  assign st_tvm    = tvm;
  assign st_tsr    = tsr;
endmodule
