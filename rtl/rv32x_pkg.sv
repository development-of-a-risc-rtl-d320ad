// rv32x_pkg: types and constants shared by the RV32XSoC core and SoC blocks.
// It holds the ALU/multiply-divide/AMO operation encodings, the decoded
// control bundle that travels down the five-stage pipeline, the simple
// request/acknowledge memory bus used between the core, the caches and the
// SoC devices, CSR addresses and trap cause codes (RISC-V privileged spec).
// The bus protocol is this design's own choice: a master raises valid with a
// stable request and keeps it until the slave answers with a one-cycle ack.
package rv32x_pkg;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [2:0] {
    MD_MUL, MD_MULH, MD_MULHSU, MD_MULHU, MD_DIV, MD_DIVU, MD_REM, MD_REMU
  } md_op_e;

  typedef enum logic [3:0] {
    AMO_SWAP, AMO_ADD, AMO_XOR, AMO_AND, AMO_OR,
    AMO_MIN, AMO_MAX, AMO_MINU, AMO_MAXU
  } amo_op_e;

  typedef enum logic [2:0] {
    MEM_NONE, MEM_LOAD, MEM_STORE, MEM_AMO, MEM_LR, MEM_SC
  } mem_kind_e;

  typedef enum logic [2:0] {
    SYS_NONE, SYS_ECALL, SYS_EBREAK, SYS_MRET, SYS_SRET,
    SYS_FENCEI, SYS_SFENCE, SYS_WFI
  } sys_op_e;

  typedef enum logic [1:0] { PRV_U = 2'd0, PRV_S = 2'd1, PRV_M = 2'd3 } priv_e;

  // Decoded instruction control, produced in Decode.
  typedef struct packed {
    logic      valid_op;   // instruction is legal
    logic      rs1_used;
    logic      rs2_used;
    logic      rd_we;
    alu_op_e   alu_op;
    logic      alu_a_pc;   // operand A is the PC (AUIPC, JAL)
    logic      alu_b_imm;  // operand B is the immediate
    logic      is_branch;
    logic      is_jal;
    logic      is_jalr;
    logic [2:0] funct3;
    logic      is_md;      // M extension
    md_op_e    md_op;
    mem_kind_e mem;
    amo_op_e   amo_op;
    logic      is_csr;
    sys_op_e   sys;
    logic      is_fence;
  } ctrl_t;

  // Memory bus
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
  } bus_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
  } bus_rsp_t;

  // Exception cause codes
  localparam logic [4:0] EXC_IMISALIGN = 5'd0;
  localparam logic [4:0] EXC_ILLEGAL   = 5'd2;
  localparam logic [4:0] EXC_BREAK     = 5'd3;
  localparam logic [4:0] EXC_LMISALIGN = 5'd4;
  localparam logic [4:0] EXC_SMISALIGN = 5'd6;
  localparam logic [4:0] EXC_ECALL_U   = 5'd8;
  localparam logic [4:0] EXC_IPF       = 5'd12;
  localparam logic [4:0] EXC_LPF       = 5'd13;
  localparam logic [4:0] EXC_SPF       = 5'd15;

  // CSR addresses
  localparam logic [11:0] CSR_SSTATUS  = 12'h100;
  localparam logic [11:0] CSR_SIE      = 12'h104;
  localparam logic [11:0] CSR_STVEC    = 12'h105;
  localparam logic [11:0] CSR_SCOUNTEREN = 12'h106;
  localparam logic [11:0] CSR_SSCRATCH = 12'h140;
  localparam logic [11:0] CSR_SEPC     = 12'h141;
  localparam logic [11:0] CSR_SCAUSE   = 12'h142;
  localparam logic [11:0] CSR_STVAL    = 12'h143;
  localparam logic [11:0] CSR_SIP      = 12'h144;
  localparam logic [11:0] CSR_SATP     = 12'h180;
  localparam logic [11:0] CSR_MSTATUS  = 12'h300;
  localparam logic [11:0] CSR_MISA     = 12'h301;
  localparam logic [11:0] CSR_MEDELEG  = 12'h302;
  localparam logic [11:0] CSR_MIDELEG  = 12'h303;
  localparam logic [11:0] CSR_MIE      = 12'h304;
  localparam logic [11:0] CSR_MTVEC    = 12'h305;
  localparam logic [11:0] CSR_MCOUNTEREN = 12'h306;
  localparam logic [11:0] CSR_MSCRATCH = 12'h340;
  localparam logic [11:0] CSR_MEPC     = 12'h341;
  localparam logic [11:0] CSR_MCAUSE   = 12'h342;
  localparam logic [11:0] CSR_MTVAL    = 12'h343;
  localparam logic [11:0] CSR_MIP      = 12'h344;
  localparam logic [11:0] CSR_MCYCLE   = 12'hB00;
  localparam logic [11:0] CSR_MINSTRET = 12'hB02;
  localparam logic [11:0] CSR_MCYCLEH  = 12'hB80;
  localparam logic [11:0] CSR_MINSTRETH= 12'hB82;
  localparam logic [11:0] CSR_CYCLE    = 12'hC00;
  localparam logic [11:0] CSR_TIME     = 12'hC01;
  localparam logic [11:0] CSR_INSTRET  = 12'hC02;
  localparam logic [11:0] CSR_CYCLEH   = 12'hC80;
  localparam logic [11:0] CSR_TIMEH    = 12'hC81;
  localparam logic [11:0] CSR_INSTRETH = 12'hC82;
  localparam logic [11:0] CSR_MHARTID  = 12'hF14;

  // Sv32 TLB entry
  typedef struct packed {
    logic        valid;
    logic [19:0] vpn;
    logic [21:0] ppn;
    logic        mega;   // 4 MiB superpage
    logic        d, a, u, x, w, r;
  } tlb_entry_t;

endpackage
