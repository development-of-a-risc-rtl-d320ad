// load_store_unit: the Memory-stage access sequencer of the core.
// The Memory stage holds `req` while its instruction needs memory; the unit
// ends the access with a one-cycle `done`, with either the load result
// (`rdata`, already shifted and sign- or zero-extended) or an exception
// (`exc`, `exc_cause`). Steps, each taking as many cycles as it needs:
//   1. alignment check (misaligned accesses trap; there is no hardware
//      support for them);
//   2. Sv32 translation through the 32-entry data TLB when paging is on, a
//      TLB miss asking the shared page walker (`ptw_*`) and retrying, and
//      the R/W/X/U/A/D permission check with SUM and MXR;
//   3. the access through the data cache: a load or LR is one read, a store
//      or a successful SC one write, an AMO a read followed by a write of the
//      AMO unit's result. LR sets a reservation on the word; SC succeeds only
//      while it holds, and any trap clears it (`clr_resv`).
// Physical addresses with bit 31 set (main memory) are cacheable; all others
// are device registers and bypass the cache. The steps and the
// AMO-in-Memory-stage placement follow the document (its block diagram and
// stage table);
// the rest is this design's choice.
module load_store_unit
  import rv32x_pkg::*;
#(
  parameter int unsigned DTLB_ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  mem_kind_e   kind,
  input  logic [2:0]  f3,
  input  amo_op_e     amo_op,
  input  logic [31:0] vaddr,
  input  logic [31:0] wdata,
  // translation control
  input  logic        paging,
  input  priv_e       eff_priv,
  input  logic        sum,
  input  logic        mxr,
  input  logic        tlb_flush,
  input  logic        clr_resv,
  // result
  output logic        done,
  output logic        exc,
  output logic [4:0]  exc_cause,
  output logic [31:0] rdata,
  // page walker
  output logic        ptw_req,
  input  logic        ptw_done,
  input  logic        ptw_fault,
  input  tlb_entry_t  ptw_entry,
  // data cache
  output logic        dc_req,
  output logic        dc_we,
  output logic        dc_uncached,
  output logic [31:0] dc_addr,
  output logic [31:0] dc_wdata,
  output logic [3:0]  dc_wstrb,
  input  logic        dc_done,
  input  logic [31:0] dc_rdata
);
  logic        is_wr;   // needs write permission
  assign is_wr = (kind == MEM_STORE) || (kind == MEM_AMO) || (kind == MEM_SC);

  // ---- alignment
  logic misal;
  always_comb begin
    unique case (f3[1:0])
      2'b00:   misal = 1'b0;
      2'b01:   misal = vaddr[0];
      default: misal = vaddr[1:0] != 2'b00;
    endcase
    if (kind == MEM_AMO || kind == MEM_LR || kind == MEM_SC) misal = vaddr[1:0] != 2'b00;
  end

  // ---- translation
  logic        t_hit;
  logic [33:0] t_pa;
  logic [5:0]  t_perm;
  tlb #(.ENTRIES(DTLB_ENTRIES)) u_dtlb (
    .clk, .rst_n, .va(vaddr), .hit(t_hit), .pa(t_pa), .perm(t_perm),
    .fill(ptw_done && !ptw_fault), .fill_entry(ptw_entry), .flush(tlb_flush)
  );

  logic perm_ok;
  always_comb begin
    // perm = {d, a, u, x, w, r}
    perm_ok = t_perm[4];
    if (is_wr)  perm_ok = perm_ok && t_perm[1] && t_perm[5];
    else        perm_ok = perm_ok && (t_perm[0] || (mxr && t_perm[2]));
    if (eff_priv == PRV_U && !t_perm[3]) perm_ok = 1'b0;
    if (eff_priv == PRV_S && t_perm[3] && !sum) perm_ok = 1'b0;
  end

  logic [31:0] paddr;
  logic        xlate_ok;
  assign paddr    = paging ? t_pa[31:0] : vaddr;
  assign xlate_ok = !paging || (t_hit && perm_ok);

  logic [4:0] pf_cause, ma_cause;
  assign pf_cause = is_wr ? EXC_SPF : EXC_LPF;
  assign ma_cause = is_wr ? EXC_SMISALIGN : EXC_LMISALIGN;

  // ---- access sequencing
  logic        ph;        // AMO phase: 0 read, 1 write
  logic [31:0] amo_old;
  logic        resv_v;
  logic [31:0] resv_a;

  logic sc_ok;
  assign sc_ok = resv_v && resv_a == paddr;

  logic [31:0] amo_new;
  amoalu u_amo (.op(amo_op), .mem(ph ? amo_old : dc_rdata), .src(wdata), .y(amo_new));

  logic [31:0] st_data;
  logic [3:0]  st_strb;
  always_comb begin
    unique case (f3[1:0])
      2'b00:   begin st_data = {4{wdata[7:0]}};  st_strb = 4'b0001 << vaddr[1:0]; end
      2'b01:   begin st_data = {2{wdata[15:0]}}; st_strb = vaddr[1] ? 4'b1100 : 4'b0011; end
      default: begin st_data = wdata;            st_strb = 4'b1111; end
    endcase
    if (kind == MEM_AMO) begin st_data = amo_new; st_strb = 4'b1111; end
  end

  logic access;
  assign access = req && !misal && xlate_ok && !(kind == MEM_SC && !sc_ok);

  assign dc_req      = access;
  assign dc_we       = (kind == MEM_STORE) || (kind == MEM_SC) || (kind == MEM_AMO && ph);
  assign dc_uncached = !paddr[31];
  assign dc_addr     = {paddr[31:2], 2'b00};
  assign dc_wdata    = st_data;
  assign dc_wstrb    = dc_we ? st_strb : 4'b0000;

  assign ptw_req = req && !misal && paging && !t_hit;

  // load data extraction
  logic [31:0] sh;
  assign sh = dc_rdata >> (8 * vaddr[1:0]);
  logic [31:0] ld_val;
  always_comb begin
    unique case (f3)
      3'b000:  ld_val = {{24{sh[7]}}, sh[7:0]};
      3'b001:  ld_val = {{16{sh[15]}}, sh[15:0]};
      3'b100:  ld_val = {24'd0, sh[7:0]};
      3'b101:  ld_val = {16'd0, sh[15:0]};
      default: ld_val = dc_rdata;
    endcase
  end

  always_comb begin
    done = 1'b0; exc = 1'b0; exc_cause = '0; rdata = ld_val;
    if (req) begin
      if (misal) begin
        done = 1'b1; exc = 1'b1; exc_cause = ma_cause;
      end else if (paging && !t_hit) begin
        if (ptw_done && ptw_fault) begin done = 1'b1; exc = 1'b1; exc_cause = pf_cause; end
      end else if (paging && !perm_ok) begin
        done = 1'b1; exc = 1'b1; exc_cause = pf_cause;
      end else if (kind == MEM_SC && !sc_ok) begin
        done = 1'b1; rdata = 32'd1;
      end else if (dc_done) begin
        unique case (kind)
          MEM_AMO: begin done = ph; rdata = amo_old; end
          MEM_SC:  begin done = 1'b1; rdata = 32'd0; end
          default: done = 1'b1;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= 1'b0; amo_old <= '0; resv_v <= 1'b0; resv_a <= '0;
    end else begin
      if (req && kind == MEM_AMO && dc_done && !ph) begin
        ph <= 1'b1; amo_old <= dc_rdata;
      end else if (done) begin
        ph <= 1'b0;
      end
      if (clr_resv) resv_v <= 1'b0;
      else if (done && !exc && kind == MEM_LR) begin resv_v <= 1'b1; resv_a <= paddr; end
      else if (done && kind == MEM_SC) resv_v <= 1'b0;
    end
  end
endmodule
