// tlb: fully associative Sv32 translation look-aside buffer.
// ENTRIES entries (the core uses 4 for instructions and 32 for data, the
// document's sizes). Lookup is combinational: the virtual address is
// compared with every valid entry, a 4 KiB entry on VPN[1:0], a 4 MiB
// superpage entry on VPN[1] only; a hit returns the physical address
// (34 bits, Sv32) and the entry's permission bits (D A U X W R). The page
// walker fills an entry on `fill`; the victim is chosen round-robin. `flush`
// (SFENCE.VMA or a SATP write) invalidates every entry. Address-specific
// flushes and ASIDs are not modelled: every SFENCE.VMA flushes all entries,
// which the ISA allows. Replacement policy and full associativity are this
// design's choices; the document gives only the entry counts.
module tlb
  import rv32x_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] va,
  output logic        hit,
  output logic [33:0] pa,
  output logic [5:0]  perm,   // {d, a, u, x, w, r}
  input  logic        fill,
  input  tlb_entry_t  fill_entry,
  input  logic        flush
);
  localparam int IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  tlb_entry_t ent [ENTRIES];
  logic [IW-1:0] victim;

  always_comb begin
    hit  = 1'b0;
    pa   = {2'b00, va};
    perm = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent[i].valid && ent[i].vpn[19:10] == va[31:22] &&
          (ent[i].mega || ent[i].vpn[9:0] == va[21:12])) begin
        hit  = 1'b1;
        pa   = ent[i].mega ? {ent[i].ppn[21:10], va[21:0]} : {ent[i].ppn, va[11:0]};
        perm = {ent[i].d, ent[i].a, ent[i].u, ent[i].x, ent[i].w, ent[i].r};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
      victim <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) ent[i].valid <= 1'b0;
    end else if (fill) begin
      ent[victim] <= fill_entry;
      victim <= (victim == IW'(ENTRIES - 1)) ? '0 : victim + 1'b1;
    end
  end
endmodule
