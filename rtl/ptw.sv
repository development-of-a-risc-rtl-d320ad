// ptw: Sv32 hardware page-table walker.
// On `req` (held until `done`) it walks the two-level Sv32 page table whose
// root page number is satp_ppn for the virtual address va, reading page
// table entries over its own bus master port (one word read per level).
// It ends with `done` for one cycle and either a TLB entry (`entry`) or
// `fault` when the walk finds an invalid PTE, a reserved W-without-R
// encoding, a misaligned superpage, or no leaf after two levels. Permission
// checks against the access are left to the TLB user, so a valid leaf is
// always returned as an entry. The walk follows the RISC-V privileged
// specification; the document names the walker without its insides. A/D
// bits are not updated by hardware: a clear A, or a clear D on a store,
// is reported by the permission check as a page fault (software-managed
// A/D, which the specification allows).
module ptw
  import rv32x_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic [31:0] va,
  input  logic [21:0] satp_ppn,
  output logic        done,
  output logic        fault,
  output tlb_entry_t  entry,
  output bus_req_t    bus_req,
  input  bus_rsp_t    bus_rsp
);
  typedef enum logic [1:0] { W_IDLE, W_L1, W_L0, W_DONE } st_e;
  st_e st;
  logic [21:0] base;
  logic        fault_q;
  tlb_entry_t  ent_q;

  logic [33:0] pte_addr;
  assign pte_addr = (st == W_L1) ? {base, va[31:22], 2'b00} : {base, va[21:12], 2'b00};

  assign bus_req.valid = (st == W_L1) || (st == W_L0);
  assign bus_req.we    = 1'b0;
  assign bus_req.addr  = pte_addr[31:0];
  assign bus_req.wdata = '0;
  assign bus_req.wstrb = '0;

  logic [31:0] pte;
  assign pte = bus_rsp.rdata;
  logic pte_bad, pte_leaf;
  assign pte_bad  = !pte[0] || (!pte[1] && pte[2]);
  assign pte_leaf = pte[1] || pte[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= W_IDLE; base <= '0; fault_q <= 1'b0; ent_q <= '0;
    end else begin
      unique case (st)
        W_IDLE: if (req) begin base <= satp_ppn; st <= W_L1; end
        W_L1: if (bus_rsp.ack) begin
          if (pte_bad || (pte_leaf && pte[19:10] != 10'd0)) begin
            fault_q <= 1'b1; st <= W_DONE;
          end else if (pte_leaf) begin
            fault_q <= 1'b0;
            ent_q   <= '{valid: 1'b1, vpn: va[31:12], ppn: pte[31:10], mega: 1'b1,
                         d: pte[7], a: pte[6], u: pte[4], x: pte[3], w: pte[2], r: pte[1]};
            st <= W_DONE;
          end else begin
            base <= pte[31:10]; st <= W_L0;
          end
        end
        W_L0: if (bus_rsp.ack) begin
          if (pte_bad || !pte_leaf) begin
            fault_q <= 1'b1;
          end else begin
            fault_q <= 1'b0;
            ent_q   <= '{valid: 1'b1, vpn: va[31:12], ppn: pte[31:10], mega: 1'b0,
                         d: pte[7], a: pte[6], u: pte[4], x: pte[3], w: pte[2], r: pte[1]};
          end
          st <= W_DONE;
        end
        W_DONE: st <= W_IDLE;
        default: st <= W_IDLE;
      endcase
    end
  end

  assign done  = (st == W_DONE);
  assign fault = fault_q;
  assign entry = ent_q;
endmodule
