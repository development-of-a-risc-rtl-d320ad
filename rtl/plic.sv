// plic: platform-level interrupt controller with 31 interrupt sources
// (IDs 1-31), 8 priority levels (3-bit priority, 0 = never interrupts) and
// two hart contexts, as the document configures it. Context 0 drives the
// machine external interrupt (MEIP) and context 1 the supervisor external
// interrupt (SEIP) of the single hart.
// Registers, standard PLIC offsets inside the window:
//   0x000000 + 4*id       source priority
//   0x001000              pending bits
//   0x002000 + 0x80*ctx   enable bits
//   0x200000 + 0x1000*ctx priority threshold
//   0x200004 + 0x1000*ctx claim (read) / complete (write)
// Sources are level-sensitive: a high source becomes pending unless it is
// already pending or being served. A claim returns the enabled pending
// source of highest priority (lowest ID on a tie), clears its pending bit and
// marks it in service until software writes its ID to complete. A context's
// interrupt is high while some enabled pending source has a priority above
// the context's threshold. Register layout and gateway rules follow the
// RISC-V PLIC specification; the document gives the counts only.
// Bus slave answering one cycle after the request.
module plic
  import rv32x_pkg::*;
#(
  parameter int unsigned NSRC = 31,
  parameter int unsigned NCTX = 2,
  parameter int unsigned PRIO_BITS = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  bus_req_t        req,
  output bus_rsp_t        rsp,
  input  logic [NSRC:1]   src,
  output logic [NCTX-1:0] irq
);
  logic [PRIO_BITS-1:0] prio [NSRC+1];
  logic [NSRC:0]        pending, inserv;
  logic [NSRC:0]        enable [NCTX];
  logic [PRIO_BITS-1:0] thresh [NCTX];

  // best candidate per context
  logic [4:0]           best_id  [NCTX];
  logic [PRIO_BITS-1:0] best_pri [NCTX];
  always_comb begin
    for (int c = 0; c < NCTX; c++) begin
      best_id[c]  = '0;
      best_pri[c] = '0;
      for (int i = 1; i <= NSRC; i++) begin
        if (pending[i] && enable[c][i] && prio[i] > best_pri[c]) begin
          best_id[c]  = 5'(i);
          best_pri[c] = prio[i];
        end
      end
      irq[c] = (best_id[c] != 0) && (best_pri[c] > thresh[c]);
    end
  end

  logic [23:0] off;
  assign off = req.addr[23:0];
  logic        pend;
  logic [31:0] q;
  logic        acc;
  assign acc = req.valid && !pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= NSRC; i++) prio[i] <= '0;
      for (int c = 0; c < NCTX; c++) begin enable[c] <= '0; thresh[c] <= '0; end
      pending <= '0; inserv <= '0; pend <= 1'b0; q <= '0;
    end else begin
      pend <= acc;
      // gateways
      for (int i = 1; i <= NSRC; i++)
        if (src[i] && !inserv[i]) pending[i] <= 1'b1;
      if (acc) begin
        q <= '0;
        if (off < 24'h001000) begin
          if (off[11:2] <= 10'(NSRC)) q <= 32'(prio[off[6:2]]);
          if (req.we && off[11:2] != 0 && off[11:2] <= 10'(NSRC))
            prio[off[6:2]] <= req.wdata[PRIO_BITS-1:0];
        end else if (off == 24'h001000) begin
          q <= 32'(pending);
        end else begin
          for (int c = 0; c < NCTX; c++) begin
            if (off == 24'h002000 + 24'(c) * 24'h80) begin
              q <= 32'(enable[c]);
              if (req.we) enable[c] <= {req.wdata[NSRC:1], 1'b0};
            end
            if (off == 24'h200000 + 24'(c) * 24'h1000) begin
              q <= 32'(thresh[c]);
              if (req.we) thresh[c] <= req.wdata[PRIO_BITS-1:0];
            end
            if (off == 24'h200004 + 24'(c) * 24'h1000) begin
              if (req.we) begin
                if (req.wdata[4:0] != 0) inserv[req.wdata[4:0]] <= 1'b0;
              end else begin
                q <= 32'(best_id[c]);
                if (best_id[c] != 0) begin
                  pending[best_id[c]] <= 1'b0;
                  inserv[best_id[c]]  <= 1'b1;
                end
              end
            end
          end
        end
      end
    end
  end
  assign rsp.ack   = pend;
  assign rsp.rdata = q;
endmodule
