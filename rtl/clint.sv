// clint: core-local interruptor for one hart (the document's configuration).
// Registers, at the standard CLINT offsets inside its 0x0200_0000 window:
//   0x0000 msip       bit 0 drives the machine software interrupt
//   0x4000 mtimecmp   low word,  0x4004 high word
//   0xBFF8 mtime      low word,  0xBFFC high word
// mtime counts up by one every TICK_DIV clock cycles (the document runs the
// CLINT at 50 MHz; with TICK_DIV = 1 mtime counts at the clock frequency).
// The timer interrupt mtip is high while mtime >= mtimecmp; software clears
// it by raising mtimecmp and ends a software interrupt by clearing msip, as
// the document describes. The register offsets follow the common RISC-V
// CLINT layout; the document gives only the address window. Bus slave
// answering one cycle after the request.
module clint
  import rv32x_pkg::*;
#(
  parameter int unsigned TICK_DIV = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  output logic        msip,
  output logic        mtip,
  output logic [63:0] mtime
);
  localparam int DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  logic [63:0] mtimecmp;
  logic [DW-1:0] div;
  logic        pend;
  logic [31:0] q;
  logic        tick;
  assign tick = (TICK_DIV <= 1) || (div == DW'(TICK_DIV - 1));

  logic [15:0] off;
  assign off = req.addr[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mtime <= '0; mtimecmp <= '1; msip <= 1'b0; div <= '0; pend <= 1'b0; q <= '0;
    end else begin
      div <= tick ? '0 : div + 1'b1;
      if (tick) mtime <= mtime + 64'd1;
      pend <= req.valid && !pend;
      if (req.valid && !pend) begin
        unique case (off)
          16'h0000: q <= {31'd0, msip};
          16'h4000: q <= mtimecmp[31:0];
          16'h4004: q <= mtimecmp[63:32];
          16'hBFF8: q <= mtime[31:0];
          16'hBFFC: q <= mtime[63:32];
          default:  q <= '0;
        endcase
        if (req.we) begin
          unique case (off)
            16'h0000: if (req.wstrb[0]) msip <= req.wdata[0];
            16'h4000: mtimecmp[31:0]  <= req.wdata;
            16'h4004: mtimecmp[63:32] <= req.wdata;
            16'hBFF8: mtime[31:0]     <= req.wdata;
            16'hBFFC: mtime[63:32]    <= req.wdata;
            default: ;
          endcase
        end
      end
    end
  end
  assign mtip      = (mtime >= mtimecmp);
  assign rsp.ack   = pend;
  assign rsp.rdata = q;
endmodule
