// soc_bus: memory-mapped interconnect of RV32XSoC. It decodes the address
// of the core's single request and routes it to one of six slaves, using
// the document's memory map:
//   0 BOOTROM    0x0000_0000 - 0x0000_4000
//   1 CLINT      0x0200_0000 - 0x0200_C000
//   2 PLIC       0x0C00_0000 - 0x1C00_0000
//   3 UART       0x4000_0000 - 0x4000_1000
//   4 SPI I/F    0x4000_1000 - 0x4000_2000
//   5 Memory I/F 0x8000_0000 - 0x8400_0000
// Only the selected slave sees valid; its acknowledge and read data return
// to the core. An access to an unmapped address is acknowledged one cycle
// later with read data 0 and writes dropped (this design's choice; there is
// no bus error). An assertion checks that a request is held unchanged
// until its acknowledge. Combinational apart from that one-cycle default responder.
// Lint tools may report rst_n as used both synchronously and
// asynchronously: the synchronous use is only the `disable iff` of the
// hold-rule assertion above, not a flip-flop, so the warning stands.
module soc_bus
  import rv32x_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req,
  output bus_rsp_t m_rsp,
  output bus_req_t s_req [6],
  input  bus_rsp_t s_rsp [6]
);
  logic [2:0] sel;
  logic       hit;
  logic [31:0] a;
  assign a = m_req.addr;
  always_comb begin
    hit = 1'b1;
    if      (a < 32'h0000_4000)                         sel = 3'd0;
    else if (a >= 32'h0200_0000 && a < 32'h0200_C000)   sel = 3'd1;
    else if (a >= 32'h0C00_0000 && a < 32'h1C00_0000)   sel = 3'd2;
    else if (a >= 32'h4000_0000 && a < 32'h4000_1000)   sel = 3'd3;
    else if (a >= 32'h4000_1000 && a < 32'h4000_2000)   sel = 3'd4;
    else if (a >= 32'h8000_0000 && a < 32'h8400_0000)   sel = 3'd5;
    else begin sel = 3'd0; hit = 1'b0; end
  end

  logic dflt_ack;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dflt_ack <= 1'b0;
    else        dflt_ack <= m_req.valid && !hit && !dflt_ack;
  end

  // Bus rule: a master keeps its request unchanged until it is acknowledged.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (m_req.valid && !m_rsp.ack) |=> (m_req.valid && $stable(m_req.addr) && $stable(m_req.we)
                                       && $stable(m_req.wdata) && $stable(m_req.wstrb));
  endproperty
  a_hold: assert property (p_hold) else $error("bus request changed before acknowledge");

  always_comb begin
    for (int i = 0; i < 6; i++) begin
      s_req[i]       = m_req;
      s_req[i].valid = m_req.valid && hit && (sel == 3'(i));
    end
    if (!hit) begin
      m_rsp.ack   = dflt_ack;
      m_rsp.rdata = '0;
    end else begin
      m_rsp = s_rsp[sel];
    end
  end
endmodule
