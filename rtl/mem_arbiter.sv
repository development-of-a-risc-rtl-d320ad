// mem_arbiter: fixed-priority arbiter joining the core's memory masters
// (page walker, data cache, instruction cache, in that priority) onto the
// one bus that leaves the core. A grant is held from the cycle a master is
// chosen until the slave acknowledges its transfer, so a request is never
// switched mid-transfer; the acknowledge and read data go only to the
// granted master. Master 0 has the highest priority. The arbitration
// policy is this design's choice.
module mem_arbiter
  import rv32x_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [N],
  output bus_rsp_t m_rsp [N],
  output bus_req_t s_req,
  input  bus_rsp_t s_rsp
);
  localparam int GW = (N > 1) ? $clog2(N) : 1;
  logic          busy;
  logic [GW-1:0] gnt_q, pick, gnt;

  always_comb begin
    pick = '0;
    for (int i = N - 1; i >= 0; i--) if (m_req[i].valid) pick = GW'(i);
  end
  assign gnt = busy ? gnt_q : pick;

  always_comb begin
    s_req = m_req[gnt];
    for (int i = 0; i < N; i++) begin
      m_rsp[i].ack   = s_rsp.ack && (gnt == GW'(i));
      m_rsp[i].rdata = s_rsp.rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; gnt_q <= '0;
    end else if (s_req.valid && !s_rsp.ack) begin
      busy <= 1'b1; gnt_q <= gnt;
    end else if (s_rsp.ack) begin
      busy <= 1'b0;
    end
  end
endmodule
