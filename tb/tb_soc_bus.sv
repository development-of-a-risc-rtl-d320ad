// tb_soc_bus: sends requests to the first and last word of every region of
// the memory map and to unmapped addresses; each slave is a small model that
// answers with its own index, so the read data shows where a request went.
// Checks that only the right slave sees valid and that unmapped accesses
// are acknowledged with zero.
module tb_soc_bus;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t m_req; bus_rsp_t m_rsp; bus_req_t s_req [6]; bus_rsp_t s_rsp [6];
  soc_bus dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);
  for (genvar g = 0; g < 6; g++) begin : gs
    logic p = 0;
    always @(posedge clk) p <= s_req[g].valid && !p;
    assign s_rsp[g] = '{ack: p, rdata: 32'(g + 100)};
  end
  task automatic go(logic [31:0] a, int exp);
    int hits;
    @(negedge clk); m_req = '{valid: 1, we: 0, addr: a, wdata: 0, wstrb: 0};
    hits = 0;
    #1; for (int i = 0; i < 6; i++) if (s_req[i].valid) hits++;
    do @(posedge clk); while (!m_rsp.ack);
    #1; checks++;
    if (m_rsp.rdata !== ((exp < 0) ? 32'd0 : 32'(exp + 100)) || hits != ((exp < 0) ? 0 : 1)) begin
      failures++; $display("FAIL addr %h -> %0d (hits %0d)", a, m_rsp.rdata, hits);
    end
    m_req.valid = 0; @(posedge clk);
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    m_req = '0;
    #12 rst_n = 1;
    go(32'h0000_0000, 0); go(32'h0000_3ffc, 0); go(32'h0000_4000, -1);
    go(32'h0200_0000, 1); go(32'h0200_bffc, 1); go(32'h0200_c000, -1);
    go(32'h0c00_0000, 2); go(32'h1bff_fffc, 2); go(32'h1c00_0000, -1);
    go(32'h4000_0000, 3); go(32'h4000_0ffc, 3);
    go(32'h4000_1000, 4); go(32'h4000_1ffc, 4); go(32'h4000_2000, -1);
    go(32'h8000_0000, 5); go(32'h83ff_fffc, 5); go(32'h8400_0000, -1);
    go(32'hffff_fffc, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
