// tb_mem_arbiter: three masters issue random requests; checks that each is
// served exactly once with its own data, that the highest-priority waiting
// master wins when the bus is free, and that a grant is not switched while
// a transfer waits for its acknowledge.
module tb_mem_arbiter;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t m_req [3]; bus_rsp_t m_rsp [3]; bus_req_t s_req; bus_rsp_t s_rsp;
  mem_arbiter #(.N(3)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);
  mem_model #(.WORDS(1024), .LATENCY(3), .BASE(0)) mem (.clk, .req(s_req), .rsp(s_rsp));
  int served [3];
  logic [31:0] prev_addr; logic prev_wait;

  // masters
  for (genvar g = 0; g < 3; g++) begin : gm
    initial begin
      m_req[g] = '0;
      @(posedge rst_n);
      repeat (200) begin
        repeat ($urandom_range(0, 4)) @(posedge clk);
        #1 m_req[g].valid = 1; m_req[g].addr = {20'd0, 2'(g), 8'($urandom), 2'b00};
        do @(posedge clk); while (!m_rsp[g].ack);
        checks++;
        if (m_rsp[g].rdata !== mem.mem[m_req[g].addr[11:2]]) failures++;
        served[g]++;
        #1 m_req[g].valid = 0;
      end
    end
  end

  // protocol: request stable while waiting; priority when idle
  always @(posedge clk) if (rst_n) begin
    if (prev_wait && s_req.addr !== prev_addr) begin failures++; $display("FAIL grant switched"); end
    prev_wait <= s_req.valid && !s_rsp.ack;
    prev_addr <= s_req.addr;
    if (!prev_wait && s_req.valid) begin
      checks++;
      if (m_req[0].valid && s_req.addr !== m_req[0].addr) failures++;
      else if (!m_req[0].valid && m_req[1].valid && s_req.addr !== m_req[1].addr) failures++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1024; i++) mem.mem[i] = $urandom;
    served = '{0, 0, 0}; prev_wait = 0; prev_addr = 0;
    #12 rst_n = 1;
    wait (served[0] == 200 && served[1] == 200 && served[2] == 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
