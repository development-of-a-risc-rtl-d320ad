// tb_rv32x_full: the same end-to-end program and checks as
// tb_rv32x_integration, but with the SoC at its default parameters: the UART
// runs at 1302 clocks per bit (38400 bit/s from 50 MHz), so each character
// takes 13020 clocks on the line, and the CLINT counts every clock.
// The boot ROM jumps to main memory, the program runs all its tests, sends
// "OK" on the UART, exchanges a byte on SPI, takes a timer interrupt and a
// UART receive interrupt through the PLIC, and runs code under Sv32 paging.
module tb_rv32x_full;
  import rv32x_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int UDIV = 1302;
  int checks = 0, failures = 0;

  logic uart_txd, uart_rxd, spi_sclk, spi_mosi, spi_miso, spi_cs_n;
  bus_req_t mem_req;
  bus_rsp_t mem_rsp;

  rv32x_integration dut (
    .clk, .rst_n, .uart_txd, .uart_rxd, .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n,
    .ext_irq('0), .mem_req, .mem_rsp);

  mem_model #(.WORDS(131072), .LATENCY(3), .HEXFILE("tb/prog_top.hex")) u_mem (
    .clk, .req(mem_req), .rsp(mem_rsp));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08x expected %08x", what, got, exp);
    end
  endtask

  // ---------------- UART line monitor (device side receiver)
  byte unsigned txt[$];
  initial begin
    forever begin
      @(negedge uart_txd);
      repeat (UDIV / 2) @(posedge clk);
      begin
        logic [7:0] b;
        for (int i = 0; i < 8; i++) begin
          repeat (UDIV) @(posedge clk);
          b[i] = uart_txd;
        end
        repeat (UDIV) @(posedge clk);
        txt.push_back(b);
      end
    end
  end

  // ---------------- UART line driver: send 0x5a once the timer test is done
  task automatic uart_send(input logic [7:0] b);
    uart_rxd = 1'b0;
    repeat (UDIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (UDIV) @(posedge clk); end
    uart_rxd = 1'b1;
    repeat (UDIV) @(posedge clk);
  endtask

  // ---------------- SPI slave: answers 0xa5, records what it receives
  logic [7:0] spi_out = 8'ha5, spi_in = 8'h00;
  int spi_bits = 0;
  assign spi_miso = spi_out[7];
  always @(posedge spi_sclk) if (!spi_cs_n) begin spi_in <= {spi_in[6:0], spi_mosi}; spi_bits++; end
  always @(negedge spi_sclk) if (!spi_cs_n) spi_out <= {spi_out[6:0], 1'b1};

  // ---------------- mechanism counters
  int n_fwd, n_loaduse, n_mispred, n_btb_hit, n_icmiss, n_dcmiss, n_mdstall, n_exc,
      n_irq, n_walk, n_tlbhit, n_amo, n_scfail, n_fencei, n_memstall, n_arb;
  initial begin
    n_fwd = 0; n_loaduse = 0; n_mispred = 0; n_btb_hit = 0; n_icmiss = 0; n_dcmiss = 0;
    n_mdstall = 0; n_exc = 0; n_irq = 0; n_walk = 0; n_tlbhit = 0; n_amo = 0; n_scfail = 0;
    n_fencei = 0; n_memstall = 0; n_arb = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.idex.valid && (dut.u_core.fsel1 != 0 || dut.u_core.fsel2 != 0)) n_fwd++;
    if (dut.u_core.stall_id && !dut.u_core.stall_ex && !dut.u_core.stall_mem) n_loaduse++;
    if (dut.u_core.redir_ex) n_mispred++;
    if (dut.u_core.ex_go && dut.u_core.idex.pred_taken && !dut.u_core.ex_mispredict) n_btb_hit++;
    if (dut.u_core.m_req[2].valid && dut.u_core.m_rsp[2].ack) n_icmiss++;
    if (dut.u_core.m_req[1].valid && dut.u_core.m_rsp[1].ack && dut.u_core.u_dcache.st == 1) n_dcmiss++;
    if (dut.u_core.stall_ex && !dut.u_core.stall_mem) n_mdstall++;
    if (dut.u_core.trap && !dut.u_core.trap_irq) n_exc++;
    if (dut.u_core.trap && dut.u_core.trap_irq) n_irq++;
    if (dut.u_core.ptw_done) n_walk++;
    if (dut.u_core.paging_d && dut.u_core.lsu_done && !dut.u_core.lsu_exc) n_tlbhit++;
    if (dut.u_core.lsu_done && dut.u_core.exmem.c.mem == MEM_AMO) n_amo++;
    if (dut.u_core.lsu_done && dut.u_core.exmem.c.mem == MEM_SC && dut.u_core.lsu_rdata == 1) n_scfail++;
    if (dut.u_core.ic_inval) n_fencei++;
    if (dut.u_core.stall_mem) n_memstall++;
    if (dut.u_core.m_req[2].valid && (dut.u_core.m_req[1].valid || dut.u_core.m_req[0].valid)) n_arb++;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  // ---------------- watchdog
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] SIG = 32'h8000_8000;
  logic done_seen = 1'b0, sent = 1'b0;
  always @(posedge clk)
    if (mem_req.valid && mem_rsp.ack && mem_req.we && mem_req.addr == SIG + 32'hffc) done_seen <= 1'b1;

  initial begin
    uart_rxd = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        wait (u_mem.mem[(SIG - 32'h8000_0000 + 84) >> 2] == 32'd7);
        uart_send(8'h5a);
      end
    join_none
    wait (done_seen);
    repeat (20 * UDIV) @(posedge clk);
    begin
      logic [31:0] exp [28];
      exp = '{32'd17, 32'd20, 32'd160, 32'd1, 32'd18, 32'd60, -32'd21, -32'd2, -32'd1, 32'd2,
              32'hffffffff, 32'h80a1b2c3, 32'h80a100b2, 32'hffffffc3, 32'hffff80a1, 32'd11,
              32'd37, 32'd2, 32'd8, 32'd42, 32'ha5, 32'd7, 32'h15a, 32'h12345678, 32'd13,
              32'h12345678, 32'd6, 32'd1};
      for (int i = 0; i < 28; i++)
        check($sformatf("signature word %0d", i), u_mem.peek(SIG + 32'(4 * i)), exp[i]);
    end
    check("uart chars", 32'(txt.size()), 32'd2);
    if (txt.size() == 2) begin
      check("uart char 0", 32'(txt[0]), 32'h4f);
      check("uart char 1", 32'(txt[1]), 32'h4b);
    end
    check("spi byte to card", {24'd0, spi_in}, 32'h3c);
    $display("mechanism counts:");
    need("operand forwarding", n_fwd);
    need("load-use stall", n_loaduse);
    need("branch mispredict/redirect", n_mispred);
    need("BTB correct taken prediction", n_btb_hit);
    need("icache refill word", n_icmiss);
    need("dcache refill word", n_dcmiss);
    need("mul/div stall", n_mdstall);
    need("exception trap", n_exc);
    need("interrupt trap", n_irq);
    need("page table walk", n_walk);
    need("translated data access", n_tlbhit);
    need("AMO", n_amo);
    need("SC failure", n_scfail);
    need("FENCE.I invalidation", n_fencei);
    need("memory stage stall", n_memstall);
    need("bus arbitration conflict", n_arb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
