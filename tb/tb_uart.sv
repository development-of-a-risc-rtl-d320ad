// tb_uart: the memory-mapped UART with its TX output looped back to its RX
// input. Queues several bytes through TXDATA, checks the status bits, that
// all bytes arrive in order through RXDATA with the valid bit, that an empty
// RX read returns the valid bit clear, and the receive and tx-empty
// interrupts with their enables. DIV = 8 here.
module tb_uart;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp; logic txd, irq;
  uart #(.DIV(8), .DEPTH(16)) dut (.clk, .rst_n, .req, .rsp, .txd, .rxd(txd), .irq);
  task automatic acc(logic w, logic [31:0] a, logic [31:0] d, output logic [31:0] r);
    @(negedge clk); req = '{valid: 1, we: w, addr: a, wdata: d, wstrb: 4'hf};
    do @(posedge clk); while (!rsp.ack);
    #1 r = rsp.rdata; req.valid = 0;
    @(posedge clk);
  endtask
  task automatic chk(string n, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", n); end endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] r;
    logic [7:0] msg [5] = '{8'h48, 8'h65, 8'h6c, 8'h6c, 8'h6f};
    req = '0;
    #12 rst_n = 1;
    acc(0, 32'h4000_0008, 0, r); chk("idle status", r == 32'b100);
    chk("no irq when disabled", !irq);
    acc(1, 32'h4000_000c, 2, r); @(posedge clk); chk("tx-empty irq", irq);
    acc(1, 32'h4000_000c, 1, r);
    for (int i = 0; i < 5; i++) acc(1, 32'h4000_0000, msg[i], r);
    acc(0, 32'h4000_0008, 0, r); chk("tx busy", r[2] == 0);
    chk("no rx irq yet", !irq);
    repeat (5 * 10 * 8 + 50) @(posedge clk);
    chk("rx irq", irq);
    acc(0, 32'h4000_0008, 0, r); chk("rx ready, tx idle", r == 32'b101);
    for (int i = 0; i < 5; i++) begin
      acc(0, 32'h4000_0004, 0, r); chk($sformatf("rx byte %0d", i), r == {23'd0, 1'b1, msg[i]});
    end
    acc(0, 32'h4000_0004, 0, r); chk("rx empty", r[8] == 0);
    @(posedge clk); chk("irq cleared", !irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
