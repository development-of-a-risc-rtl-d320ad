// tb_mmcspi: an SPI mode-0 slave model exchanges bytes with the master;
// checks the byte shifted out on mosi, the byte read back from miso, chip
// select, the busy/done status, the interrupt, and the sclk period: with
// DIV = 0 one bit takes 2 clocks (25 MHz from 50 MHz), with DIV = 3 it takes 8.
module tb_mmcspi;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp; logic sclk, mosi, miso, cs_n, irq;
  mmcspi dut (.clk, .rst_n, .req, .rsp, .sclk, .mosi, .miso, .cs_n, .irq);
  logic [7:0] s_out, s_in; int rises; time t_first, t_last;
  assign miso = s_out[7];
  always @(posedge sclk) begin
    if (!cs_n) s_in <= {s_in[6:0], mosi};
    if (rises == 0) t_first = $time;
    t_last = $time; rises++;
  end
  always @(negedge sclk) if (!cs_n) s_out <= {s_out[6:0], 1'b1};
  task automatic acc(logic w, logic [31:0] a, logic [31:0] d, output logic [31:0] r);
    @(negedge clk); req = '{valid: 1, we: w, addr: a, wdata: d, wstrb: 4'hf};
    do @(posedge clk); while (!rsp.ack);
    #1 r = rsp.rdata; req.valid = 0;
    @(posedge clk);
  endtask
  task automatic chk(string n, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", n); end endtask
  task automatic xfer(logic [7:0] tx, logic [7:0] slave, int div);
    logic [31:0] r;
    s_out = slave; rises = 0;
    acc(1, 32'h4000_100c, div, r);
    acc(1, 32'h4000_1000, tx, r);
    do acc(0, 32'h4000_1004, 0, r); while (r[0]);
    chk("done flag", r[1]);
    chk("irq on done", irq);
    chk("mosi byte", s_in == tx);
    acc(0, 32'h4000_1000, 0, r);
    chk("miso byte", r[7:0] == slave);
    chk("8 clocks", rises == 8);
    chk("bit period", (t_last - t_first) == 7 * 10 * 2 * (div + 1));
    @(posedge clk); chk("irq cleared by read", !irq);
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] r;
    req = '0; s_out = 0; s_in = 0; rises = 0;
    #12 rst_n = 1;
    chk("cs inactive at reset", cs_n && !sclk);
    acc(1, 32'h4000_1008, 3, r); chk("cs asserted", !cs_n);
    xfer(8'h40, 8'hff, 0);
    xfer(8'h95, 8'h01, 3);
    for (int i = 0; i < 10; i++) xfer(8'($urandom), 8'($urandom), i % 3);
    acc(1, 32'h4000_1008, 0, r); chk("cs released", cs_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
