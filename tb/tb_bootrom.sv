// tb_bootrom: reads the boot ROM over the bus and checks the loader words
// (encodings of auipc/lui/csrr/jalr worked out by hand), zero beyond them,
// the one-cycle response and that writes do not change the contents.
module tb_bootrom;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp;
  bootrom dut (.clk, .rst_n, .req, .rsp);
  task automatic acc(logic w, logic [31:0] a, logic [31:0] d, output logic [31:0] r, output int cyc);
    @(negedge clk); req = '{valid: 1, we: w, addr: a, wdata: d, wstrb: 4'hf}; cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!rsp.ack);
    r = rsp.rdata; req.valid = 0;
    @(posedge clk);  // the acknowledge cycle ends the transfer
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] r; int c;
    logic [31:0] exp [5] = '{32'h00000297, 32'h800002b7, 32'hf1402573, 32'h00028067, 32'h0};
    req = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      acc(0, 32'(4 * i), 0, r, c);
      checks++; if (r !== exp[i] || c != 1) begin failures++; $display("FAIL word %0d: %h (%0d cycles)", i, r, c); end
    end
    acc(1, 32'h4, 32'h12345678, r, c);
    acc(0, 32'h4, 0, r, c); checks++; if (r !== exp[1]) failures++;
    acc(0, 32'h3ffc, 0, r, c); checks++; if (r !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
