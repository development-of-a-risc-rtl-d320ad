// tb_clint: mtime counting (with a divider of 4 here), reading and writing
// mtime/mtimecmp halves, the timer interrupt rising when mtime reaches
// mtimecmp and falling when mtimecmp is raised, and msip set and clear.
module tb_clint;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp; logic msip, mtip; logic [63:0] mtime;
  clint #(.TICK_DIV(4)) dut (.clk, .rst_n, .req, .rsp, .msip, .mtip, .mtime);
  task automatic acc(logic w, logic [31:0] a, logic [31:0] d, output logic [31:0] r);
    @(negedge clk); req = '{valid: 1, we: w, addr: a, wdata: d, wstrb: 4'hf};
    do @(posedge clk); while (!rsp.ack);
    #1 r = rsp.rdata; req.valid = 0;
    @(posedge clk);  // the acknowledge cycle ends the transfer
  endtask
  task automatic chk(string n, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", n); end endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] r, t0;
    req = '0;
    #12 rst_n = 1;
    chk("no irq at reset", !mtip && !msip);
    acc(0, 32'h0200_bff8, 0, t0);
    repeat (40) @(posedge clk);
    acc(0, 32'h0200_bff8, 0, r);
    chk("mtime advances by 1 per 4 cycles", r - t0 >= 10 && r - t0 <= 12);
    acc(1, 32'h0200_bffc, 32'h0000_0001, r);
    acc(1, 32'h0200_bff8, 32'hffff_fff0, r);
    acc(0, 32'h0200_bffc, 0, r); chk("mtime high", r == 1);
    acc(1, 32'h0200_4004, 32'h0000_0001, r);
    acc(1, 32'h0200_4000, 32'hffff_fff8, r);
    acc(0, 32'h0200_4000, 0, r); chk("mtimecmp low", r == 32'hffff_fff8);
    chk("not yet", !mtip);
    repeat (40) @(posedge clk);
    chk("mtip at compare", mtip);
    acc(1, 32'h0200_4004, 32'h0000_0002, r);
    @(posedge clk); chk("mtip cleared by new compare", !mtip);
    begin
      logic [63:0] cmp;
      acc(1, 32'h0200_4004, 32'hffff_ffff, r);
      cmp = mtime + 64'd6;
      acc(1, 32'h0200_4000, cmp[31:0], r);
      acc(1, 32'h0200_4004, cmp[63:32], r);
      #1;
      while (mtime < cmp) begin chk("no mtip below compare", !mtip); @(posedge clk); #1; end
      chk("mtip exactly when mtime equals mtimecmp", mtime == cmp && mtip);
    end
    acc(1, 32'h0200_0000, 1, r); chk("msip set", msip);
    acc(0, 32'h0200_0000, 0, r); chk("msip read", r == 1);
    acc(1, 32'h0200_0000, 0, r); chk("msip cleared", !msip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
