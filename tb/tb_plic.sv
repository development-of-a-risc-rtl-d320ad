// tb_plic: priorities, per-context enables and thresholds, claim returning
// the highest-priority enabled source (lowest ID on a tie), the claimed
// source not re-pending until completed, and the two context outputs.
module tb_plic;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp; logic [31:1] src; logic [1:0] irq;
  plic dut (.clk, .rst_n, .req, .rsp, .src, .irq);
  localparam logic [31:0] B = 32'h0c00_0000;
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
    logic [31:0] r;
    req = '0; src = '0;
    #12 rst_n = 1;
    acc(1, B + 4 * 3, 2, r);  acc(1, B + 4 * 5, 6, r);  acc(1, B + 4 * 7, 6, r);  acc(1, B + 4 * 31, 1, r);
    acc(0, B + 4 * 5, 0, r); chk("priority readback", r == 6);
    acc(1, B + 32'h2000, 32'h8000_00a8, r);           // ctx0: 3, 5, 7, 31
    acc(1, B + 32'h2080, 32'h0000_0008, r);           // ctx1: 3
    src[3] = 1; src[5] = 1; src[7] = 1; src[31] = 1;
    @(posedge clk); @(posedge clk); #1;
    chk("both contexts interrupt", irq == 2'b11);
    acc(0, B + 32'h1000, 0, r); chk("pending bits", r == 32'h8000_00a8);
    acc(1, B + 32'h200000, 6, r);                      // ctx0 threshold 6: nothing above
    @(posedge clk); #1; chk("threshold masks", irq[0] == 0);
    acc(1, B + 32'h200000, 1, r);
    acc(0, B + 32'h200004, 0, r); chk("claim highest (tie -> lowest id)", r == 5);
    acc(0, B + 32'h200004, 0, r); chk("next claim", r == 7);
    acc(0, B + 32'h200004, 0, r); chk("then 3", r == 3);
    acc(0, B + 32'h201004, 0, r); chk("ctx1 nothing left", r == 0);
    @(posedge clk); #1; chk("ctx1 idle", irq[1] == 0);
    acc(0, B + 32'h200004, 0, r); chk("then 31 for ctx0", r == 31);
    acc(0, B + 32'h200004, 0, r); chk("empty claim", r == 0);
    @(posedge clk); #1; chk("ctx0 idle while in service", irq[0] == 0);
    acc(1, B + 32'h200004, 5, r);                      // complete 5, still high -> pending again
    @(posedge clk); @(posedge clk); #1; chk("re-pend after complete", irq[0] == 1);
    acc(0, B + 32'h200004, 0, r); chk("claim 5 again", r == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
