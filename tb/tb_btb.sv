// tb_btb: checks allocation of a taken branch, the 2-bit counter's
// hysteresis (one not-taken does not stop a strongly-taken prediction, two
// do), target update, tag mismatch and an independent random model.
module tb_btb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] f_pc, f_target, u_pc, u_target; logic f_taken, u_valid = 0, u_taken;
  btb #(.ENTRIES(32)) dut (.clk, .rst_n, .f_pc, .f_taken, .f_target, .u_valid, .u_pc, .u_taken, .u_target);

  // reference model
  logic        mv [32]; logic [24:0] mt [32]; logic [31:0] mg [32]; logic [1:0] mc [32];

  task automatic upd(logic [31:0] pc, logic tk, logic [31:0] tg);
    int i; i = pc[6:2];
    @(negedge clk); u_valid = 1; u_pc = pc; u_taken = tk; u_target = tg;
    @(posedge clk); #1 u_valid = 0;
    if (mv[i] && mt[i] == pc[31:7]) begin
      if (tk) begin mg[i] = tg; if (mc[i] != 3) mc[i]++; end
      else if (mc[i] != 0) mc[i]--;
    end else if (tk) begin mv[i] = 1; mt[i] = pc[31:7]; mg[i] = tg; mc[i] = 2; end
  endtask
  task automatic look(logic [31:0] pc);
    int i; logic e; i = pc[6:2];
    f_pc = pc; #1;
    e = mv[i] && mt[i] == pc[31:7] && mc[i][1];
    checks++;
    if (f_taken !== e || (e && f_target !== mg[i])) begin
      failures++; $display("FAIL lookup %h: %b %h exp %b %h", pc, f_taken, f_target, e, mg[i]);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++) begin mv[i] = 0; mc[i] = 0; mt[i] = 0; mg[i] = 0; end
    f_pc = 0; u_pc = 0; u_taken = 0; u_target = 0;
    #12 rst_n = 1;
    look(32'h8000_0040);
    upd(32'h8000_0040, 1, 32'h8000_0000);
    look(32'h8000_0040); checks++; if (!f_taken) failures++;
    upd(32'h8000_0040, 1, 32'h8000_0000);   // counter 3
    upd(32'h8000_0040, 0, 0);               // counter 2: still taken
    look(32'h8000_0040); checks++; if (!f_taken) failures++;
    upd(32'h8000_0040, 0, 0);               // counter 1: not taken
    look(32'h8000_0040); checks++; if (f_taken) failures++;
    look(32'h9000_0040); checks++; if (f_taken) failures++;  // other tag, same index
    for (int k = 0; k < 3000; k++) begin
      logic [31:0] pc;
      pc = {25'($urandom_range(0, 3)), 5'($urandom), 2'b00};
      if ($urandom % 2) upd(pc, 1'($urandom), $urandom & ~32'd3);
      look({25'($urandom_range(0, 3)), 5'($urandom), 2'b00});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
