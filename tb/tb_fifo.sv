// tb_fifo: random push/pop against a queue model; checks order, count,
// full and empty flags, and that pushes when full and pops when empty are
// ignored.
module tb_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full; logic [7:0] wd, rd; logic [4:0] count;
  fifo #(.WIDTH(8), .DEPTH(16)) dut (.clk, .rst_n, .push, .wdata(wd), .pop, .rdata(rd), .empty, .full, .count);
  byte unsigned q[$];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wd = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == 16) ||
          (q.size() > 0 && rd !== q[0])) begin failures++; if (failures < 5) $display("FAIL at %0d", i); end
      push = ($urandom % 100) < ((i / 500) % 2 ? 70 : 30);
      pop  = ($urandom % 100) < 50;
      wd = 8'($urandom);
      @(posedge clk);
      begin
        int n; n = q.size();
        if (pop && n > 0) void'(q.pop_front());
        if (push && n < 16) q.push_back(wd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
