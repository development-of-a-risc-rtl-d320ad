// tb_reg32: random writes and reads of the register file against a shadow
// array; checks x0 stays zero and the same-cycle write-through read.
module tb_reg32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] ra1, ra2, wa; logic [31:0] rd1, rd2, wd; logic we;
  logic [31:0] shadow [32];
  reg32 dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (i % 4 == 0) ? wa : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== ((ra1 == 0) ? 32'd0 : (we && wa == ra1) ? wd : shadow[ra1])) failures++;
      if (rd2 !== ((ra2 == 0) ? 32'd0 : (we && wa == ra2) ? wd : shadow[ra2])) failures++;
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
