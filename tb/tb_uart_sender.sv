// tb_uart_sender: sends random bytes and samples the line in the middle of
// every bit: start bit low, 8 data bits LSB first, stop bit high; checks the
// frame length of 10 bit times (DIV = 8 here) and busy.
module tb_uart_sender;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int DIV = 8;
  logic start = 0, busy, txd; logic [7:0] data;
  uart_sender #(.DIV(DIV)) dut (.clk, .rst_n, .start, .data, .busy, .txd);
  int busy_cycles = 0;
  always @(posedge clk) if (busy) busy_cycles++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    data = 0;
    #12 rst_n = 1;
    repeat (3) @(posedge clk);
    checks++; if (txd !== 1) failures++;
    for (int k = 0; k < 50; k++) begin
      logic [7:0] b, got;
      b = 8'($urandom);
      @(negedge clk); data = b; start = 1; busy_cycles = 0; @(negedge clk); start = 0; data = 8'($urandom);
      // now half a cycle into the first bit time
      repeat (DIV / 2 - 1) @(negedge clk);
      checks++; if (txd !== 0) failures++;
      for (int i = 0; i < 8; i++) begin repeat (DIV) @(negedge clk); got[i] = txd; end
      repeat (DIV) @(negedge clk);
      checks++; if (txd !== 1) failures++;
      checks++; if (got !== b) begin failures++; $display("FAIL byte %h got %h", b, got); end
      while (busy) @(negedge clk);
      checks++; if (busy_cycles != 10 * DIV) begin failures++; $display("FAIL frame length %0d", busy_cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
