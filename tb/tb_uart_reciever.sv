// tb_uart_reciever: drives 8N1 frames at DIV = 16 with random bytes and
// random gaps, and checks each received byte; a frame with a low stop bit
// must be dropped, and a short low glitch must not start a frame.
module tb_uart_reciever;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int DIV = 16;
  logic rxd = 1, valid; logic [7:0] data;
  uart_reciever #(.DIV(DIV)) dut (.clk, .rst_n, .rxd, .valid, .data);
  byte unsigned exp[$]; int got = 0;
  always @(posedge clk) if (rst_n && valid) begin
    checks++;
    if (exp.size() == 0 || data !== exp[0]) begin failures++; $display("FAIL got %h", data); end
    if (exp.size() > 0) void'(exp.pop_front());
    got++;
  end
  task automatic frame(logic [7:0] b, logic stop);
    rxd = 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(posedge clk); end
    rxd = stop; repeat (DIV) @(posedge clk);
    rxd = 1; repeat (DIV) @(posedge clk);
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #12 rst_n = 1;
    repeat (10) @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      logic [7:0] b; b = 8'($urandom);
      if (k % 10 == 5) frame(b, 0);               // framing error: dropped
      else begin exp.push_back(b); frame(b, 1); end
      if (k % 10 == 7) begin rxd = 0; repeat (3) @(posedge clk); rxd = 1; repeat (2 * DIV) @(posedge clk); end
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    repeat (4 * DIV) @(posedge clk);
    checks++; if (exp.size() != 0 || got != 54) begin failures++; $display("FAIL count %0d left %0d", got, exp.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
