// tb_rv32x_core: the pipeline on its own, connected straight to a behavioural
// memory (latency 2) and starting at 0x80000000 with prog_core.hex. The
// program sorts 32 pseudo-random words and writes a weighted checksum, runs
// a FENCE/AMOSWAP/AMOADD sequence, counts to 3000 in a loop holding a FENCE
// and an AMOADD while the testbench fires machine interrupts at random
// (software, timer or external line, chosen at random), and then in S-mode
// executes 500 illegal instructions delegated to S-mode while machine
// interrupts keep arriving. These three parts cover known hazards of an
// in-order pipeline with precise traps: an instruction executed twice around
// an interrupt return, an AMO after a FENCE executed twice, and a machine
// interrupt landing right after a supervisor exception and corrupting its
// state. The machine handler stores to ACK; the testbench then drops the line.
// The testbench computes the sorted array and checksum itself, compares the
// signature words, and counts interrupts, S-mode traps and interrupts that
// arrived while the hart was in S-mode.
module tb_rv32x_core;
  import rv32x_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  logic msip = 0, mtip = 0, meip = 0;
  logic [63:0] mtime = 0;
  always @(posedge clk) mtime <= mtime + 1;

  rv32x_core #(.RESET_PC(32'h8000_0000)) dut (
    .clk, .rst_n, .bus_req, .bus_rsp, .msip, .mtip, .meip, .seip(1'b0), .mtime);
  mem_model #(.WORDS(16384), .LATENCY(2), .HEXFILE("tb/prog_core.hex")) u_mem (
    .clk, .req(bus_req), .rsp(bus_rsp));

  localparam logic [31:0] SIG = 32'h8000_8000, ACK = 32'h8000_9ff0, STORM = 32'h8000_9ff4;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08x expected %08x", what, got, exp);
    end
  endtask

  // interrupt source: raise one line at a random time, drop it on ACK
  int n_ack = 0, n_raise = 0, n_irq = 0, n_irq_s = 0, n_sexc = 0;
  logic wr_ack;
  assign wr_ack = bus_req.valid && bus_rsp.ack && bus_req.we && bus_req.addr == ACK;
  initial begin
    forever begin
      @(posedge clk);
      if (wr_ack) begin
        n_ack++;
        msip <= 0; mtip <= 0; meip <= 0;
        @(posedge clk);
      end else if (u_mem.peek(STORM) == 1 && !(msip || mtip || meip) && ($urandom % 24) == 0) begin
        n_raise++;
        case ($urandom % 3)
          0: msip <= 1;
          1: mtip <= 1;
          default: meip <= 1;
        endcase
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.trap && dut.trap_irq) begin
      n_irq++;
      if (dut.priv == PRV_S) n_irq_s++;
    end
    if (dut.trap && !dut.trap_irq && dut.priv == PRV_S && dut.exmem.c.valid_op == 1'b0) n_sexc++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] arr [32];
    logic [31:0] x, sum, t;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    while (u_mem.peek(SIG + 32'hffc) == 0) @(posedge clk);
    repeat (10) @(posedge clk);
    check("program ended normally", u_mem.peek(SIG + 32'hffc), 32'd1);
    check("no unexpected M exception", u_mem.peek(SIG + 60), 32'd0);
    // reference sort and checksum
    x = 32'd12345;
    for (int i = 0; i < 32; i++) begin x = x * 32'd1103515245 + 32'd12345; arr[i] = x; end
    for (int i = 0; i < 31; i++)
      for (int j = 0; j < 31 - i; j++)
        if ($signed(arr[j]) > $signed(arr[j+1])) begin t = arr[j]; arr[j] = arr[j+1]; arr[j+1] = t; end
    sum = 0;
    for (int i = 0; i < 32; i++) begin
      sum += arr[i] * 32'(i + 1);
      check($sformatf("sorted word %0d", i), u_mem.peek(SIG + 32'h100 + 32'(4 * i)), arr[i]);
    end
    check("checksum", u_mem.peek(SIG), sum);
    check("amoswap old value", u_mem.peek(SIG + 4), 32'd100);
    check("amoadd old value 1", u_mem.peek(SIG + 8), 32'd7);
    check("amoadd old value 2", u_mem.peek(SIG + 12), 32'd14);
    check("amo final memory", u_mem.peek(SIG + 16), 32'd21);
    check("loop count under interrupts", u_mem.peek(SIG + 20), 32'd3000);
    check("amoadd count under interrupts", u_mem.peek(SIG + 24), 32'd3000);
    check("S-mode traps with right cause/epc", u_mem.peek(SIG + 28), 32'd500);
    check("S-mode traps with wrong state", u_mem.peek(SIG + 32), 32'd0);
    check("S-mode loop body count", u_mem.peek(SIG + 36), 32'd500);
    check("handled interrupts = acks", u_mem.peek(SIG + 40), 32'(n_ack));
    check("interrupt traps = acks", 32'(n_irq), 32'(n_ack));
    check("delegated illegal traps", 32'(n_sexc), 32'd500);
    $display("interrupts raised %0d, taken %0d, taken in S-mode %0d", n_raise, n_irq, n_irq_s);
    checks++; if (n_irq < 50) begin failures++; $display("FAIL too few interrupts"); end
    checks++; if (n_irq_s == 0) begin failures++; $display("FAIL no interrupt in S-mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
