// tb_rv32x_dhrystone: runs the Dhrystone 2.1 benchmark on the whole SoC at
// its default parameters. The boot ROM jumps to 0x8000_0000 where
// prog_dhry.hex holds Dhrystone 2.1 (built with GCC -O2 for RV32IMA, no C
// library, 100 runs). The program reads mcycle and minstret around the
// measured loop and writes the benchmark's final variable values, the
// cycle and instruction counts and a done flag to 0x8000_8000.
// The testbench checks every final value against the values Dhrystone 2.1
// defines as correct, and reports cycles per run, CPI and DMIPS/MHz
// (runs * 1e6 / (cycles * 1757)). Main memory answers after LATENCY cycles;
// the benchmark's speed depends on it. The check on the rate is that the
// pipeline reaches at least the 0.448 DMIPS/MHz that the original design
// reports at 50 MHz with its board's SDRAM.
module tb_rv32x_dhrystone;
  import rv32x_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic uart_txd, spi_sclk, spi_mosi, spi_cs_n;
  bus_req_t mem_req;
  bus_rsp_t mem_rsp;
  rv32x_integration dut (
    .clk, .rst_n, .uart_txd, .uart_rxd(1'b1), .spi_sclk, .spi_mosi, .spi_miso(1'b1), .spi_cs_n,
    .ext_irq('0), .mem_req, .mem_rsp);
  mem_model #(.WORDS(131072), .LATENCY(4), .HEXFILE("tb/prog_dhry.hex")) u_mem (
    .clk, .req(mem_req), .rsp(mem_rsp));

  localparam logic [31:0] SIG = 32'h8000_8000;
  localparam int RUNS = 100;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: benchmark did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real dmips_mhz, cpi;
    logic [31:0] cyc, ins;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    while (u_mem.peek(SIG + 32'hffc) == 0) @(posedge clk);
    repeat (10) @(posedge clk);
    check("Int_Glob", u_mem.peek(SIG + 0), 5);
    check("Bool_Glob", u_mem.peek(SIG + 4), 1);
    check("Ch_1_Glob", u_mem.peek(SIG + 8), 65);
    check("Ch_2_Glob", u_mem.peek(SIG + 12), 66);
    check("Arr_1_Glob[8]", u_mem.peek(SIG + 16), 7);
    check("Arr_2_Glob[8][7]", u_mem.peek(SIG + 20), RUNS + 10);
    check("Ptr_Glob->Discr", u_mem.peek(SIG + 24), 0);
    check("Ptr_Glob->Enum_Comp", u_mem.peek(SIG + 28), 2);
    check("Ptr_Glob->Int_Comp", u_mem.peek(SIG + 32), 17);
    check("Next_Ptr_Glob->Discr", u_mem.peek(SIG + 36), 0);
    check("Next_Ptr_Glob->Enum_Comp", u_mem.peek(SIG + 40), 1);
    check("Next_Ptr_Glob->Int_Comp", u_mem.peek(SIG + 44), 18);
    check("Int_1_Loc", u_mem.peek(SIG + 48), 5);
    check("Int_2_Loc", u_mem.peek(SIG + 52), 13);
    check("Int_3_Loc", u_mem.peek(SIG + 56), 7);
    check("Enum_Loc", u_mem.peek(SIG + 60), 1);
    check("Str_Comp", u_mem.peek(SIG + 64), 1);
    check("Str_1_Loc", u_mem.peek(SIG + 68), 1);
    check("Str_2_Loc", u_mem.peek(SIG + 72), 1);
    check("runs", u_mem.peek(SIG + 84), RUNS);
    cyc = u_mem.peek(SIG + 76);
    ins = u_mem.peek(SIG + 80);
    dmips_mhz = real'(RUNS) * 1.0e6 / (real'(cyc) * 1757.0);
    cpi = real'(cyc) / real'(ins);
    $display("Dhrystone: %0d runs, %0d cycles (%0d per run), %0d instructions, CPI %0.3f, %0.3f DMIPS/MHz",
             RUNS, cyc, cyc / RUNS, ins, cpi, dmips_mhz);
    checks++;
    if (dmips_mhz < 0.448) begin failures++; $display("FAIL slower than 0.448 DMIPS/MHz"); end
    checks++;
    if (ins < 200 * RUNS || ins > 600 * RUNS) begin failures++; $display("FAIL implausible instruction count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
