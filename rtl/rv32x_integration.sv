// rv32x_integration: the RV32XSoC top level. One RV32IMA core with Sv32
// MMU, boot ROM, CLINT, PLIC, UART and SPI (MMC) interface on one
// memory-mapped bus (soc_bus), with the main memory bus
// (0x8000_0000-0x8400_0000, 64 MiB) brought out to an external memory
// interface such as an SDRAM controller.
// Interrupt wiring follows the document: CLINT -> MSIP/MTIP, PLIC context 0
// -> MEIP and context 1 -> SEIP. PLIC source 1 is the UART and source 2 the
// SPI interface (numbering is this design's choice); sources 3-31 are
// brought out as ext_irq for further devices.
// Ports: clk, active-low asynchronous rst_n; the UART line pair; the SPI
// signals; mem_req/mem_rsp, the memory bus in the valid/ack protocol of
// rv32x_pkg (the external memory must acknowledge every request, one
// request at a time). The core starts at 0 in the boot ROM, which jumps to
// 0x8000_0000.
module rv32x_integration
  import rv32x_pkg::*;
#(
  parameter int unsigned UART_DIV  = 1302,
  parameter int unsigned CLINT_DIV = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        uart_txd,
  input  logic        uart_rxd,
  output logic        spi_sclk,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        spi_cs_n,
  input  logic [31:3] ext_irq,
  output bus_req_t    mem_req,
  input  bus_rsp_t    mem_rsp
);
  bus_req_t core_req;
  bus_rsp_t core_rsp;
  bus_req_t s_req [6];
  bus_rsp_t s_rsp [6];
  logic        msip, mtip;
  logic [63:0] mtime;
  logic [1:0]  plic_irq;
  logic        uart_irq, spi_irq;

  rv32x_core u_core (
    .clk, .rst_n, .bus_req(core_req), .bus_rsp(core_rsp),
    .msip, .mtip, .meip(plic_irq[0]), .seip(plic_irq[1]), .mtime
  );

  soc_bus u_bus (.clk, .rst_n, .m_req(core_req), .m_rsp(core_rsp), .s_req, .s_rsp);

  bootrom u_rom (.clk, .rst_n, .req(s_req[0]), .rsp(s_rsp[0]));
  clint #(.TICK_DIV(CLINT_DIV)) u_clint (
    .clk, .rst_n, .req(s_req[1]), .rsp(s_rsp[1]), .msip, .mtip, .mtime);
  plic u_plic (
    .clk, .rst_n, .req(s_req[2]), .rsp(s_rsp[2]),
    .src({ext_irq, spi_irq, uart_irq}), .irq(plic_irq));
  uart #(.DIV(UART_DIV)) u_uart (
    .clk, .rst_n, .req(s_req[3]), .rsp(s_rsp[3]), .txd(uart_txd), .rxd(uart_rxd), .irq(uart_irq));
  mmcspi u_spi (
    .clk, .rst_n, .req(s_req[4]), .rsp(s_rsp[4]), .sclk(spi_sclk), .mosi(spi_mosi),
    .miso(spi_miso), .cs_n(spi_cs_n), .irq(spi_irq));

  assign mem_req   = s_req[5];
  assign s_rsp[5]  = mem_rsp;
endmodule
