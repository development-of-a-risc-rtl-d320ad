// uart: memory-mapped UART of the SoC (0x4000_0000-0x4000_1000), built from
// the transmitter, the receiver and a FIFO on each side.
// Registers (this design's map; the document does not give one):
//   0x0 TXDATA  write: queue a byte for sending
//   0x4 RXDATA  read: bit 8 = byte valid, bits 7:0 the oldest received byte,
//               which the read removes
//   0x8 STATUS  bit 0 rx not empty, bit 1 tx fifo full, bit 2 tx idle
//               (fifo empty and line idle)
//   0xC IE      bit 0 interrupt on received data, bit 1 on tx fifo empty
// irq (to the PLIC) is the OR of the enabled conditions, so the device is
// interrupt driven as the document requires. Bus slave answering one cycle
// after the request. Format 8N1 at DIV clocks per bit.
module uart
  import rv32x_pkg::*;
#(
  parameter int unsigned DIV   = 1302,
  parameter int unsigned DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     txd,
  input  logic     rxd,
  output logic     irq
);
  localparam int CNTW = $clog2(DEPTH) + 1;
  logic       tx_empty, tx_full, tx_busy, tx_push, tx_start;
  logic [7:0] tx_head;
  logic       rx_valid, rx_empty, rx_full, rx_pop;
  logic [7:0] rx_byte, rx_head;
  logic [CNTW-1:0] tx_cnt, rx_cnt;
  logic [1:0] ie;
  logic       pend;
  logic [31:0] q;
  logic       acc;
  assign acc = req.valid && !pend;

  assign tx_push  = acc && req.we && req.addr[3:2] == 2'd0;
  assign rx_pop   = acc && !req.we && req.addr[3:2] == 2'd1;
  assign tx_start = !tx_empty && !tx_busy;

  fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_txq (
    .clk, .rst_n, .push(tx_push), .wdata(req.wdata[7:0]), .pop(tx_start),
    .rdata(tx_head), .empty(tx_empty), .full(tx_full), .count(tx_cnt));
  uart_sender #(.DIV(DIV)) u_tx (.clk, .rst_n, .start(tx_start), .data(tx_head), .busy(tx_busy), .txd);
  uart_reciever #(.DIV(DIV)) u_rx (.clk, .rst_n, .rxd, .valid(rx_valid), .data(rx_byte));
  fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_rxq (
    .clk, .rst_n, .push(rx_valid), .wdata(rx_byte), .pop(rx_pop),
    .rdata(rx_head), .empty(rx_empty), .full(rx_full), .count(rx_cnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; q <= '0; ie <= '0;
    end else begin
      pend <= acc;
      if (acc) begin
        unique case (req.addr[3:2])
          2'd1:    q <= {23'd0, !rx_empty, rx_head};
          2'd2:    q <= {29'd0, tx_empty && !tx_busy, tx_full, !rx_empty};
          2'd3:    q <= {30'd0, ie};
          default: q <= '0;
        endcase
        if (req.we && req.addr[3:2] == 2'd3) ie <= req.wdata[1:0];
      end
    end
  end
  assign irq       = (ie[0] && !rx_empty) || (ie[1] && tx_empty);
  assign rsp.ack   = pend;
  assign rsp.rdata = q;
endmodule
