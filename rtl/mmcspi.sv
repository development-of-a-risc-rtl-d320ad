// mmcspi: memory-mapped SPI master for an MMC/SD card in SPI mode
// (0x4000_1000-0x4000_2000). A byte written to DATA is shifted out MSB first
// on mosi while the byte from miso is shifted in (SPI mode 0: data changes
// on the falling edge of sclk and is sampled on its rising edge). The sclk
// half period is DIV+1 clock cycles: DIV = 0 gives the document's 25 MHz
// from a 50 MHz clock; software raises DIV for the slow (at most 400 kHz)
// card initialisation phase.
// Registers (this design's map; the document does not give one):
//   0x0 DATA    write: start a byte transfer; read: last received byte
//               (reading clears the done flag)
//   0x4 STATUS  bit 0 busy, bit 1 done
//   0x8 CTRL    bit 0 chip select asserted (cs_n low), bit 1 interrupt enable
//   0xC DIV     clock divider
// irq (to the PLIC) is done AND interrupt enable. The card protocol
// (commands, CRC, data tokens) is left to software. Bus slave answering
// one cycle after the request.
module mmcspi
  import rv32x_pkg::*;
#(
  parameter logic [7:0] DIV_RESET = 8'd0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     sclk,
  output logic     mosi,
  input  logic     miso,
  output logic     cs_n,
  output logic     irq
);
  logic [7:0] div, cnt, tx, rx;
  logic [3:0] nbit;
  logic       busy, done, cs, ie, pend;
  logic [31:0] q;
  logic       acc;
  assign acc = req.valid && !pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= DIV_RESET; cnt <= '0; tx <= '1; rx <= '0; nbit <= '0; busy <= 1'b0;
      done <= 1'b0; cs <= 1'b0; ie <= 1'b0; pend <= 1'b0; q <= '0; sclk <= 1'b0;
    end else begin
      pend <= acc;
      if (busy) begin
        if (cnt == div) begin
          cnt <= '0;
          if (!sclk) begin
            sclk <= 1'b1;
            rx   <= {rx[6:0], miso};
          end else begin
            sclk <= 1'b0;
            tx   <= {tx[6:0], 1'b1};
            if (nbit == 4'd7) begin busy <= 1'b0; done <= 1'b1; end
            nbit <= nbit + 4'd1;
          end
        end else cnt <= cnt + 8'd1;
      end
      if (acc) begin
        unique case (req.addr[3:2])
          2'd0: begin
            q <= {24'd0, rx};
            if (req.we) begin
              if (!busy) begin tx <= req.wdata[7:0]; busy <= 1'b1; nbit <= '0; cnt <= '0; done <= 1'b0; end
            end else done <= 1'b0;
          end
          2'd1: q <= {30'd0, done, busy};
          2'd2: begin q <= {30'd0, ie, cs}; if (req.we) begin cs <= req.wdata[0]; ie <= req.wdata[1]; end end
          default: begin q <= {24'd0, div}; if (req.we) div <= req.wdata[7:0]; end
        endcase
      end
    end
  end
  assign mosi      = tx[7];
  assign cs_n      = !cs;
  assign irq       = done && ie;
  assign rsp.ack   = pend;
  assign rsp.rdata = q;
endmodule
