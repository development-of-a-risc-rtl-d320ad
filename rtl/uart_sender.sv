// uart_sender: UART transmitter, 8 data bits, no parity, one stop bit
// (the document's format). `start` with `data` begins a frame when `busy`
// is low; each bit lasts DIV clock cycles. DIV = 1302 gives 38400 bit/s
// from the document's 50 MHz clock (50e6 / 38400 = 1302.08). The line idles
// high. A frame takes 10 * DIV cycles.
module uart_sender #(
  parameter int unsigned DIV = 1302
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);
  localparam int CW = $clog2(DIV);
  logic [CW-1:0] cnt;
  logic [3:0]    bitn;
  logic [9:0]    sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; bitn <= '0; sh <= '1; txd <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        sh   <= {1'b1, data, 1'b0};
        busy <= 1'b1; cnt <= '0; bitn <= '0;
        txd  <= 1'b0;
      end
    end else begin
      if (cnt == CW'(DIV - 1)) begin
        cnt <= '0;
        if (bitn == 4'd9) begin
          busy <= 1'b0; txd <= 1'b1;
        end else begin
          bitn <= bitn + 4'd1;
          txd  <= sh[bitn + 4'd1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
