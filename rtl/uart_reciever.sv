// uart_reciever: UART receiver, 8 data bits, no parity, one stop bit, no
// parity check (the document's format). It waits for a falling edge on the
// synchronised rxd, checks the start bit in its middle (DIV/2 cycles later),
// then samples each data bit every DIV cycles at its middle and the stop
// bit likewise. A complete frame with a high stop bit gives a one-cycle
// `valid` with `data`; a frame with a low stop bit is dropped, and the
// receiver then waits for the line to return high before it looks for the
// next start bit, so a framing error or a break cannot start a frame. DIV = 1302
// is 38400 bit/s at 50 MHz. Two-flop input synchroniser.
module uart_reciever #(
  parameter int unsigned DIV = 1302
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);
  localparam int CW = $clog2(DIV);
  typedef enum logic [2:0] { R_IDLE, R_START, R_DATA, R_STOP, R_WAIT_HIGH } st_e;
  st_e st;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic          s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; cnt <= '0; bitn <= '0; s1 <= 1'b1; s2 <= 1'b1; valid <= 1'b0; data <= '0;
    end else begin
      s1 <= rxd; s2 <= s1;
      valid <= 1'b0;
      unique case (st)
        R_IDLE: if (!s2) begin st <= R_START; cnt <= '0; end
        R_START: if (cnt == CW'(DIV / 2 - 1)) begin
          cnt <= '0;
          if (!s2) begin st <= R_DATA; bitn <= '0; end
          else st <= R_IDLE;
        end else cnt <= cnt + 1'b1;
        R_DATA: if (cnt == CW'(DIV - 1)) begin
          cnt  <= '0;
          data <= {s2, data[7:1]};
          if (bitn == 3'd7) st <= R_STOP;
          bitn <= bitn + 3'd1;
        end else cnt <= cnt + 1'b1;
        R_STOP: if (cnt == CW'(DIV - 1)) begin
          cnt   <= '0;
          valid <= s2;
          st    <= s2 ? R_IDLE : R_WAIT_HIGH;
        end else cnt <= cnt + 1'b1;
        R_WAIT_HIGH: if (s2) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
