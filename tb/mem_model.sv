// mem_model: behavioural main memory for simulation, standing in for the
// external SDRAM and its controller. It answers each request of the
// rv32x_pkg valid/ack bus LATENCY cycles after it appears (LATENCY >= 1),
// stores WORDS 32-bit words from BASE upward (addresses wrap inside that
// window) and starts with the file HEXFILE (one word per line) at BASE and
// zero elsewhere. Writes honour the byte strobes.
module mem_model
  import rv32x_pkg::*;
#(
  parameter int unsigned WORDS   = 131072,
  parameter int unsigned LATENCY = 2,
  parameter logic [31:0] BASE    = 32'h8000_0000,
  parameter string       HEXFILE = ""
) (
  input  logic     clk,
  input  bus_req_t req,
  output bus_rsp_t rsp
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  int unsigned wait_cnt;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    if (HEXFILE != "") $readmemh(HEXFILE, mem);
    wait_cnt = 0;
    rsp = '0;
  end

  function automatic logic [31:0] peek(input logic [31:0] addr);
    return mem[addr[AW+1:2]];
  endfunction

  always @(posedge clk) begin
    rsp.ack <= 1'b0;
    if (req.valid && !rsp.ack) begin
      if (wait_cnt + 1 >= LATENCY) begin
        wait_cnt <= 0;
        rsp.ack   <= 1'b1;
        rsp.rdata <= mem[req.addr[AW+1:2]];
        if (req.we)
          for (int b = 0; b < 4; b++)
            if (req.wstrb[b]) mem[req.addr[AW+1:2]][8*b +: 8] <= req.wdata[8*b +: 8];
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
  end
endmodule
