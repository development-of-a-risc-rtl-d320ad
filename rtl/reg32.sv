// reg32: integer register file, 32 registers of 32 bits.
// Two asynchronous read ports (Decode) and one synchronous write port
// (Writeback). x0 always reads zero. A write and a read of the same register
// in one cycle return the new value (write-through), so Writeback needs no
// separate bypass into Decode. The port count follows the pipeline of the
// core; the write-through read is this design's choice.
module reg32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] regs [1:32-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    if (ra1 == 5'd0)                rd1 = '0;
    else if (we && wa == ra1)       rd1 = wd;
    else                            rd1 = regs[ra1];
    if (ra2 == 5'd0)                rd2 = '0;
    else if (we && wa == ra2)       rd2 = wd;
    else                            rd2 = regs[ra2];
  end
endmodule
