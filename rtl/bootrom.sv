// bootrom: read-only boot memory at 0x00000000-0x00004000 (16 KiB, the
// document's address range), a bus slave answering in the cycle after the
// request. Writes are acknowledged and ignored. The document does not give
// the boot code; this ROM holds a minimal loader computed at elaboration:
//   0x0: auipc t0, 0           ; t0 = 0
//   0x4: lui   t0, JUMP[31:12] ; t0 = start of main memory
//   0x8: csrr  a0, mhartid     ; a0 = hart id, as OpenSBI expects
//   0xc: jalr  x0, 0(t0)       ; jump
// and zero everywhere else. JUMP must be 4 KiB aligned.
module bootrom
  import rv32x_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  parameter logic [31:0] JUMP  = 32'h8000_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);
  localparam int AW = $clog2(WORDS);

  function automatic logic [31:0] rom_word(input int unsigned i);
    unique case (i)
      0: return 32'h0000_0297;                    // auipc t0, 0
      1: return {JUMP[31:12], 5'd5, 7'b0110111};  // lui t0, JUMP>>12
      2: return 32'hF140_2573;                    // csrr a0, mhartid
      3: return 32'h0002_8067;                    // jalr x0, 0(t0)
      default: return 32'h0000_0000;
    endcase
  endfunction

  logic [31:0] rom [WORDS];
  initial for (int i = 0; i < WORDS; i++) rom[i] = rom_word(i);

  logic        pend;
  logic [31:0] q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; q <= '0;
    end else begin
      pend <= req.valid && !pend;
      q    <= rom[req.addr[AW+1:2]];
    end
  end
  assign rsp.ack   = pend;
  assign rsp.rdata = q;
endmodule
