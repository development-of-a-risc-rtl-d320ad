// tb_ptw: builds Sv32 page tables in a behavioural memory and checks the
// walker's results: a 4 KiB leaf after two reads, a 4 MiB superpage after
// one, and faults for an invalid PTE, a misaligned superpage, a W-only PTE
// and a pointer at the last level. Also checks the PTE addresses read.
module tb_ptw;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req = 0, done, fault; logic [31:0] va; tlb_entry_t ent;
  bus_req_t breq; bus_rsp_t brsp;
  ptw dut (.clk, .rst_n, .req, .va, .satp_ppn(22'h80010), .done, .fault, .entry(ent), .bus_req(breq), .bus_rsp(brsp));
  mem_model #(.WORDS(65536), .LATENCY(2)) mem (.clk, .req(breq), .rsp(brsp));
  int reads;
  always @(posedge clk) if (breq.valid && brsp.ack) reads++;

  task automatic wr(logic [31:0] a, logic [31:0] d); mem.mem[(a - 32'h8000_0000) >> 2] = d; endtask
  task automatic walk(logic [31:0] v, logic efault, logic [21:0] eppn, logic emega, int ereads);
    @(negedge clk); va = v; req = 1; reads = 0;
    do @(posedge clk); while (!done);
    #1; req = 0;
    checks++;
    if (fault !== efault || (!efault && (ent.ppn !== eppn || ent.mega !== emega || ent.vpn !== v[31:12] || !ent.valid))
        || reads != ereads) begin
      failures++; $display("FAIL va=%h fault=%b ppn=%h mega=%b reads=%0d", v, fault, ent.ppn, ent.mega, reads);
    end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // root at 0x80010000, second level at 0x80011000
    wr(32'h8001_0000 + 4 * 32'h300, 32'h2000_4401);          // VA 0xc0000000 -> table
    wr(32'h8001_1000 + 4 * 5,       32'h2000_80c7);          // VA 0xc0005000 -> 0x80020 RW
    wr(32'h8001_1000 + 4 * 6,       32'h0000_0000);          // invalid
    wr(32'h8001_1000 + 4 * 7,       32'h2000_8405);          // W without R: reserved
    wr(32'h8001_1000 + 4 * 8,       32'h2000_4401);          // pointer at level 0
    wr(32'h8001_0000 + 4 * 32'h200, 32'h2000_00cf);          // 4 MiB page at 0x80000000
    wr(32'h8001_0000 + 4 * 32'h201, 32'h2000_08cf);          // misaligned superpage
    #12 rst_n = 1;
    walk(32'hc000_5abc, 0, 22'h80020, 0, 2);
    walk(32'h8012_3456, 0, 22'h80000, 1, 1);
    walk(32'hc000_6000, 1, 0, 0, 2);
    walk(32'hc000_7000, 1, 0, 0, 2);
    walk(32'hc000_8000, 1, 0, 0, 2);
    walk(32'h8040_0000, 1, 0, 0, 1);
    walk(32'h0000_0000, 1, 0, 0, 1);
    checks++; if (ent.r !== 1'b1 || ent.x !== 1'b1) failures++;  // last good entry was RWX superpage
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
