// tb_load_store_unit: the Memory-stage sequencer with a real data cache, a
// real page walker and a behavioural memory. Checks byte/half/word loads
// with sign/zero extension, sub-word stores, misalignment exceptions, AMO
// read-modify-write (old value returned, new value stored), LR/SC success
// and failure, translated accesses through the data TLB with a page walk on
// the first access only, and page faults for an unmapped page, a read-only
// page written, a user page accessed from S-mode without SUM, and a clear
// A bit. Expected values come from a shadow memory model.
module tb_load_store_unit;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req = 0, paging = 0, sum = 0, mxr = 0, flush = 0, clr = 0;
  mem_kind_e kind; logic [2:0] f3; amo_op_e aop; logic [31:0] va, wd;
  priv_e ep;
  logic done, exc; logic [4:0] cause; logic [31:0] rdata;
  logic ptw_req, ptw_done, ptw_fault; tlb_entry_t pent;
  logic dc_req, dc_we, dc_unc, dc_done; logic [31:0] dc_addr, dc_wdata, dc_rdata; logic [3:0] dc_wstrb;
  bus_req_t b_dc, b_pt, b_s; bus_rsp_t r_dc, r_pt, r_s;
  bus_req_t mreq [2]; bus_rsp_t mrsp [2];

  load_store_unit dut (
    .clk, .rst_n, .req, .kind, .f3, .amo_op(aop), .vaddr(va), .wdata(wd),
    .paging, .eff_priv(ep), .sum, .mxr, .tlb_flush(flush), .clr_resv(clr),
    .done, .exc, .exc_cause(cause), .rdata,
    .ptw_req, .ptw_done, .ptw_fault, .ptw_entry(pent),
    .dc_req, .dc_we, .dc_uncached(dc_unc), .dc_addr, .dc_wdata, .dc_wstrb, .dc_done, .dc_rdata);
  cache #(.WAYS(2)) u_dc (.clk, .rst_n, .c_req(dc_req), .c_we(dc_we), .c_uncached(dc_unc), .c_addr(dc_addr),
    .c_wdata(dc_wdata), .c_wstrb(dc_wstrb), .c_done(dc_done), .c_rdata(dc_rdata), .inval(1'b0),
    .bus_req(b_dc), .bus_rsp(r_dc));
  ptw u_ptw (.clk, .rst_n, .req(ptw_req), .va, .satp_ppn(22'h80010), .done(ptw_done), .fault(ptw_fault),
    .entry(pent), .bus_req(b_pt), .bus_rsp(r_pt));
  assign mreq[0] = b_pt; assign mreq[1] = b_dc;
  assign r_pt = mrsp[0]; assign r_dc = mrsp[1];
  mem_arbiter #(.N(2)) u_arb (.clk, .rst_n, .m_req(mreq), .m_rsp(mrsp), .s_req(b_s), .s_rsp(r_s));
  mem_model #(.WORDS(65536), .LATENCY(2)) mem (.clk, .req(b_s), .rsp(r_s));

  int walks;
  always @(posedge clk) if (ptw_done) walks++;

  task automatic op(mem_kind_e k, logic [2:0] f, logic [31:0] a, logic [31:0] d, amo_op_e ao,
                    output logic e, output logic [4:0] c, output logic [31:0] r);
    @(negedge clk); req = 1; kind = k; f3 = f; va = a; wd = d; aop = ao;
    #1; while (!done) begin @(posedge clk); #1; end
    e = exc; c = cause; r = rdata;
    @(posedge clk); #1 req = 0;
  endtask
  task automatic expect_ok(string n, mem_kind_e k, logic [2:0] f, logic [31:0] a, logic [31:0] d,
                           logic [31:0] er, amo_op_e ao = AMO_SWAP, logic chk_r = 1);
    logic e; logic [4:0] c; logic [31:0] r;
    op(k, f, a, d, ao, e, c, r);
    checks++;
    if (e || (chk_r && r !== er)) begin failures++; $display("FAIL %s: exc=%b r=%h exp %h", n, e, r, er); end
  endtask
  task automatic expect_exc(string n, mem_kind_e k, logic [2:0] f, logic [31:0] a, logic [4:0] ec);
    logic e; logic [4:0] c; logic [31:0] r;
    op(k, f, a, 0, AMO_SWAP, e, c, r);
    checks++;
    if (!e || c !== ec) begin failures++; $display("FAIL %s: exc=%b cause=%0d exp %0d", n, e, c, ec); end
  endtask
  function automatic logic [31:0] memw(logic [31:0] a); return mem.mem[a[17:2]]; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ep = PRV_M; kind = MEM_NONE; f3 = 0; va = 0; wd = 0; aop = AMO_SWAP;
    mem.mem[32'h100 >> 2] = 32'h80a1b2c3;
    // page tables: root 0x80010000, L0 0x80011000
    mem.mem[(32'h10000 + 4 * 32'h300) >> 2] = 32'h2000_4401;
    mem.mem[(32'h11000 + 4 * 0) >> 2] = 32'h2000_80c7;    // 0xc0000000 -> 0x80020000 RW A D
    mem.mem[(32'h11000 + 4 * 1) >> 2] = 32'h2000_80c3;    // 0xc0001000 -> 0x80020000 R only
    mem.mem[(32'h11000 + 4 * 2) >> 2] = 32'h2000_80d7;    // 0xc0002000 user RW
    mem.mem[(32'h11000 + 4 * 3) >> 2] = 32'h2000_8087;    // 0xc0003000 A clear
    #12 rst_n = 1;
    // loads with extension
    expect_ok("lb",  MEM_LOAD, 3'b000, 32'h8000_0100, 0, 32'hffffffc3);
    expect_ok("lbu", MEM_LOAD, 3'b100, 32'h8000_0101, 0, 32'h000000b2);
    expect_ok("lh",  MEM_LOAD, 3'b001, 32'h8000_0102, 0, 32'hffff80a1);
    expect_ok("lhu", MEM_LOAD, 3'b101, 32'h8000_0102, 0, 32'h000080a1);
    expect_ok("lw",  MEM_LOAD, 3'b010, 32'h8000_0100, 0, 32'h80a1b2c3);
    // stores
    expect_ok("sb", MEM_STORE, 3'b000, 32'h8000_0103, 32'h11, 0, AMO_SWAP, 0);
    expect_ok("sh", MEM_STORE, 3'b001, 32'h8000_0100, 32'h2233, 0, AMO_SWAP, 0);
    checks++; if (memw(32'h100) !== 32'h11a12233) begin failures++; $display("FAIL store merge %h", memw(32'h100)); end
    expect_ok("lw after st", MEM_LOAD, 3'b010, 32'h8000_0100, 0, 32'h11a12233);
    // misaligned
    expect_exc("lw mis", MEM_LOAD, 3'b010, 32'h8000_0102, EXC_LMISALIGN);
    expect_exc("sh mis", MEM_STORE, 3'b001, 32'h8000_0101, EXC_SMISALIGN);
    expect_exc("amo mis", MEM_AMO, 3'b010, 32'h8000_0106, EXC_SMISALIGN);
    // AMO
    mem.mem[32'h200 >> 2] = 32'd40;
    expect_ok("amoadd", MEM_AMO, 3'b010, 32'h8000_0200, 2, 32'd40, AMO_ADD);
    checks++; if (memw(32'h200) !== 32'd42) failures++;
    expect_ok("amomin", MEM_AMO, 3'b010, 32'h8000_0200, -5, 32'd42, AMO_MIN);
    checks++; if (memw(32'h200) !== -32'd5) failures++;
    // LR/SC
    expect_ok("lr", MEM_LR, 3'b010, 32'h8000_0200, 0, -32'd5);
    expect_ok("sc ok", MEM_SC, 3'b010, 32'h8000_0200, 7, 32'd0);
    checks++; if (memw(32'h200) !== 32'd7) failures++;
    expect_ok("sc fail", MEM_SC, 3'b010, 32'h8000_0200, 9, 32'd1);
    checks++; if (memw(32'h200) !== 32'd7) failures++;
    expect_ok("lr2", MEM_LR, 3'b010, 32'h8000_0200, 0, 32'd7);
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;     // trap in between
    expect_ok("sc after trap", MEM_SC, 3'b010, 32'h8000_0200, 9, 32'd1);
    // paging, S-mode
    paging = 1; ep = PRV_S; walks = 0;
    expect_ok("vm sw", MEM_STORE, 3'b010, 32'hc000_0010, 32'h5555aaaa, 0, AMO_SWAP, 0);
    checks++; if (memw(32'h20010) !== 32'h5555aaaa) begin failures++; $display("FAIL vm store phys"); end
    expect_ok("vm lw", MEM_LOAD, 3'b010, 32'hc000_0010, 0, 32'h5555aaaa);
    checks++; if (walks != 1) begin failures++; $display("FAIL walks %0d", walks); end
    expect_ok("ro lw", MEM_LOAD, 3'b010, 32'hc000_1010, 0, 32'h5555aaaa);
    expect_exc("ro sw", MEM_STORE, 3'b010, 32'hc000_1010, EXC_SPF);
    expect_exc("unmapped", MEM_LOAD, 3'b010, 32'hd000_0000, EXC_LPF);
    expect_exc("user page no SUM", MEM_LOAD, 3'b010, 32'hc000_2000, EXC_LPF);
    sum = 1;
    expect_ok("user page SUM", MEM_LOAD, 3'b010, 32'hc000_2010, 0, 32'h5555aaaa);
    ep = PRV_U;
    expect_ok("user page U", MEM_LOAD, 3'b010, 32'hc000_2010, 0, 32'h5555aaaa);
    expect_exc("super page U", MEM_LOAD, 3'b010, 32'hc000_0010, EXC_LPF);
    ep = PRV_S;
    expect_exc("A clear", MEM_LOAD, 3'b010, 32'hc000_3000, EXC_LPF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
