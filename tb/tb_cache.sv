// tb_cache: random reads and writes through the 2-way data cache
// configuration against a shadow memory; checks every read value, that a
// repeated read of a present line takes no bus transfer (hit in the same
// cycle), that a miss costs one line of bus reads, that writes reach memory
// (write-through), that uncached reads always go to the bus, LRU keeping
// two lines of one set, and invalidation. A direct-mapped instance
// (instruction cache configuration) is checked for conflict misses.
module tb_cache;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req = 0, we = 0, unc = 0, inval = 0, done; logic [31:0] addr, wdata, rdata; logic [3:0] wstrb;
  bus_req_t breq; bus_rsp_t brsp;
  cache #(.SIZE_BYTES(4096), .WAYS(2), .LINE_BYTES(16)) dut (
    .clk, .rst_n, .c_req(req), .c_we(we), .c_uncached(unc), .c_addr(addr), .c_wdata(wdata),
    .c_wstrb(wstrb), .c_done(done), .c_rdata(rdata), .inval, .bus_req(breq), .bus_rsp(brsp));
  mem_model #(.WORDS(65536), .LATENCY(2)) mem (.clk, .req(breq), .rsp(brsp));

  logic req1 = 0, done1; logic [31:0] addr1, rdata1;
  bus_req_t breq1; bus_rsp_t brsp1;
  cache #(.SIZE_BYTES(4096), .WAYS(1), .LINE_BYTES(16)) dut1 (
    .clk, .rst_n, .c_req(req1), .c_we(1'b0), .c_uncached(1'b0), .c_addr(addr1), .c_wdata('0),
    .c_wstrb('0), .c_done(done1), .c_rdata(rdata1), .inval(1'b0), .bus_req(breq1), .bus_rsp(brsp1));
  mem_model #(.WORDS(65536), .LATENCY(2)) mem1 (.clk, .req(breq1), .rsp(brsp1));

  logic [31:0] shadow [16384];
  int xfers, xfers1;
  always @(posedge clk) begin
    if (breq.valid && brsp.ack) xfers++;
    if (breq1.valid && brsp1.ack) xfers1++;
  end

  task automatic access(logic w, logic u, logic [31:0] a, logic [31:0] d, logic [3:0] s, output logic [31:0] r);
    @(negedge clk); req = 1; we = w; unc = u; addr = a; wdata = d; wstrb = s;
    #1; while (!done) begin @(posedge clk); #1; end
    r = rdata;
    @(posedge clk); #1 req = 0;
  endtask
  task automatic rd(logic [31:0] a, logic u = 0);
    logic [31:0] r;
    access(0, u, a, 0, 0, r);
    checks++;
    if (r !== shadow[a[15:2]]) begin failures++; $display("FAIL read %h: %h exp %h", a, r, shadow[a[15:2]]); end
  endtask
  task automatic wrt(logic [31:0] a, logic [31:0] d, logic [3:0] s);
    logic [31:0] r;
    access(1, 0, a, d, s, r);
    for (int b = 0; b < 4; b++) if (s[b]) shadow[a[15:2]][8*b +: 8] = d[8*b +: 8];
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16384; i++) begin
      shadow[i] = $urandom; mem.mem[i] = shadow[i]; mem1.mem[i] = shadow[i];
    end
    #12 rst_n = 1;
    // miss costs a line, then hit costs nothing
    xfers = 0; rd(32'h8000_0100); checks++; if (xfers != 4) begin failures++; $display("FAIL miss xfers %0d", xfers); end
    xfers = 0; rd(32'h8000_0104); rd(32'h8000_010c); checks++; if (xfers != 0) begin failures++; $display("FAIL hit xfers %0d", xfers); end
    // write-through: one transfer, memory updated, cached copy updated
    xfers = 0; wrt(32'h8000_0104, 32'hdeadbeef, 4'b0110);
    checks++; if (xfers != 1 || mem.mem[32'h104 >> 2] !== shadow[32'h104 >> 2]) begin failures++; $display("FAIL write-through"); end
    xfers = 0; rd(32'h8000_0104); checks++; if (xfers != 0) failures++;
    // two lines in one set stay (2-way), a third evicts the least recently used
    rd(32'h8000_0900); rd(32'h8000_0100);        // set of 0x100 now holds 0x100 and 0x900
    xfers = 0; rd(32'h8000_0900); rd(32'h8000_0100); checks++; if (xfers != 0) begin failures++; $display("FAIL 2-way"); end
    rd(32'h8000_1100);                           // evicts 0x900 (LRU)
    xfers = 0; rd(32'h8000_0100); checks++; if (xfers != 0) begin failures++; $display("FAIL LRU kept"); end
    xfers = 0; rd(32'h8000_0900); checks++; if (xfers != 4) begin failures++; $display("FAIL LRU evict"); end
    // uncached read goes to the bus each time
    xfers = 0; rd(32'h8000_0100, 1); rd(32'h8000_0100, 1); checks++; if (xfers != 2) failures++;
    // invalidate
    @(negedge clk); inval = 1; @(negedge clk); inval = 0;
    xfers = 0; rd(32'h8000_0100); checks++; if (xfers != 4) begin failures++; $display("FAIL inval"); end
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] a;
      a = 32'h8000_0000 | ($urandom_range(0, 2047) << 2);
      if ($urandom % 3 == 0) wrt(a, $urandom, 4'($urandom));
      else rd(a);
    end
    // direct-mapped instance: two addresses 4 KiB apart conflict
    begin
      logic [31:0] seq [4] = '{32'h8000_0040, 32'h8000_1040, 32'h8000_0040, 32'h8000_0044};
      int exp_x [4] = '{4, 4, 4, 0};
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); req1 = 1; addr1 = seq[k]; xfers1 = 0;
        #1; while (!done1) begin @(posedge clk); #1; end
        checks++;
        if (rdata1 !== mem1.mem[seq[k][15:2]] || xfers1 != exp_x[k]) begin
          failures++; $display("FAIL dm %h xfers %0d", seq[k], xfers1);
        end
        @(posedge clk); #1 req1 = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
