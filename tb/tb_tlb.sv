// tb_tlb: fills 4 KiB and 4 MiB entries, checks hits, physical addresses
// and permission bits, misses for other pages, round-robin replacement
// once more than ENTRIES pages are filled, and flush.
module tb_tlb;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] va; logic hit; logic [33:0] pa; logic [5:0] perm;
  logic fill = 0, flush = 0; tlb_entry_t fe;
  tlb #(.ENTRIES(4)) dut (.clk, .rst_n, .va, .hit, .pa, .perm, .fill, .fill_entry(fe), .flush);
  task automatic put(logic [19:0] vpn, logic [21:0] ppn, logic mega, logic [5:0] p);
    @(negedge clk); fe = '{valid: 1, vpn: vpn, ppn: ppn, mega: mega, d: p[5], a: p[4], u: p[3], x: p[2], w: p[1], r: p[0]};
    fill = 1; @(negedge clk); fill = 0;
  endtask
  task automatic look(logic [31:0] v, logic eh, logic [33:0] ep, logic [5:0] eperm);
    va = v; #1; checks++;
    if (hit !== eh || (eh && (pa !== ep || perm !== eperm))) begin
      failures++; $display("FAIL va=%h hit=%b pa=%h perm=%b", v, hit, pa, perm);
    end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    va = 0; fe = '0;
    #12 rst_n = 1;
    look(32'hc000_0123, 0, 0, 0);
    put(20'hc0000, 22'h80020, 0, 6'b110011);
    look(32'hc000_0123, 1, 34'h0_8002_0123, 6'b110011);
    look(32'hc000_1123, 0, 0, 0);
    put(20'h80000, 22'h80000, 1, 6'b110111);       // 4 MiB superpage
    look(32'h803f_fffc, 1, 34'h0_803f_fffc, 6'b110111);
    look(32'h8040_0000, 0, 0, 0);
    put(20'h00001, 22'h3fffff, 0, 6'b011001);      // 34-bit physical address
    look(32'h0000_1abc, 1, 34'h3_ffff_fabc, 6'b011001);
    put(20'h00002, 22'h00010, 0, 6'b110001);       // fourth entry
    put(20'h00003, 22'h00011, 0, 6'b110001);       // replaces the first (round-robin)
    look(32'hc000_0123, 0, 0, 0);
    look(32'h0000_3000, 1, 34'h0_0001_1000, 6'b110001);
    look(32'h803f_fffc, 1, 34'h0_803f_fffc, 6'b110111);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    look(32'h803f_fffc, 0, 0, 0);
    look(32'h0000_3000, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
