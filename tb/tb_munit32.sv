// tb_munit32: every M-extension operation on random and corner operands
// (division by zero, signed overflow) against a reference computed with
// 64-bit arithmetic; also checks the latency: a multiply is ready 2 cycles
// after req, a divide 34 cycles after req, and that kill abandons a divide.
module tb_munit32;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req = 0, ack = 0, kill = 0, ready; md_op_e op; logic [31:0] a, b, r;
  munit32 dut (.clk, .rst_n, .req, .op, .a, .b, .ack, .kill, .ready, .result(r));

  function automatic logic [31:0] ref_md(md_op_e o, logic [31:0] x, logic [31:0] y);
    longint sx, sy, ux, uy;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    ux = longint'(x); uy = longint'(y);
    case (o)
      MD_MUL:    return 32'(sx * sy);
      MD_MULH:   return 32'((sx * sy) >>> 32);
      MD_MULHSU: begin
        logic signed [63:0] p, xs, yz;
        xs = {{32{x[31]}}, x}; yz = {32'd0, y};
        p = xs * yz; return p[63:32];
      end
      MD_MULHU:  begin
        // unsigned 32x32 -> 64: split to avoid signed overflow
        logic [63:0] p; p = 64'(x) * 64'(y); return p[63:32];
      end
      MD_DIV:  return (y == 0) ? 32'hffffffff : (x == 32'h80000000 && y == 32'hffffffff) ? x : 32'(sx / sy);
      MD_DIVU: return (y == 0) ? 32'hffffffff : 32'(ux / uy);
      MD_REM:  return (y == 0) ? x : (x == 32'h80000000 && y == 32'hffffffff) ? 0 : 32'(sx % sy);
      default: return (y == 0) ? x : 32'(ux % uy);
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(md_op_e o, logic [31:0] x, logic [31:0] y);
    int cyc;
    @(negedge clk); op = o; a = x; b = y; req = 1; cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!ready);
    checks++;
    if (r !== ref_md(o, x, y)) begin failures++; $display("FAIL op=%0d %h %h -> %h exp %h", o, x, y, r, ref_md(o, x, y)); end
    checks++;
    if (cyc != ((o inside {MD_MUL, MD_MULH, MD_MULHSU, MD_MULHU}) ? 2 : 34)) begin
      failures++; $display("FAIL latency op=%0d %0d", o, cyc);
    end
    @(negedge clk); req = 0; ack = 1; @(negedge clk); ack = 0;
  endtask

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (i % 10 == 1) y = 0;
      if (i % 10 == 2) begin x = 32'h80000000; y = 32'hffffffff; end
      if (i % 10 == 3) y = y >> 20;
      run(md_op_e'(i % 8), x, y);
    end
    // kill in the middle of a division, then a fresh operation
    @(negedge clk); op = MD_DIV; a = 100; b = 7; req = 1;
    repeat (5) @(posedge clk);
    @(negedge clk); kill = 1; req = 0; @(negedge clk); kill = 0;
    checks++; if (ready) failures++;
    run(MD_REMU, 100, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
