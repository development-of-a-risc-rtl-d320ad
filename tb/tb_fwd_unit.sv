// tb_fwd_unit: exhaustive-style random test of the bypass selection: the
// Memory stage wins over Writeback, x0 is never forwarded, a producer that
// does not write is ignored.
module tb_fwd_unit;
  int checks = 0, failures = 0;
  logic [4:0] r1, r2, mrd, wrd; logic mwe, wwe; logic [1:0] s1, s2;
  fwd_unit dut (.ex_rs1(r1), .ex_rs2(r2), .mem_we(mwe), .mem_rd(mrd), .wb_we(wwe), .wb_rd(wrd), .sel1(s1), .sel2(s2));
  function automatic logic [1:0] exp_sel(logic [4:0] r);
    if (r == 0) return 0;
    if (mwe && mrd == r) return 1;
    if (wwe && wrd == r) return 2;
    return 0;
  endfunction
  initial begin
    repeat (100000) #1;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      r1 = 5'($urandom_range(0, 7)); r2 = 5'($urandom_range(0, 7));
      mrd = 5'($urandom_range(0, 7)); wrd = 5'($urandom_range(0, 7));
      mwe = 1'($urandom); wwe = 1'($urandom);
      #1; checks += 2;
      if (s1 !== exp_sel(r1)) failures++;
      if (s2 !== exp_sel(r2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
