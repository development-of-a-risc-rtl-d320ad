// tb_amoalu: checks every AMO operation of amoalu against a reference
// written from the RV32A definitions, on random and signed-corner operands.
module tb_amoalu;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  amo_op_e op; logic [31:0] m, s, y, e;
  amoalu dut (.op, .mem(m), .src(s), .y);
  initial begin
    repeat (100000) #1;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      op = amo_op_e'(i % 9);
      m = (i % 4 == 0) ? 32'h8000_0001 : $urandom;
      s = (i % 3 == 0) ? 32'h0000_0005 : $urandom;
      #1;
      case (op)
        AMO_SWAP: e = s;
        AMO_ADD:  e = m + s;
        AMO_XOR:  e = m ^ s;
        AMO_AND:  e = m & s;
        AMO_OR:   e = m | s;
        AMO_MIN:  e = (int'(m) < int'(s)) ? m : s;
        AMO_MAX:  e = (int'(m) > int'(s)) ? m : s;
        AMO_MINU: e = (longint'(m) < longint'(s)) ? m : s;
        default:  e = (longint'(m) > longint'(s)) ? m : s;
      endcase
      checks++;
      if (y !== e) begin failures++; if (failures < 10) $display("FAIL op=%0d m=%h s=%h y=%h exp=%h", op, m, s, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
