// tb_alu32: random and corner-case test of alu32 against a reference model
// written from the RV32I definitions of each operation.
module tb_alu32;
  import rv32x_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op; logic [31:0] a, b, y, e;
  alu32 dut (.op, .a, .b, .y);

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      ALU_ADD:  return 32'(longint'(x) + longint'(z));
      ALU_SUB:  return 32'(longint'(x) - longint'(z));
      ALU_SLL:  return 32'(longint'(x) * (64'd1 << z[4:0]));
      ALU_SLT:  return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU: return (longint'(x) < longint'(z)) ? 32'd1 : 32'd0;
      ALU_XOR:  return x ^ z;
      ALU_SRL:  return 32'(longint'(x) / (64'd1 << z[4:0]));
      ALU_SRA:  return 32'(sx >>> z[4:0]);
      ALU_OR:   return x | z;
      ALU_AND:  return x & z;
      default:  return z;
    endcase
  endfunction

  initial begin
    repeat (100000) #1;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'(i % 11);
      a = (i % 7 == 0) ? 32'h8000_0000 : $urandom;
      b = (i % 5 == 0) ? 32'hffff_ffff : $urandom;
      #1;
      e = ref_alu(op, a, b);
      checks++;
      if (y !== e) begin failures++; if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
