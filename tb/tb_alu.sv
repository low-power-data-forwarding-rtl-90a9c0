// tb_alu: random self-check of the slot ALU against an independent reference.
module tb_alu;
  import vliw_pkg::*;
  alu_op_t op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  function automatic word_t model(alu_op_t o, word_t x, word_t z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      ALU_ADD:   return word_t'(longint'(x) + longint'(z));
      ALU_SUB:   return word_t'(longint'(x) - longint'(z));
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_SHL:   return word_t'(longint'(x) * (64'd1 << z[4:0]));
      ALU_SHR:   return word_t'(sx >>> z[4:0]);
      ALU_SHRU:  return word_t'(longint'(x) / (64'd1 << z[4:0]));
      ALU_MUL:   return word_t'(longint'(x) * longint'(z));
      ALU_CMPEQ: return (x == z) ? 32'd1 : 32'd0;
      default:   return (sx < sz) ? 32'd1 : 32'd0;
    endcase
  endfunction

  initial begin
    // the DCT fragment's operations: shr by 8, mul by 181, add 128
    op = ALU_SHR; a = 32'hFFFF_0100; b = 8; #1;
    checks++; if (y !== 32'hFFFF_FF01) begin failures++; $display("shr %h", y); end
    op = ALU_MUL; a = 32'd1000; b = 32'd181; #1;
    checks++; if (y !== 32'd181000) begin failures++; $display("mul %h", y); end
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_t'($urandom_range(0, 10));
      a = $urandom(); b = (i % 3 == 0) ? word_t'($urandom_range(0, 40)) : $urandom();
      if (i % 7 == 0) b = a;
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, model(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
