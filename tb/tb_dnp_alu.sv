// Self-checking test of dnp_alu: random operands for every operation, compared with a
// reference written with SystemVerilog operators.
module tb_dnp_alu;
  import dnp_pkg::*;
  alu_op_e op;
  word_t a, b, y;
  logic z, n;
  int checks = 0, failures = 0;

  dnp_alu dut (.op, .a, .b, .y, .zero(z), .neg(n));

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t w);
    case (o)
      ALU_ADD: return x + w;
      ALU_SUB: return x - w;
      ALU_AND: return x & w;
      ALU_OR:  return x | w;
      ALU_XOR: return x ^ w;
      ALU_NOT: return ~w;
      ALU_SHL: return x << (w % 16);
      ALU_SHR: begin
        int s = int'($signed(x));
        return word_t'(s >>> (w % 16));
      end
      ALU_SHRL: return x >> (w % 16);
      ALU_MOV: return w;
      default: return x;
    endcase
  endfunction

  initial begin
    for (int k = 0; k < 2000; k++) begin
      op = alu_op_e'(k % 10);
      a = word_t'($urandom);
      b = (k % 3 == 0) ? word_t'($urandom % 16) : word_t'($urandom);
      #1;
      checks++;
      if (y !== ref_alu(op, a, b) || z !== (y == 0) || n !== y[15]) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, ref_alu(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
