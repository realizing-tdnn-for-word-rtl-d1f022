// DNP-II arithmetic/logic unit.
//
// Combinational 16-bit ALU that performs the functions the chip description lists for it:
// addition, subtraction, shifting and bitwise logic. The result is a = a op b; shifts take
// their amount from the low four bits of b (SHR is arithmetic, SHRL logical). MOV passes b.
// The zero and negative flags describe the result. The operation list and its encoding
// (alu_op_e in dnp_pkg) are this design's choice.
module dnp_alu
  import dnp_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    zero,
  output logic    neg
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOT:  y = ~b;
      ALU_SHL:  y = a << b[3:0];
      ALU_SHR:  y = word_t'($signed(a) >>> b[3:0]);
      ALU_SHRL: y = a >> b[3:0];
      ALU_MOV:  y = b;
      default:  y = a;
    endcase
    zero = (y == '0);
    neg  = y[WORD_W-1];
  end

endmodule
