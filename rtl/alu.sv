// alu: the integer ALU of the EX stage. Purely combinational: y = a op b for
// the RV32I register/immediate operations (add, subtract, shifts by b[4:0],
// signed and unsigned set-less-than, and, or, xor) plus PASSB, which LUI uses
// to write its immediate unchanged. The operation set is the RV32I one; the
// design only names the ALU, so the encoding (alu_op_e) is this design's own.
module alu
  import rv_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = word_t'($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = a + b;
    endcase
  end
endmodule
