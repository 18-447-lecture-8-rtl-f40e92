// tb_alu: random operands for every ALU operation, compared with results
// computed here from the RV32I definitions.
module tb_alu;
  import rv_pkg::*;
  alu_op_e op; word_t a, b, y;
  alu dut (.op, .a, .b, .y);
  int checks = 0, failures = 0;
  function automatic word_t ref_y(alu_op_e o, word_t x, word_t z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_SLL: return x << z[4:0];
      ALU_SLT: return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      ALU_SLTU: return (x < z) ? 32'd1 : 32'd0;
      ALU_XOR: return x ^ z;
      ALU_SRL: return x >> z[4:0];
      ALU_SRA: return word_t'($signed(x) >>> z[4:0]);
      ALU_OR: return x | z;
      ALU_AND: return x & z;
      default: return z;
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = alu_op_e'(i % 11);
      a = $urandom(); b = (i % 3 == 0) ? word_t'($urandom_range(0, 40)) : $urandom();
      if (i % 7 == 0) a = 32'h8000_0000;
      #1;
      checks++;
      if (y !== ref_y(op, a, b)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h", op.name(), a, b, y);
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
