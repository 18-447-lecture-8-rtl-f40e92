// tb_decoder: one instruction of every class with random fields; checks
// the hazard-relevant control bits (RegWrite, MemRead, MemWrite, useRs1,
// useRs2), the jump/branch/halt kind, the register fields and the immediate
// against the instruction-class table, and that a bubble decodes to nothing.
module tb_decoder;
  import rv_pkg::*;
  import rv_asm_pkg::*;
  word_t instr, imm; logic valid; ctrl_t ctrl; reg_idx_t rs1, rs2, rd;
  decoder dut (.*);
  int checks = 0, failures = 0;
  // expected bits: {reg_write, mem_read, mem_write, use_rs1, use_rs2, branch, jal, jalr, halt}
  task automatic t(string nm, u32 in, bit [8:0] e, word_t eimm, bit chk_imm);
    instr = in; valid = 1; #1;
    checks++;
    if ({ctrl.reg_write, ctrl.mem_read, ctrl.mem_write, ctrl.use_rs1, ctrl.use_rs2,
         ctrl.branch, ctrl.jal, ctrl.jalr, ctrl.halt} !== e || !ctrl.legal) begin
      failures++; $display("FAIL %s ctrl", nm);
    end
    if (chk_imm) begin
      checks++;
      if (imm !== eimm) begin failures++; $display("FAIL %s imm %h exp %h", nm, imm, eimm); end
    end
    valid = 0; #1;
    checks++;
    if (ctrl.reg_write || ctrl.mem_write || ctrl.use_rs1 || ctrl.use_rs2 || ctrl.branch || ctrl.legal) begin
      failures++; $display("FAIL %s bubble", nm);
    end
  endtask
  initial begin
    for (int i = 0; i < 200; i++) begin
      int a, b, d, im, br, jo;
      a = $urandom_range(0, 31); b = $urandom_range(0, 31); d = $urandom_range(0, 31);
      im = $urandom_range(0, 4095) - 2048;
      br = ($urandom_range(0, 2047) - 1024) * 2;
      jo = ($urandom_range(0, 65535) - 32768) * 2;
      t("add",  ADD(d, a, b),  9'b100110000, 0, 0);
      checks++; if (rs1 != a || rs2 != b || rd != d) begin failures++; $display("FAIL fields"); end
      t("sub",  SUB(d, a, b),  9'b100110000, 0, 0);
      instr = SUB(d, a, b); valid = 1; #1; checks++; if (ctrl.alu_op != ALU_SUB) failures++;
      t("addi", ADDI(d, a, im), 9'b100100000, word_t'(im), 1);
      t("lw",   LW(d, im, a),   9'b110100000, word_t'(im), 1);
      t("sw",   SW(b, im, a),   9'b001110000, word_t'(im), 1);
      t("beq",  BEQ(a, b, br),  9'b000111000, word_t'(br), 1);
      t("jal",  JAL(d, jo),     9'b100000100, word_t'(jo), 1);
      t("jalr", JALR(d, a, im), 9'b100100010, word_t'(im), 1);
      t("lui",  LUI(d, im & 'hfffff), 9'b100000000, word_t'((im & 'hfffff) << 12), 1);
    end
    t("ecall", ECALL(), 9'b000000001, 0, 0);
    instr = 32'h0000_0000; valid = 1; #1;
    checks++; if (ctrl.legal || ctrl.reg_write || ctrl.mem_write) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
