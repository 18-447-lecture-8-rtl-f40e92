// decoder: the control unit of the ID stage. From the instruction register
// it produces the control bundle carried down the pipeline (RegWrite,
// MemRead, MemWrite, ALU operation and source, branch and jump kind), the
// register fields rs1/rs2/rd, the sign-extended immediate, and the helper
// predicates useRs1(I) and useRs2(I) that the hazard logic needs.
// Which instruction classes read and write the register file follows the
// register data-hazard table of the design:
//   reads  rs1: R/I-type, LW, SW, Bxx, JALR      reads rs2: R-type, SW, Bxx
//   writes rd : R/I-type, LW, JAL, JALR (and LUI, AUIPC)
// Encodings are standard RV32I. An instruction the core does not implement,
// or a bubble (valid=0), decodes to CTRL_BUBBLE: it writes nothing and uses
// no register. ECALL decodes to a halt marker. Purely combinational.
module decoder
  import rv_pkg::*;
(
  input  word_t    instr,
  input  logic     valid,
  output ctrl_t    ctrl,
  output reg_idx_t rs1,
  output reg_idx_t rs2,
  output reg_idx_t rd,
  output word_t    imm
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];
  assign rs1 = instr[19:15];
  assign rs2 = instr[24:20];
  assign rd  = instr[11:7];

  function automatic alu_op_e arith_op(input logic [2:0] f, input logic alt, input logic is_reg);
    unique case (f)
      3'b000: return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      3'b001: return ALU_SLL;
      3'b010: return ALU_SLT;
      3'b011: return ALU_SLTU;
      3'b100: return ALU_XOR;
      3'b101: return alt ? ALU_SRA : ALU_SRL;
      3'b110: return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl = CTRL_BUBBLE;
    imm  = '0;
    ctrl.funct3 = f3;
    if (valid) begin
      unique case (opc)
        OPC_OP: if (f7 == 7'b0000000 || (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101))) begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1;
          ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1;
          ctrl.alu_op = arith_op(f3, f7[5], 1'b1);
        end
        OPC_OP_IMM: begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1; ctrl.use_rs1 = 1'b1;
          ctrl.alu_src_imm = 1'b1;
          ctrl.alu_op = arith_op(f3, f7[5], 1'b0);
          imm = {{20{instr[31]}}, instr[31:20]};
          if (f3 == 3'b001 || f3 == 3'b101) imm = {27'b0, instr[24:20]};
        end
        OPC_LOAD: if (f3 == 3'b010) begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1; ctrl.mem_read = 1'b1;
          ctrl.use_rs1 = 1'b1; ctrl.alu_src_imm = 1'b1;
          imm = {{20{instr[31]}}, instr[31:20]};
        end
        OPC_STORE: if (f3 == 3'b010) begin
          ctrl.legal = 1'b1; ctrl.mem_write = 1'b1;
          ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1; ctrl.alu_src_imm = 1'b1;
          imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
        end
        OPC_BRANCH: if (f3 != 3'b010 && f3 != 3'b011) begin
          ctrl.legal = 1'b1; ctrl.branch = 1'b1;
          ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1;
          imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
        end
        OPC_JAL: begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1; ctrl.jal = 1'b1;
          imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
        end
        OPC_JALR: if (f3 == 3'b000) begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1; ctrl.jalr = 1'b1;
          ctrl.use_rs1 = 1'b1; ctrl.alu_src_imm = 1'b1;
          imm = {{20{instr[31]}}, instr[31:20]};
        end
        OPC_LUI: begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1;
          ctrl.alu_src_imm = 1'b1; ctrl.alu_op = ALU_PASSB;
          imm = {instr[31:12], 12'b0};
        end
        OPC_AUIPC: begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1;
          ctrl.alu_src_imm = 1'b1; ctrl.alu_a_pc = 1'b1;
          imm = {instr[31:12], 12'b0};
        end
        OPC_SYSTEM: if (instr == 32'h0000_0073) begin
          ctrl.legal = 1'b1; ctrl.halt = 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
