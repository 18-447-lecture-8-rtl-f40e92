// rv_pkg: types and constants shared by the 5-stage pipeline and its hazard
// logic. It holds the RV32I opcodes the core decodes, the ALU operation set,
// the control bundle produced in ID and carried down the pipeline, the three
// data-hazard resolution modes, the forwarding-source encoding and the event
// counters each core reports. Instruction encodings are standard RV32I; the
// grouping of instructions into the classes R/I-type, LW, SW, Bxx, JAL and
// JALR follows the register-hazard analysis of the design.
package rv_pkg;

  localparam int XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_SYSTEM = 7'b1110011;

  localparam word_t NOP_INSTR = 32'h0000_0013;  // addi x0, x0, 0

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR,  ALU_AND, ALU_PASSB
  } alu_op_e;

  // Data-hazard resolution of a core.
  //   HAZ_STALL  : interlock only, operands read from the register file
  //   HAZ_FWD_ID : forwarding muxes in ID (paths "v1"), load-use stall
  //   HAZ_FWD_EX : forwarding muxes in EX (paths "v2"), load-use stall
  typedef enum logic [1:0] {HAZ_STALL, HAZ_FWD_ID, HAZ_FWD_EX} haz_mode_e;

  // Where an operand comes from.
  typedef enum logic [1:0] {FWD_RF, FWD_EX, FWD_MEM, FWD_WB} fwd_sel_e;

  typedef struct packed {
    logic    legal;      // a real, decodable instruction (bubbles are not)
    logic    reg_write;  // RegWrite
    logic    mem_read;   // MemRead (LW)
    logic    mem_write;  // MemWrite (SW)
    logic    branch;     // Bxx
    logic    jal;
    logic    jalr;
    logic    halt;       // ECALL: end of program
    logic    use_rs1;    // useRs1(I)
    logic    use_rs2;    // useRs2(I)
    logic    alu_src_imm;
    logic    alu_a_pc;   // AUIPC: A operand is the PC
    alu_op_e alu_op;
    logic [2:0] funct3;  // branch condition
  } ctrl_t;

  localparam ctrl_t CTRL_BUBBLE = '{alu_op: ALU_ADD, default: '0};

  typedef struct packed {
    logic [31:0] cycles;         // cycles since reset until halted
    logic [31:0] retired;        // instructions that reached WB
    logic [31:0] stall_raw;      // interlock cycles (no forwarding)
    logic [31:0] stall_load_use; // load-use stall cycles (forwarding modes)
    logic [31:0] flushes;        // taken branches / jumps redirecting fetch
    logic [31:0] fwd_ex;         // operands taken from the dist-1 path
    logic [31:0] fwd_mem;        // operands taken from the dist-2 path
    logic [31:0] fwd_wb;         // operands taken from the dist-3 path
    logic [31:0] rf_bypass;      // operands taken from the RF internal forward
    logic [31:0] slot_reads;     // operands read in a load delay slot, i.e.
                                 // the register as it was before the load
    logic [31:0] fwd_store;      // store data replaced in MEM by the value
                                 // of the load directly ahead
  } perf_t;

endpackage
