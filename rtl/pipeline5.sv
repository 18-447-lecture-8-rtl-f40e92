// pipeline5: a classic 5-stage in-order pipeline (IF, ID, EX, MEM, WB) for
// an RV32I subset, built to show how data hazards between dependent
// instructions are detected and resolved. HAZ_MODE selects the resolution:
//
//   HAZ_STALL  - no forwarding. stall_unit compares the sources of the
//                instruction in ID with the destinations in EX, MEM and WB;
//                on a match PC and IF/ID hold and a bubble (all control
//                bits cleared, so RegWrite and MemWrite are 0) enters EX,
//                while EX, MEM and WB keep advancing. The register file
//                writes at the end of WB, so a dependent instruction at
//                distance 1, 2 or 3 waits 3, 2 or 1 cycles.
//   HAZ_FWD_ID - forwarding paths "v1": fwd_unit_id muxes in ID take each
//                operand from the write-back value of the instruction in
//                EX, MEM or WB (youngest first) before the ID/EX register.
//   HAZ_FWD_EX - forwarding paths "v2": fwd_unit_ex drives ForwardA/B muxes
//                in EX (EX/MEM result, MEM/WB value); distance 3 is covered
//                by the register file's internal write-through.
//   In both forwarding modes load_use_unit inserts one bubble when the
//   instruction in ID uses the result of a load in EX.
//
// LOAD_DELAY_SLOT (forwarding modes only; ignored with HAZ_STALL) replaces
// that bubble with the historical MIPS R2000 rule: a load's result is
// architecturally invisible to the one instruction after it (the load
// delay slot). That instruction reads the register as it was before the
// load, so no forwarding path carries a load's value to it and no stall
// is inserted; a compiler fills the slot with an independent instruction
// or a NOP. A NOP-filled slot costs exactly the cycle the stall would.
// perf.slot_reads counts operands that took the pre-load value.
//
// STORE_DATA_MEM_FWD (forwarding modes without delay slot) uses the fact
// that a store needs its data only in MEM: a store whose data register is
// written by the load directly ahead of it is not stalled. It moves on
// with a wrong data operand, and in MEM, where the load has just reached
// WB, the store data is replaced by the load's value from MEM/WB. The base
// register of a store still causes the load-use stall. perf.fwd_store
// counts these MEM-stage forwards. The lecture's forwarding table has a
// store use its data in MEM, but its load-use equation still stalls the
// store; the default follows the equation, and this forward is the
// design's own reading of the table.
//
// Instructions: R-type and I-type ALU ops, LW, SW, BEQ/BNE/BLT/BGE/BLTU/
// BGEU, JAL, JALR, LUI, AUIPC, and ECALL, which ends the program: fetch
// stops when ECALL leaves ID and halted rises when it leaves WB. Control
// flow is this design's own choice: fetch predicts not-taken, branches and
// jumps resolve in EX, and a taken one flushes IF/ID and ID/EX (two
// bubbles). The memories are word-addressed arrays with combinational read.
//
// Interface: synchronous active-low reset; while in reset (or halted) a
// host may load the instruction memory and the data memory through the
// imem_* and dmem_* ports, and read any register or memory word through the
// dbg_* ports. perf counts cycles, retired instructions, stall cycles of
// each kind, taken-branch flushes and how often each forwarding path
// supplied a used operand; it stops counting once halted.
module pipeline5
  import rv_pkg::*;
#(
  parameter haz_mode_e HAZ_MODE   = HAZ_FWD_EX,
  parameter bit        LOAD_DELAY_SLOT = 1'b0,
  parameter bit        STORE_DATA_MEM_FWD = 1'b0,
  parameter int        IMEM_WORDS = 1024,
  parameter int        DMEM_WORDS = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     imem_we,
  input  word_t    imem_addr,
  input  word_t    imem_wdata,
  input  logic     dmem_we,
  input  word_t    dmem_addr,
  input  word_t    dmem_wdata,
  input  reg_idx_t dbg_reg_addr,
  output word_t    dbg_reg_data,
  input  word_t    dbg_mem_addr,
  output word_t    dbg_mem_data,
  output logic     halted,
  output perf_t    perf
);

  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t instr;
  } ifid_t;

  typedef struct packed {
    logic     valid;
    ctrl_t    ctrl;
    word_t    pc;
    reg_idx_t rs1;
    reg_idx_t rs2;
    reg_idx_t rd;
    word_t    a;
    word_t    b;
    word_t    imm;
    logic     a_byp;   // operand A came from the RF internal forward
    logic     b_byp;
  } idex_t;

  typedef struct packed {
    logic     valid;
    ctrl_t    ctrl;
    reg_idx_t rd;
    word_t    result;
    word_t    store_data;
    logic     sd_from_wb;   // replace store_data by the MEM/WB value in MEM
  } exmem_t;

  typedef struct packed {
    logic     valid;
    ctrl_t    ctrl;
    reg_idx_t rd;
    word_t    wb_val;
  } memwb_t;

  word_t  pc_q;
  ifid_t  ifid_q;
  idex_t  idex_q;
  exmem_t exmem_q;
  memwb_t memwb_q;
  logic   halt_fetch_q;
  logic   halted_q;
  perf_t  perf_q;

  // ------------------------------------------------------------------ IF
  word_t if_instr;
  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .raddr(pc_q), .rdata(if_instr),
    .we(imem_we), .waddr(imem_addr), .wdata(imem_wdata)
  );

  // ------------------------------------------------------------------ ID
  ctrl_t    id_ctrl;
  reg_idx_t id_rs1, id_rs2, id_rd;
  word_t    id_imm;
  decoder u_dec (
    .instr(ifid_q.instr), .valid(ifid_q.valid), .ctrl(id_ctrl),
    .rs1(id_rs1), .rs2(id_rs2), .rd(id_rd), .imm(id_imm)
  );

  word_t      rf_rd1, rf_rd2;
  logic [1:0] rf_byp;
  regfile #(.WRITE_THROUGH(HAZ_MODE == HAZ_FWD_EX)) u_rf (
    .clk, .ra1(id_rs1), .ra2(id_rs2), .ra3(dbg_reg_addr),
    .rd1(rf_rd1), .rd2(rf_rd2), .rd3(dbg_reg_data),
    .we(memwb_q.ctrl.reg_write), .wa(memwb_q.rd), .wd(memwb_q.wb_val),
    .bypass_hit(rf_byp)
  );

  // write-back values available in the datapath, by stage
  word_t ex_result, mem_val;

  word_t    id_a, id_b;
  fwd_sel_e id_sel_a, id_sel_b;
  logic     stall;

  // With a load delay slot the result of a load one instruction ahead must
  // not reach the consumer: the forward from the load is masked, so the
  // consumer falls through to the older producer or the register file.
  localparam bit DSLOT = LOAD_DELAY_SLOT && HAZ_MODE != HAZ_STALL;
  localparam bit SFWD  = STORE_DATA_MEM_FWD && HAZ_MODE != HAZ_STALL && !DSLOT;
  logic exmem_fwd_we;
  assign exmem_fwd_we = exmem_q.ctrl.reg_write && !(DSLOT && exmem_q.ctrl.mem_read);

  if (HAZ_MODE == HAZ_FWD_ID) begin : g_fwd_id
    logic ex_fwd_we;
    assign ex_fwd_we = idex_q.ctrl.reg_write && !(DSLOT && idex_q.ctrl.mem_read);
    fwd_unit_id u_fwd_a (
      .rs(id_rs1),
      .ex_rd(idex_q.rd),   .ex_we(ex_fwd_we),               .ex_val(ex_result),
      .mem_rd(exmem_q.rd), .mem_we(exmem_q.ctrl.reg_write), .mem_val(mem_val),
      .wb_rd(memwb_q.rd),  .wb_we(memwb_q.ctrl.reg_write),  .wb_val(memwb_q.wb_val),
      .rf_val(rf_rd1), .sel(id_sel_a), .val(id_a)
    );
    fwd_unit_id u_fwd_b (
      .rs(id_rs2),
      .ex_rd(idex_q.rd),   .ex_we(ex_fwd_we),               .ex_val(ex_result),
      .mem_rd(exmem_q.rd), .mem_we(exmem_q.ctrl.reg_write), .mem_val(mem_val),
      .wb_rd(memwb_q.rd),  .wb_we(memwb_q.ctrl.reg_write),  .wb_val(memwb_q.wb_val),
      .rf_val(rf_rd2), .sel(id_sel_b), .val(id_b)
    );
  end else begin : g_no_fwd_id
    assign id_a     = rf_rd1;
    assign id_b     = rf_rd2;
    assign id_sel_a = FWD_RF;
    assign id_sel_b = FWD_RF;
  end

  if (HAZ_MODE == HAZ_STALL) begin : g_interlock
    stall_unit u_stall (
      .id_rs1, .id_rs2, .id_use_rs1(id_ctrl.use_rs1), .id_use_rs2(id_ctrl.use_rs2),
      .ex_rd(idex_q.rd),   .ex_we(idex_q.ctrl.reg_write),
      .mem_rd(exmem_q.rd), .mem_we(exmem_q.ctrl.reg_write),
      .wb_rd(memwb_q.rd),  .wb_we(memwb_q.ctrl.reg_write),
      .stall
    );
  end else if (DSLOT) begin : g_delay_slot
    assign stall = 1'b0;
  end else begin : g_load_use
    load_use_unit u_lu (
      .id_rs1, .id_rs2, .id_use_rs1(id_ctrl.use_rs1),
      .id_use_rs2(id_ctrl.use_rs2 && !(SFWD && id_ctrl.mem_write)),
      .ex_rd(idex_q.rd), .ex_mem_read(idex_q.ctrl.mem_read),
      .stall
    );
  end

  // ------------------------------------------------------------------ EX
  word_t    ex_a, ex_b;
  fwd_sel_e ex_sel_a, ex_sel_b;

  if (HAZ_MODE == HAZ_FWD_EX) begin : g_fwd_ex
    fwd_unit_ex u_fwd (
      .rs1(idex_q.rs1), .rs2(idex_q.rs2),
      .exmem_rd(exmem_q.rd), .exmem_we(exmem_fwd_we),
      .memwb_rd(memwb_q.rd), .memwb_we(memwb_q.ctrl.reg_write),
      .fwd_a(ex_sel_a), .fwd_b(ex_sel_b)
    );
    always_comb begin
      unique case (ex_sel_a)
        FWD_EX:  ex_a = exmem_q.result;
        FWD_MEM: ex_a = memwb_q.wb_val;
        default: ex_a = idex_q.a;
      endcase
      unique case (ex_sel_b)
        FWD_EX:  ex_b = exmem_q.result;
        FWD_MEM: ex_b = memwb_q.wb_val;
        default: ex_b = idex_q.b;
      endcase
    end
  end else begin : g_no_fwd_ex
    assign ex_a     = idex_q.a;
    assign ex_b     = idex_q.b;
    assign ex_sel_a = FWD_RF;
    assign ex_sel_b = FWD_RF;
  end

  word_t alu_a, alu_b, alu_y;
  assign alu_a = idex_q.ctrl.alu_a_pc    ? idex_q.pc  : ex_a;
  assign alu_b = idex_q.ctrl.alu_src_imm ? idex_q.imm : ex_b;
  alu u_alu (.op(idex_q.ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  logic  br_cond, redirect;
  word_t target;
  always_comb begin
    unique case (idex_q.ctrl.funct3)
      3'b000:  br_cond = ex_a == ex_b;
      3'b001:  br_cond = ex_a != ex_b;
      3'b100:  br_cond = $signed(ex_a) <  $signed(ex_b);
      3'b101:  br_cond = $signed(ex_a) >= $signed(ex_b);
      3'b110:  br_cond = ex_a <  ex_b;
      3'b111:  br_cond = ex_a >= ex_b;
      default: br_cond = 1'b0;
    endcase
  end
  assign redirect  = idex_q.valid &&
                     ((idex_q.ctrl.branch && br_cond) || idex_q.ctrl.jal || idex_q.ctrl.jalr);
  assign target    = idex_q.ctrl.jalr ? ((ex_a + idex_q.imm) & ~word_t'(1))
                                      : (idex_q.pc + idex_q.imm);
  assign ex_result = (idex_q.ctrl.jal || idex_q.ctrl.jalr) ? idex_q.pc + 32'd4 : alu_y;

  // ----------------------------------------------------------------- MEM
  // store data from the load directly ahead (STORE_DATA_MEM_FWD): while the
  // store is in EX that load is in EX/MEM; one cycle later it is in MEM/WB
  logic  ex_sd_from_load;
  word_t mem_store_data;
  assign ex_sd_from_load = SFWD && idex_q.valid && idex_q.ctrl.mem_write &&
                           exmem_q.ctrl.mem_read && exmem_q.rd != '0 &&
                           idex_q.rs2 == exmem_q.rd;
  assign mem_store_data  = exmem_q.sd_from_wb ? memwb_q.wb_val : exmem_q.store_data;

  word_t dmem_rdata;
  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(exmem_q.result), .rdata(dmem_rdata),
    .we(exmem_q.ctrl.mem_write), .wdata(mem_store_data),
    .ext_we(dmem_we), .ext_addr(dmem_addr), .ext_wdata(dmem_wdata),
    .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );
  assign mem_val = exmem_q.ctrl.mem_read ? dmem_rdata : exmem_q.result;

  // ------------------------------------------------- pipeline registers
  logic id_halt, id_advance;
  assign id_halt    = ifid_q.valid && id_ctrl.halt && !redirect;
  assign id_advance = ifid_q.valid && !stall && !redirect;

  idex_t idex_d;
  always_comb begin
    idex_d       = '0;
    idex_d.ctrl  = CTRL_BUBBLE;
    if (id_advance) begin
      idex_d.valid = 1'b1;
      idex_d.ctrl  = id_ctrl;
      idex_d.pc    = ifid_q.pc;
      idex_d.rs1   = id_rs1;
      idex_d.rs2   = id_rs2;
      idex_d.rd    = id_rd;
      idex_d.a     = id_a;
      idex_d.b     = id_b;
      idex_d.imm   = id_imm;
      idex_d.a_byp = rf_byp[0];
      idex_d.b_byp = rf_byp[1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q         <= '0;
      ifid_q       <= '{valid: 1'b0, pc: '0, instr: NOP_INSTR};
      idex_q       <= '{ctrl: CTRL_BUBBLE, default: '0};
      exmem_q      <= '{ctrl: CTRL_BUBBLE, default: '0};
      memwb_q      <= '{ctrl: CTRL_BUBBLE, default: '0};
      halt_fetch_q <= 1'b0;
      halted_q     <= 1'b0;
    end else begin
      // IF and IF/ID
      if (redirect) begin
        pc_q   <= target;
        ifid_q <= '{valid: 1'b0, pc: '0, instr: NOP_INSTR};
      end else if (stall && ifid_q.valid) begin
        pc_q   <= pc_q;
        ifid_q <= ifid_q;
      end else if (halt_fetch_q || id_halt) begin
        ifid_q <= '{valid: 1'b0, pc: '0, instr: NOP_INSTR};
      end else begin
        pc_q   <= pc_q + 32'd4;
        ifid_q <= '{valid: 1'b1, pc: pc_q, instr: if_instr};
      end
      if (id_halt) halt_fetch_q <= 1'b1;

      // ID/EX: the decoded instruction, or a bubble on stall / flush
      idex_q <= idex_d;

      // EX/MEM, MEM/WB always advance
      exmem_q.valid      <= idex_q.valid;
      exmem_q.ctrl       <= idex_q.ctrl;
      exmem_q.rd         <= idex_q.rd;
      exmem_q.result     <= ex_result;
      exmem_q.store_data <= ex_b;
      exmem_q.sd_from_wb <= ex_sd_from_load;

      memwb_q.valid  <= exmem_q.valid;
      memwb_q.ctrl   <= exmem_q.ctrl;
      memwb_q.rd     <= exmem_q.rd;
      memwb_q.wb_val <= mem_val;

      if (memwb_q.valid && memwb_q.ctrl.halt) halted_q <= 1'b1;
    end
  end

  // ------------------------------------------------------------ counters
  function automatic logic [31:0] cnt_sel(input fwd_sel_e s, input fwd_sel_e want, input logic used);
    return {31'b0, used && s == want};
  endfunction

  // an operand of the instruction in the load delay slot names the load's
  // destination (v1: consumer in ID, load in EX; v2: consumer in EX, load
  // in EX/MEM); it reads the pre-load value
  logic slot_a, slot_b;
  if (HAZ_MODE == HAZ_FWD_ID) begin : g_slot_id
    assign slot_a = DSLOT && id_advance && idex_q.ctrl.mem_read && idex_q.rd != '0 &&
                    id_ctrl.use_rs1 && id_rs1 == idex_q.rd;
    assign slot_b = DSLOT && id_advance && idex_q.ctrl.mem_read && idex_q.rd != '0 &&
                    id_ctrl.use_rs2 && id_rs2 == idex_q.rd;
  end else begin : g_slot_ex
    assign slot_a = DSLOT && idex_q.valid && exmem_q.ctrl.mem_read && exmem_q.rd != '0 &&
                    idex_q.ctrl.use_rs1 && idex_q.rs1 == exmem_q.rd;
    assign slot_b = DSLOT && idex_q.valid && exmem_q.ctrl.mem_read && exmem_q.rd != '0 &&
                    idex_q.ctrl.use_rs2 && idex_q.rs2 == exmem_q.rd;
  end

  logic count_id, count_ex;
  assign count_id = id_advance && HAZ_MODE == HAZ_FWD_ID;
  assign count_ex = idex_q.valid && HAZ_MODE == HAZ_FWD_EX;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      perf_q <= '0;
    end else if (!halted_q) begin
      perf_q.cycles <= perf_q.cycles + 32'd1;
      if (memwb_q.valid) perf_q.retired <= perf_q.retired + 32'd1;
      if (ifid_q.valid && stall && !redirect) begin
        if (HAZ_MODE == HAZ_STALL) perf_q.stall_raw      <= perf_q.stall_raw + 32'd1;
        else                       perf_q.stall_load_use <= perf_q.stall_load_use + 32'd1;
      end
      if (redirect) perf_q.flushes <= perf_q.flushes + 32'd1;
      perf_q.slot_reads <= perf_q.slot_reads + {31'b0, slot_a} + {31'b0, slot_b};
      if (exmem_q.sd_from_wb) perf_q.fwd_store <= perf_q.fwd_store + 32'd1;
      if (count_id) begin
        perf_q.fwd_ex  <= perf_q.fwd_ex  + cnt_sel(id_sel_a, FWD_EX,  id_ctrl.use_rs1)
                                         + cnt_sel(id_sel_b, FWD_EX,  id_ctrl.use_rs2);
        perf_q.fwd_mem <= perf_q.fwd_mem + cnt_sel(id_sel_a, FWD_MEM, id_ctrl.use_rs1)
                                         + cnt_sel(id_sel_b, FWD_MEM, id_ctrl.use_rs2);
        perf_q.fwd_wb  <= perf_q.fwd_wb  + cnt_sel(id_sel_a, FWD_WB,  id_ctrl.use_rs1)
                                         + cnt_sel(id_sel_b, FWD_WB,  id_ctrl.use_rs2);
      end
      if (count_ex) begin
        perf_q.fwd_ex    <= perf_q.fwd_ex  + cnt_sel(ex_sel_a, FWD_EX,  idex_q.ctrl.use_rs1)
                                           + cnt_sel(ex_sel_b, FWD_EX,  idex_q.ctrl.use_rs2);
        perf_q.fwd_mem   <= perf_q.fwd_mem + cnt_sel(ex_sel_a, FWD_MEM, idex_q.ctrl.use_rs1)
                                           + cnt_sel(ex_sel_b, FWD_MEM, idex_q.ctrl.use_rs2);
        perf_q.rf_bypass <= perf_q.rf_bypass
                          + {31'b0, idex_q.ctrl.use_rs1 && ex_sel_a == FWD_RF && idex_q.a_byp}
                          + {31'b0, idex_q.ctrl.use_rs2 && ex_sel_b == FWD_RF && idex_q.b_byp};
      end
    end
  end

  assign halted = halted_q;
  assign perf   = perf_q;

  // A bubble never writes the register file or the data memory.
  a_bubble_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    !memwb_q.valid |-> !memwb_q.ctrl.reg_write);
  a_no_store_bubble: assert property (@(posedge clk) disable iff (!rst_n)
    !exmem_q.valid |-> !exmem_q.ctrl.mem_write);

endmodule
