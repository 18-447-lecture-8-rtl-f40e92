// stall_unit: data-hazard interlock for the pipeline without forwarding.
// The instruction in ID reads the register file; if a valid older
// instruction in EX, MEM or WB is still going to write one of the registers
// it uses, the value in the register file is stale and IF and ID must stall.
// stall is the OR of the six terms of the design's stall condition:
//   (rsN_ID == rd_S) && RegWrite_S && useRsN(IR_ID) && rsN_ID != x0
// for N in {1,2} and S in {EX, MEM, WB}. Bubbles carry RegWrite=0 and so
// never cause a stall. Purely combinational.
module stall_unit
  import rv_pkg::*;
(
  input  reg_idx_t id_rs1,
  input  reg_idx_t id_rs2,
  input  logic     id_use_rs1,
  input  logic     id_use_rs2,
  input  reg_idx_t ex_rd,
  input  logic     ex_we,
  input  reg_idx_t mem_rd,
  input  logic     mem_we,
  input  reg_idx_t wb_rd,
  input  logic     wb_we,
  output logic     stall
);
  function automatic logic dep(input reg_idx_t rs, input logic use_rs,
                               input reg_idx_t rd, input logic we);
    return (rs == rd) && we && use_rs && (rs != 5'd0);
  endfunction

  assign stall = dep(id_rs1, id_use_rs1, ex_rd,  ex_we)  ||
                 dep(id_rs1, id_use_rs1, mem_rd, mem_we) ||
                 dep(id_rs1, id_use_rs1, wb_rd,  wb_we)  ||
                 dep(id_rs2, id_use_rs2, ex_rd,  ex_we)  ||
                 dep(id_rs2, id_use_rs2, mem_rd, mem_we) ||
                 dep(id_rs2, id_use_rs2, wb_rd,  wb_we);
endmodule
