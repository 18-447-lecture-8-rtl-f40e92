// load_use_unit: the one data hazard forwarding cannot remove in the 5-stage
// pipeline. A load produces its value only at the end of MEM, so an
// instruction directly behind it (in ID while the load is in EX) that uses
// the loaded register must wait one cycle:
//   stall = ((rs1_ID == rd_EX && useRs1 && rs1_ID != 0) ||
//            (rs2_ID == rd_EX && useRs2 && rs2_ID != 0)) && MemRead_EX
// After the single bubble the value is forwarded from the later stage.
// Purely combinational.
module load_use_unit
  import rv_pkg::*;
(
  input  reg_idx_t id_rs1,
  input  reg_idx_t id_rs2,
  input  logic     id_use_rs1,
  input  logic     id_use_rs2,
  input  reg_idx_t ex_rd,
  input  logic     ex_mem_read,
  output logic     stall
);
  assign stall = ((id_rs1 == ex_rd && id_use_rs1 && id_rs1 != 5'd0) ||
                  (id_rs2 == ex_rd && id_use_rs2 && id_rs2 != 5'd0)) && ex_mem_read;
endmodule
