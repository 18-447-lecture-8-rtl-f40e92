// fwd_unit_ex: the forwarding unit of paths "v2", where the ForwardA and
// ForwardB muxes sit in EX behind the ID/EX register. It compares the
// sources of the instruction in EX (rs1_EX, rs2_EX) with the destinations
// held in EX/MEM (distance 1) and MEM/WB (distance 2) and selects, youngest
// first:
//   FWD_EX  : EX/MEM ALU result
//   FWD_MEM : MEM/WB write-back value
//   FWD_RF  : the operand read in ID (register file, whose internal
//             forwarding already covers distance 3)
// x0 is never forwarded. Purely combinational.
module fwd_unit_ex
  import rv_pkg::*;
(
  input  reg_idx_t rs1,
  input  reg_idx_t rs2,
  input  reg_idx_t exmem_rd,
  input  logic     exmem_we,
  input  reg_idx_t memwb_rd,
  input  logic     memwb_we,
  output fwd_sel_e fwd_a,
  output fwd_sel_e fwd_b
);
  function automatic fwd_sel_e pick(input reg_idx_t rs);
    if (rs != 5'd0 && rs == exmem_rd && exmem_we) return FWD_EX;
    if (rs != 5'd0 && rs == memwb_rd && memwb_we) return FWD_MEM;
    return FWD_RF;
  endfunction

  assign fwd_a = pick(rs1);
  assign fwd_b = pick(rs2);
endmodule
