// fwd_unit_id: operand forwarding for paths "v1", where the forwarding mux
// sits in ID in front of the ID/EX register. For one source register rs it
// looks for the youngest older instruction that will write rs and takes that
// instruction's write-back value straight from the datapath:
//   instruction in EX  (distance 1) -> ex_val  (ALU result / link address)
//   instruction in MEM (distance 2) -> mem_val (load data or ALU result)
//   instruction in WB  (distance 3) -> wb_val
//   otherwise                       -> rf_val  (register file read)
// The priority is young to old, so the newest definition of rs wins. x0 is
// never forwarded. As in the design's forwarding logic, useRs is not
// consulted: forwarding into an operand that is not used is harmless. A load
// in EX has no value yet; the load-use stall keeps its consumer in ID, so
// the (wrong) EX value is never latched. Purely combinational.
module fwd_unit_id
  import rv_pkg::*;
(
  input  reg_idx_t rs,
  input  reg_idx_t ex_rd,
  input  logic     ex_we,
  input  word_t    ex_val,
  input  reg_idx_t mem_rd,
  input  logic     mem_we,
  input  word_t    mem_val,
  input  reg_idx_t wb_rd,
  input  logic     wb_we,
  input  word_t    wb_val,
  input  word_t    rf_val,
  output fwd_sel_e sel,
  output word_t    val
);
  always_comb begin
    if      (rs != 5'd0 && rs == ex_rd  && ex_we)  sel = FWD_EX;
    else if (rs != 5'd0 && rs == mem_rd && mem_we) sel = FWD_MEM;
    else if (rs != 5'd0 && rs == wb_rd  && wb_we)  sel = FWD_WB;
    else                                           sel = FWD_RF;
    unique case (sel)
      FWD_EX:  val = ex_val;
      FWD_MEM: val = mem_val;
      FWD_WB:  val = wb_val;
      default: val = rf_val;
    endcase
  end
endmodule
