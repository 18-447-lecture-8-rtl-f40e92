// tb_fwd_unit_ex: random sources and destinations; ForwardA/B must pick
// EX/MEM before MEM/WB, never forward x0, and otherwise keep the ID/EX operand.
module tb_fwd_unit_ex;
  import rv_pkg::*;
  reg_idx_t rs1, rs2, exmem_rd, memwb_rd;
  logic exmem_we, memwb_we;
  fwd_sel_e fwd_a, fwd_b;
  fwd_unit_ex dut (.*);
  int checks = 0, failures = 0;
  function automatic fwd_sel_e exp_sel(reg_idx_t r);
    if (r == 0) return FWD_RF;
    if (exmem_we && exmem_rd == r) return FWD_EX;
    if (memwb_we && memwb_rd == r) return FWD_MEM;
    return FWD_RF;
  endfunction
  initial begin
    for (int i = 0; i < 4000; i++) begin
      {exmem_we, memwb_we} = 2'($urandom());
      rs1 = 5'($urandom_range(0, 3)); rs2 = 5'($urandom_range(0, 3));
      exmem_rd = 5'($urandom_range(0, 3)); memwb_rd = 5'($urandom_range(0, 3));
      #1;
      checks += 2;
      if (fwd_a !== exp_sel(rs1)) begin failures++; $display("FAIL A rs1=%0d", rs1); end
      if (fwd_b !== exp_sel(rs2)) begin failures++; $display("FAIL B rs2=%0d", rs2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
