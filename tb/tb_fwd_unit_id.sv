// tb_fwd_unit_id: random destinations from a small pool; the expected
// source is the youngest stage (EX, then MEM, then WB) that writes rs,
// never for x0, otherwise the register file value.
module tb_fwd_unit_id;
  import rv_pkg::*;
  reg_idx_t rs, ex_rd, mem_rd, wb_rd;
  logic ex_we, mem_we, wb_we;
  word_t ex_val, mem_val, wb_val, rf_val, val;
  fwd_sel_e sel;
  fwd_unit_id dut (.*);
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  initial begin
    for (int i = 0; i < 4000; i++) begin
      fwd_sel_e e; word_t ev;
      {ex_we, mem_we, wb_we} = 3'($urandom());
      rs = 5'($urandom_range(0, 3)); ex_rd = 5'($urandom_range(0, 3));
      mem_rd = 5'($urandom_range(0, 3)); wb_rd = 5'($urandom_range(0, 3));
      ex_val = $urandom(); mem_val = $urandom(); wb_val = $urandom(); rf_val = $urandom();
      #1;
      if (rs == 0)                      begin e = FWD_RF;  ev = rf_val;  end
      else if (ex_we && ex_rd == rs)    begin e = FWD_EX;  ev = ex_val;  end
      else if (mem_we && mem_rd == rs)  begin e = FWD_MEM; ev = mem_val; end
      else if (wb_we && wb_rd == rs)    begin e = FWD_WB;  ev = wb_val;  end
      else                              begin e = FWD_RF;  ev = rf_val;  end
      seen[e]++;
      checks++;
      if (sel !== e || val !== ev) begin
        failures++;
        $display("FAIL rs=%0d rd=%0d/%0d/%0d we=%b%b%b sel=%s exp %s", rs, ex_rd, mem_rd, wb_rd, ex_we, mem_we, wb_we, sel.name(), e.name());
      end
    end
    foreach (seen[k]) begin checks++; if (seen[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
