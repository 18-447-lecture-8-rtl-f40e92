// tb_stall_unit: random register fields with a small register pool (so
// matches are frequent), compared with the six-term stall condition
// evaluated here term by term.
module tb_stall_unit;
  import rv_pkg::*;
  reg_idx_t id_rs1, id_rs2, ex_rd, mem_rd, wb_rd;
  logic id_use_rs1, id_use_rs2, ex_we, mem_we, wb_we, stall;
  stall_unit dut (.*);
  int checks = 0, failures = 0, hits = 0;
  initial begin
    for (int i = 0; i < 5000; i++) begin
      {id_use_rs1, id_use_rs2, ex_we, mem_we, wb_we} = 5'($urandom());
      id_rs1 = 5'($urandom_range(0, 3)); id_rs2 = 5'($urandom_range(0, 3));
      ex_rd = 5'($urandom_range(0, 3)); mem_rd = 5'($urandom_range(0, 3)); wb_rd = 5'($urandom_range(0, 3));
      #1;
      begin
        bit exp;
        reg_idx_t rds[3];
        logic wes[3];
        exp = 0;
        rds = '{ex_rd, mem_rd, wb_rd};
        wes = '{ex_we, mem_we, wb_we};
        for (int s = 0; s < 3; s++) begin
          if (id_use_rs1 && wes[s] && id_rs1 == rds[s] && id_rs1 != 0) exp = 1;
          if (id_use_rs2 && wes[s] && id_rs2 == rds[s] && id_rs2 != 0) exp = 1;
        end
        hits += exp;
        checks++;
        if (stall !== exp) begin
          failures++;
          $display("FAIL rs %0d/%0d use %b%b rd %0d/%0d/%0d we %b%b%b stall=%b", id_rs1, id_rs2,
                   id_use_rs1, id_use_rs2, ex_rd, mem_rd, wb_rd, ex_we, mem_we, wb_we, stall);
        end
      end
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
