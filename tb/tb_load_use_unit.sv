// tb_load_use_unit: random fields, compared with the load-use stall rule.
module tb_load_use_unit;
  import rv_pkg::*;
  reg_idx_t id_rs1, id_rs2, ex_rd;
  logic id_use_rs1, id_use_rs2, ex_mem_read, stall;
  load_use_unit dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      {id_use_rs1, id_use_rs2, ex_mem_read} = 3'($urandom());
      id_rs1 = 5'($urandom_range(0, 3)); id_rs2 = 5'($urandom_range(0, 3)); ex_rd = 5'($urandom_range(0, 3));
      #1;
      checks++;
      if (stall !== (ex_mem_read && ((id_use_rs1 && id_rs1 == ex_rd && id_rs1 != 0) ||
                                     (id_use_rs2 && id_rs2 == ex_rd && id_rs2 != 0)))) begin
        failures++;
        $display("FAIL rs %0d/%0d use %b%b rd %0d mr %b stall %b", id_rs1, id_rs2, id_use_rs1, id_use_rs2, ex_rd, ex_mem_read, stall);
      end
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
