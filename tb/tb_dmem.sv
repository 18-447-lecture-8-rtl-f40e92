// tb_dmem: random stores through both write ports and loads through the
// data and debug ports, against a shadow array; the store port wins a tie.
module tb_dmem;
  import rv_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  word_t addr, rdata, wdata, ext_addr, ext_wdata, dbg_addr, dbg_data;
  logic we, ext_we;
  dmem #(.WORDS(32)) dut (.*);
  word_t shadow [32];
  int checks = 0, failures = 0;
  initial begin
    we = 0; ext_we = 0; addr = 0; wdata = 0; ext_addr = 0; ext_wdata = 0; dbg_addr = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); ext_we = 1; ext_addr = i * 4; ext_wdata = $urandom(); shadow[i] = ext_wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom()); ext_we = 1'($urandom());
      addr = $urandom_range(0, 31) * 4; ext_addr = $urandom_range(0, 31) * 4;
      wdata = $urandom(); ext_wdata = $urandom(); dbg_addr = $urandom_range(0, 31) * 4;
      #1;
      checks += 2;
      if (rdata !== shadow[addr[6:2]]) begin failures++; $display("FAIL load %0d", addr); end
      if (dbg_data !== shadow[dbg_addr[6:2]]) begin failures++; $display("FAIL dbg %0d", dbg_addr); end
      @(posedge clk);
      if (we) shadow[addr[6:2]] = wdata;
      else if (ext_we) shadow[ext_addr[6:2]] = ext_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
