// tb_imem: load random words through the load port, read them back by byte
// address, and check that a fetch past the end returns a NOP.
module tb_imem;
  import rv_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  word_t raddr, rdata, waddr, wdata;
  logic we;
  imem #(.WORDS(64)) dut (.*);
  word_t shadow [64];
  int checks = 0, failures = 0;
  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = i * 4; wdata = $urandom(); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 200; i++) begin
      int w;
      w = $urandom_range(0, 63);
      raddr = w * 4 + $urandom_range(0, 3); #1;
      checks++; if (rdata !== shadow[w]) begin failures++; $display("FAIL word %0d", w); end
    end
    raddr = 64 * 4; #1;
    checks++; if (rdata !== NOP_INSTR) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
