// imem: instruction memory of the IF stage. WORDS 32-bit words, read
// combinationally at the byte address raddr (low two bits ignored), written
// one word per clock through the load port (we/waddr/wdata) to place a
// program before the core leaves reset. A fetch beyond the last word returns
// a NOP. Size and load port are this design's own choices; the design only
// names the instruction memory.
module imem
  import rv_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic  clk,
  input  word_t raddr,
  output word_t rdata,
  input  logic  we,
  input  word_t waddr,
  input  word_t wdata
);
  localparam int AW = $clog2(WORDS);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we && (waddr >> 2) < WORDS) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = ((raddr >> 2) < WORDS) ? mem[raddr[AW+1:2]] : NOP_INSTR;
endmodule
