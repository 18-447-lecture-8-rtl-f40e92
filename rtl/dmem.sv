// dmem: data memory of the MEM stage. WORDS 32-bit words; word loads read
// combinationally at addr, word stores write at the rising clock edge. A
// second write port (ext_*) lets a host place data, and a debug read port
// (dbg_*) lets it read results. Addresses are byte addresses with the low
// two bits ignored and are taken modulo the memory size. Only LW and SW
// exist in the design, so there is no byte or halfword access. The store
// port has priority over the external port when both write in one cycle.
module dmem
  import rv_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic  clk,
  input  word_t addr,
  output word_t rdata,
  input  logic  we,
  input  word_t wdata,
  input  logic  ext_we,
  input  word_t ext_addr,
  input  word_t ext_wdata,
  input  word_t dbg_addr,
  output word_t dbg_data
);
  localparam int AW = $clog2(WORDS);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we)          mem[addr[AW+1:2]]     <= wdata;
    else if (ext_we) mem[ext_addr[AW+1:2]] <= ext_wdata;
  end

  assign rdata    = mem[addr[AW+1:2]];
  assign dbg_data = mem[dbg_addr[AW+1:2]];
endmodule
