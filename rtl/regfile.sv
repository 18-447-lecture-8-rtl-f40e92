// regfile: 32 x 32-bit register file, two read ports for the instruction in
// ID, a third read port for debug, and one write port driven by WB. x0 reads
// as zero and ignores writes. Reads are combinational; the write happens at
// the rising clock edge that ends the WB cycle, so by default an instruction
// in ID does not see the value being written in the same cycle (its producer
// is then at distance 3 and the pipeline must stall or forward from WB).
// With WRITE_THROUGH=1 the register file forwards internally: a read of the
// register being written returns the new value in the same cycle, which
// covers the distance-3 case of forwarding paths "v2". bypass_hit[i] reports
// that read port i+1 took the internally forwarded value.
module regfile
  import rv_pkg::*;
#(
  parameter bit WRITE_THROUGH = 1'b0
) (
  input  logic     clk,
  input  reg_idx_t ra1,
  input  reg_idx_t ra2,
  input  reg_idx_t ra3,
  output word_t    rd1,
  output word_t    rd2,
  output word_t    rd3,
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    wd,
  output logic [1:0] bypass_hit
);
  word_t regs [32];

  always_ff @(posedge clk) begin
    if (we && wa != 5'd0) regs[wa] <= wd;
  end

  function automatic word_t rd_port(input reg_idx_t ra, output logic hit);
    hit = 1'b0;
    if (ra == 5'd0) return '0;
    if (WRITE_THROUGH && we && wa == ra) begin
      hit = 1'b1;
      return wd;
    end
    return regs[ra];
  endfunction

  logic unused_hit3;
  always_comb begin
    rd1 = rd_port(ra1, bypass_hit[0]);
    rd2 = rd_port(ra2, bypass_hit[1]);
    rd3 = rd_port(ra3, unused_hit3);
  end
endmodule
