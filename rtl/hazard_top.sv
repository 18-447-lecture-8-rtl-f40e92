// hazard_top: the data-hazard resolution schemes of the 5-stage pipeline
// side by side, plus the two-stage adder with and without staggering.
//   core 0: pipeline5 with HAZ_STALL  (interlock only)
//   core 1: pipeline5 with HAZ_FWD_ID (forwarding muxes in ID, load-use stall)
//   core 2: pipeline5 with HAZ_FWD_EX (forwarding muxes in EX, load-use stall)
//   core 3: pipeline5 with HAZ_FWD_EX and a load delay slot instead of the
//           load-use stall (the instruction after a load sees the old value)
//   core 4: pipeline5 with HAZ_FWD_EX, load-use stall, and store data
//           forwarded in MEM (a store of the value just loaded does not stall)
// Each core has its own memories and its own load, debug, halt and counter
// ports, indexed [0..4] in the arrays below, so the same program can be run
// on all five and their cycle counts compared. Core 3 implements a different
// architecture (MIPS R2000-style load semantics), so its results differ
// from the others' wherever a program reads a register right after loading
// it.
// The two-stage adder stands beside the cores twice, as independent units
// with their own ports: staggered (add_*), where dependent additions run
// back to back, and unstaggered (uadd_*), where each dependent addition
// right after its producer waits one cycle (uadd_in_ready low). All ports
// are synchronous to clk; rst_n is a synchronous active-low reset shared by
// every unit.
module hazard_top
  import rv_pkg::*;
#(
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     imem_we      [5],
  input  word_t    imem_addr    [5],
  input  word_t    imem_wdata   [5],
  input  logic     dmem_we      [5],
  input  word_t    dmem_addr    [5],
  input  word_t    dmem_wdata   [5],
  input  reg_idx_t dbg_reg_addr [5],
  output word_t    dbg_reg_data [5],
  input  word_t    dbg_mem_addr [5],
  output word_t    dbg_mem_data [5],
  output logic     halted       [5],
  output perf_t    perf         [5],
  input  logic     add_in_valid,
  input  word_t    add_a,
  input  word_t    add_b,
  input  logic     add_dep_a,
  input  logic     add_dep_b,
  output logic     add_in_ready,
  output logic     add_out_valid,
  output word_t    add_sum,
  input  logic     uadd_in_valid,
  input  word_t    uadd_a,
  input  word_t    uadd_b,
  input  logic     uadd_dep_a,
  input  logic     uadd_dep_b,
  output logic     uadd_in_ready,
  output logic     uadd_out_valid,
  output word_t    uadd_sum
);
  localparam int NCORES = 5;
  localparam haz_mode_e MODES [NCORES] = '{HAZ_STALL, HAZ_FWD_ID, HAZ_FWD_EX, HAZ_FWD_EX, HAZ_FWD_EX};
  localparam bit        SLOT  [NCORES] = '{1'b0, 1'b0, 1'b0, 1'b1, 1'b0};
  localparam bit        SFWD  [NCORES] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b1};

  for (genvar i = 0; i < NCORES; i++) begin : g_core
    pipeline5 #(
      .HAZ_MODE(MODES[i]), .LOAD_DELAY_SLOT(SLOT[i]), .STORE_DATA_MEM_FWD(SFWD[i]),
      .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)
    ) u_core (
      .clk, .rst_n,
      .imem_we(imem_we[i]), .imem_addr(imem_addr[i]), .imem_wdata(imem_wdata[i]),
      .dmem_we(dmem_we[i]), .dmem_addr(dmem_addr[i]), .dmem_wdata(dmem_wdata[i]),
      .dbg_reg_addr(dbg_reg_addr[i]), .dbg_reg_data(dbg_reg_data[i]),
      .dbg_mem_addr(dbg_mem_addr[i]), .dbg_mem_data(dbg_mem_data[i]),
      .halted(halted[i]), .perf(perf[i])
    );
  end

  staggered_adder #(.WIDTH(32), .HALF(16)) u_adder (
    .clk, .rst_n,
    .in_valid(add_in_valid), .a(add_a), .b(add_b),
    .dep_a(add_dep_a), .dep_b(add_dep_b),
    .in_ready(add_in_ready), .out_valid(add_out_valid), .sum(add_sum)
  );

  staggered_adder #(.WIDTH(32), .HALF(16), .STAGGER(1'b0)) u_adder_unstaggered (
    .clk, .rst_n,
    .in_valid(uadd_in_valid), .a(uadd_a), .b(uadd_b),
    .dep_a(uadd_dep_a), .dep_b(uadd_dep_b),
    .in_ready(uadd_in_ready), .out_valid(uadd_out_valid), .sum(uadd_sum)
  );
endmodule
