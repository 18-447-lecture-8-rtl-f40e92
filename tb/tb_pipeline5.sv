// tb_pipeline5: directed hazard tests for the 5-stage pipeline, run on all
// three hazard modes at once (one core per mode, same program). Each test is
// a short program whose stall count, forwarding-path use, flush count,
// cycle count and results were worked out by hand from the hazard rules:
//   interlock only : a consumer at distance 1/2/3 from its producer waits
//                    3/2/1 cycles; distance 4 and beyond is free
//   forwarding     : only a load followed directly by a user waits, 1 cycle
//   cycles to halt = instructions + 4 + stalls + 2 per taken branch/jump
// Anti- and output dependences (WAR, WAW) must cost nothing (test N).
module tb_pipeline5;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     imem_we;
  word_t    imem_addr, imem_wdata;
  logic     dmem_we;
  word_t    dmem_addr, dmem_wdata;
  reg_idx_t dbg_reg_addr;
  word_t    dbg_reg_data [3];
  word_t    dbg_mem_addr;
  word_t    dbg_mem_data [3];
  logic     halted [3];
  perf_t    perf [3];

  localparam haz_mode_e MODES [3] = '{HAZ_STALL, HAZ_FWD_ID, HAZ_FWD_EX};
  for (genvar i = 0; i < 3; i++) begin : g_dut
    pipeline5 #(.HAZ_MODE(MODES[i]), .IMEM_WORDS(64), .DMEM_WORDS(64)) dut (
      .clk, .rst_n, .imem_we, .imem_addr, .imem_wdata,
      .dmem_we, .dmem_addr, .dmem_wdata,
      .dbg_reg_addr, .dbg_reg_data(dbg_reg_data[i]),
      .dbg_mem_addr, .dbg_mem_data(dbg_mem_data[i]),
      .halted(halted[i]), .perf(perf[i])
    );
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  u32 prog[$];

  task automatic run_prog();
    rst_n = 0;
    imem_we = 0; dmem_we = 0;
    @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      imem_we = 1; imem_addr = i * 4; imem_wdata = (i < prog.size()) ? prog[i] : NOP();
      dmem_we = 1; dmem_addr = i * 4; dmem_wdata = 32'h100 + i;
      @(posedge clk);
    end
    #1 imem_we = 0; dmem_we = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < 500 && !(halted[0] && halted[1] && halted[2]); c++) @(posedge clk);
    #1;
    check(halted[0] && halted[1] && halted[2], "program halts");
  endtask

  task automatic expect_reg(int r, word_t v, string name);
    dbg_reg_addr = r[4:0];
    #1;
    for (int i = 0; i < 3; i++)
      check(dbg_reg_data[i] == v, $sformatf("%s core%0d x%0d=%h exp %h", name, i, r, dbg_reg_data[i], v));
  endtask

  // expected values: {stall-mode stalls, fwd-mode stalls}, instructions, flushes
  task automatic expect_timing(string name, int n, int st_stall, int st_fwd, int fl);
    check(perf[0].stall_raw == st_stall, $sformatf("%s interlock stalls %0d exp %0d", name, perf[0].stall_raw, st_stall));
    check(perf[1].stall_load_use == st_fwd, $sformatf("%s v1 load-use stalls %0d exp %0d", name, perf[1].stall_load_use, st_fwd));
    check(perf[2].stall_load_use == st_fwd, $sformatf("%s v2 load-use stalls %0d exp %0d", name, perf[2].stall_load_use, st_fwd));
    check(perf[0].cycles == n + 4 + st_stall + 2 * fl, $sformatf("%s interlock cycles %0d exp %0d", name, perf[0].cycles, n + 4 + st_stall + 2 * fl));
    for (int i = 1; i < 3; i++) begin
      check(perf[i].cycles == n + 4 + st_fwd + 2 * fl, $sformatf("%s core%0d cycles %0d exp %0d", name, i, perf[i].cycles, n + 4 + st_fwd + 2 * fl));
    end
    for (int i = 0; i < 3; i++) begin
      check(perf[i].retired == n, $sformatf("%s core%0d retired %0d exp %0d", name, i, perf[i].retired, n));
      check(perf[i].flushes == fl, $sformatf("%s core%0d flushes %0d exp %0d", name, i, perf[i].flushes, fl));
    end
  endtask

  // v1 counters: dist1/dist2/dist3 ; v2 counters: dist1/dist2/rf-internal
  task automatic expect_fwd(string name, int e1, int e2, int e3);
    check(perf[1].fwd_ex == e1 && perf[1].fwd_mem == e2 && perf[1].fwd_wb == e3,
          $sformatf("%s v1 fwd %0d/%0d/%0d exp %0d/%0d/%0d", name, perf[1].fwd_ex, perf[1].fwd_mem, perf[1].fwd_wb, e1, e2, e3));
    check(perf[2].fwd_ex == e1 && perf[2].fwd_mem == e2 && perf[2].rf_bypass == e3,
          $sformatf("%s v2 fwd %0d/%0d/%0d exp %0d/%0d/%0d", name, perf[2].fwd_ex, perf[2].fwd_mem, perf[2].rf_bypass, e1, e2, e3));
    check(perf[0].fwd_ex == 0 && perf[0].fwd_mem == 0 && perf[0].fwd_wb == 0 && perf[0].rf_bypass == 0,
          $sformatf("%s interlock core forwards nothing", name));
  endtask

  initial begin
    // registers are not reset; tests use registers no earlier test wrote
    // wherever they expect a register to stay zero
    dbg_reg_addr = 0; dbg_mem_addr = 0;
    imem_we = 0; dmem_we = 0; imem_addr = 0; imem_wdata = 0; dmem_addr = 0; dmem_wdata = 0;

    // 0: clear every register (the register file has no reset)
    prog = {};
    for (int r = 1; r < 32; r++) prog.push_back(ADDI(r, 0, 0));
    prog.push_back(ECALL());
    run_prog(); expect_timing("clear", 32, 0, 0, 0);

    // A: distance 1 RAW
    prog = '{ADDI(1, 0, 5), ADDI(2, 1, 1), ECALL()};
    run_prog(); expect_reg(2, 6, "A"); expect_timing("A", 3, 3, 0, 0); expect_fwd("A", 1, 0, 0);

    // B: distance 2
    prog = '{ADDI(1, 0, 7), NOP(), ADDI(2, 1, 1), ECALL()};
    run_prog(); expect_reg(2, 8, "B"); expect_timing("B", 4, 2, 0, 0); expect_fwd("B", 0, 1, 0);

    // C: distance 3
    prog = '{ADDI(1, 0, 9), NOP(), NOP(), ADD(2, 0, 1), ECALL()};
    run_prog(); expect_reg(2, 9, "C"); expect_timing("C", 5, 1, 0, 0); expect_fwd("C", 0, 0, 1);

    // D: distance 4: safe
    prog = '{ADDI(1, 0, 11), NOP(), NOP(), NOP(), ADD(2, 1, 1), ECALL()};
    run_prog(); expect_reg(2, 22, "D"); expect_timing("D", 6, 0, 0, 0); expect_fwd("D", 0, 0, 0);

    // E: load followed by its user (load-use), mem word 3 = 0x103
    prog = '{LW(1, 12, 0), ADDI(2, 1, 1), ECALL()};
    run_prog(); expect_reg(2, 32'h104, "E"); expect_timing("E", 3, 3, 1, 0); expect_fwd("E", 0, 1, 0);

    // F: load, one instruction, user: forwarding needs no stall
    prog = '{LW(1, 16, 0), NOP(), SUB(2, 0, 1), ECALL()};
    run_prog(); expect_reg(2, -32'sh104, "F"); expect_timing("F", 4, 2, 0, 0); expect_fwd("F", 0, 1, 0);

    // G: x0 is never a hazard
    prog = '{ADDI(0, 0, 5), ADDI(2, 0, 1), ADD(3, 0, 2), ECALL()};
    run_prog(); expect_reg(2, 1, "G"); expect_reg(3, 1, "G"); expect_reg(0, 0, "G");
    expect_timing("G", 4, 3, 0, 0); expect_fwd("G", 1, 0, 0);

    // H: three users of one value: only the first one waits
    prog = '{ADDI(1, 0, 3), ADDI(2, 1, 1), ADDI(3, 1, 2), ADDI(4, 1, 3), ECALL()};
    run_prog(); expect_reg(4, 6, "H"); expect_timing("H", 5, 3, 0, 0); expect_fwd("H", 1, 1, 1);

    // I: youngest producer wins
    prog = '{ADDI(1, 0, 1), ADDI(1, 0, 2), ADDI(1, 0, 3), ADD(2, 1, 0), ECALL()};
    run_prog(); expect_reg(2, 3, "I"); expect_timing("I", 5, 3, 0, 0); expect_fwd("I", 1, 0, 0);

    // J: store data produced just before the store, then read back
    prog = '{ADDI(1, 0, 77), SW(1, 8, 0), LW(2, 8, 0), ECALL()};
    run_prog(); expect_reg(2, 77, "J"); expect_timing("J", 4, 3, 0, 0); expect_fwd("J", 1, 0, 0);
    dbg_mem_addr = 8; #1;
    for (int i = 0; i < 3; i++) check(dbg_mem_data[i] == 77, "J store");

    // K: taken branch skips two instructions (flushed), not-taken one falls through
    prog = '{ADDI(1, 0, 1), NOP(), NOP(), NOP(), BNE(1, 0, 12), ADDI(12, 0, 9), ADDI(13, 0, 9),
             BEQ(1, 0, 8), ADDI(14, 0, 5), ECALL()};
    run_prog(); expect_reg(12, 0, "K"); expect_reg(13, 0, "K"); expect_reg(14, 5, "K");
    expect_timing("K", 8, 0, 0, 1);

    // L: JAL, its link used right after the jump, JALR back to the ECALL at 4
    //    path 0 -> 8 -> 12 -> 4; the link user is at distance 3 from JAL
    prog = '{JAL(1, 8), ECALL(), ADDI(5, 1, 0), JALR(0, 1, 0), ADDI(16, 0, 1), ECALL()};
    run_prog(); expect_reg(1, 4, "L"); expect_reg(5, 4, "L"); expect_reg(16, 0, "L");
    expect_timing("L", 4, 1, 0, 2); expect_fwd("L", 0, 0, 1);

    // M: one producer, five consumers at distances 1..5 (x1 read by each):
    //    interlock: only the first waits (3 cycles); forwarding: distance 1, 2
    //    and 3 each use their own path, distances 4 and 5 read the RF
    prog = '{ADDI(1, 0, 40), ADDI(2, 1, 0), ADDI(3, 1, 0), ADDI(4, 1, 0), ADDI(5, 1, 0), ADDI(6, 1, 0), ECALL()};
    run_prog(); expect_reg(6, 40, "M"); expect_reg(2, 40, "M");
    expect_timing("M", 7, 3, 0, 0); expect_fwd("M", 1, 1, 1);

    // N: WAR and WAW are no hazard in this in-order pipeline: registers are
    //    read only in ID and written only in WB, in program order. x1 is
    //    read and then overwritten right away (WAR); x18 is written twice
    //    back to back (WAW). Nothing stalls and nothing is forwarded.
    prog = '{ADD(17, 1, 0), ADDI(1, 0, 99), ADDI(18, 0, 1), ADDI(18, 0, 2), ECALL()};
    run_prog(); expect_reg(17, 40, "N"); expect_reg(1, 99, "N"); expect_reg(18, 2, "N");
    expect_timing("N", 5, 0, 0, 0); expect_fwd("N", 0, 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
