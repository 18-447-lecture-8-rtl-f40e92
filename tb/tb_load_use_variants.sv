// tb_load_use_variants: three ways of handling a load's late result. Six
// cores run each program: forwarding in ID and in EX, each
//   - with the load-use stall (cores 0, 1),
//   - with a MIPS-style load delay slot, LOAD_DELAY_SLOT=1 (cores 2, 3): the
//     instruction after a load sees the register as it was before the
//     load, and nothing stalls,
//   - with the load-use stall but store data forwarded in MEM,
//     STORE_DATA_MEM_FWD=1 (cores 4, 5): a store of the value just loaded
//     does not stall.
// Every result is compared with rv_ref in the matching mode, and directed
// programs also carry hand-worked values:
//   - the slot instruction reads the old value, the next one the new value
//   - the slot used as a load base and as store data
//   - a NOP in the slot costs exactly the cycle the stall costs
//   - an independent instruction in the slot: both schemes lose nothing
//   - the insertion-sort inner loop with "1 stall or 1 nop": the stalled
//     loop and the NOP-filled loop take the same number of cycles
//   - load then store of the loaded value, and load then store through the
//     loaded base: stall counts and MEM-stage store forwards per core
//   - random programs with loads and their users at every distance
// Memories are at their default size (1024 words each).
module tb_load_use_variants;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  localparam int NC = 6;
  localparam haz_mode_e MODES [NC] = '{HAZ_FWD_ID, HAZ_FWD_EX, HAZ_FWD_ID, HAZ_FWD_EX, HAZ_FWD_ID, HAZ_FWD_EX};
  localparam bit        SLOT  [NC] = '{1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0};
  localparam bit        SFWD  [NC] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     imem_we, dmem_we;
  word_t    imem_addr, imem_wdata, dmem_addr, dmem_wdata;
  reg_idx_t dbg_reg_addr;
  word_t    dbg_mem_addr;
  word_t    dbg_reg_data [NC], dbg_mem_data [NC];
  logic     halted [NC];
  perf_t    perf [NC];

  for (genvar i = 0; i < NC; i++) begin : g_dut
    pipeline5 #(.HAZ_MODE(MODES[i]), .LOAD_DELAY_SLOT(SLOT[i]), .STORE_DATA_MEM_FWD(SFWD[i])) dut (
      .clk, .rst_n, .imem_we, .imem_addr, .imem_wdata,
      .dmem_we, .dmem_addr, .dmem_wdata,
      .dbg_reg_addr, .dbg_reg_data(dbg_reg_data[i]),
      .dbg_mem_addr, .dbg_mem_data(dbg_mem_data[i]),
      .halted(halted[i]), .perf(perf[i])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit all_halted();
    for (int i = 0; i < NC; i++) if (!halted[i]) return 0;
    return 1;
  endfunction

  u32 prog [$];
  u32 data [256];
  longint slot_cycles [NC];   // cycle counts of the last program

  // every register gets a known value first (the register file has no reset)
  task automatic prologue();
    prog = {};
    for (int r = 1; r < 32; r++) prog.push_back(ADDI(r, 0, r * 37 - 500));
  endtask

  task automatic run_prog(string name);
    rv_ref ref_m [NC];
    for (int i = 0; i < NC; i++) begin
      ref_m[i] = new(SLOT[i] ? MODE_DSLOT : SFWD[i] ? MODE_SFWD : MODE_FWD);
      foreach (prog[k]) ref_m[i].imem[k] = prog[k];
      foreach (data[k]) ref_m[i].dmem[k] = data[k];
      ref_m[i].run(200000);
    end
    rst_n = 0;
    @(negedge clk);
    for (int k = 0; k < 1024; k++) begin
      imem_we = 1; imem_addr = k * 4;
      imem_wdata = (k < prog.size()) ? prog[k] : NOP();
      dmem_we = 1; dmem_addr = k * 4;
      dmem_wdata = (k < 256) ? data[k] : 0;
      @(negedge clk);
    end
    imem_we = 0; dmem_we = 0;
    rst_n = 1;
    for (int c = 0; c < 200000 && !all_halted(); c++) @(negedge clk);
    check(all_halted(), {name, ": all cores halt"});
    for (int i = 0; i < NC; i++) begin
      int bad = 0;
      for (int r = 1; r < 32; r++) begin
        dbg_reg_addr = r[4:0]; #1;
        if (dbg_reg_data[i] != ref_m[i].x[r]) begin
          bad++;
          if (bad < 4) $display("  %s core%0d x%0d=%h exp %h", name, i, r, dbg_reg_data[i], ref_m[i].x[r]);
        end
      end
      check(bad == 0, $sformatf("%s core%0d registers", name, i));
      bad = 0;
      for (int k = 0; k < 256; k++) begin
        dbg_mem_addr = k * 4; #1;
        if (dbg_mem_data[i] != ref_m[i].dmem[k]) bad++;
      end
      check(bad == 0, $sformatf("%s core%0d memory (%0d words differ)", name, i, bad));
      check(longint'(perf[i].retired) == ref_m[i].retired, $sformatf("%s core%0d retired %0d exp %0d", name, i, perf[i].retired, ref_m[i].retired));
      check(longint'(perf[i].cycles) == ref_m[i].cycles, $sformatf("%s core%0d cycles %0d exp %0d", name, i, perf[i].cycles, ref_m[i].cycles));
      check(longint'(perf[i].stall_load_use) == ref_m[i].stalls, $sformatf("%s core%0d stalls %0d exp %0d", name, i, perf[i].stall_load_use, ref_m[i].stalls));
      check(longint'(perf[i].flushes) == ref_m[i].flushes, $sformatf("%s core%0d flushes %0d exp %0d", name, i, perf[i].flushes, ref_m[i].flushes));
      check(longint'(perf[i].slot_reads) == ref_m[i].slot_reads, $sformatf("%s core%0d slot reads %0d exp %0d", name, i, perf[i].slot_reads, ref_m[i].slot_reads));
      check(longint'(perf[i].fwd_store) == ref_m[i].fwd_store, $sformatf("%s core%0d store forwards %0d exp %0d", name, i, perf[i].fwd_store, ref_m[i].fwd_store));
      if (SLOT[i]) check(perf[i].stall_load_use == 0, $sformatf("%s core%0d: a delay-slot core never stalls", name, i));
      slot_cycles[i] = longint'(perf[i].cycles);
    end
  endtask

  task automatic expect_reg(int i, int r, word_t v, string name);
    word_t got;
    dbg_reg_addr = r[4:0]; #1;
    got = dbg_reg_data[i];
    check(got == v, $sformatf("%s core%0d x%0d=%h exp %h", name, i, r, got, v));
  endtask

  // insertion sort; with slot_nop a NOP follows "lw t4" (the MIPS schedule)
  task automatic sort_program(int base, int n, bit slot_nop);
    int d;
    d = slot_nop ? 1 : 0;
    prologue();
    prog.push_back(ADDI(10, 0, base));
    prog.push_back(ADDI(11, 0, n));
    prog.push_back(ADDI(8, 0, 1));               // i = 1
    prog.push_back(BGE(8, 11, (16 + d) * 4));    // outer: if (i >= n) done
    prog.push_back(ADDI(9, 8, -1));              // j = i - 1
    prog.push_back(SLTI(5, 9, 0));               // for2tst: t0 = j < 0
    prog.push_back(BNE(5, 0, (11 + d) * 4));     //   -> exit2
    prog.push_back(SLLI(6, 9, 2));               //   t1 = j * 4
    prog.push_back(ADD(7, 10, 6));               //   t2 = &v[j]
    prog.push_back(LW(28, 0, 7));                //   t3 = v[j]
    prog.push_back(LW(29, 4, 7));                //   t4 = v[j+1]
    if (slot_nop) prog.push_back(NOP());         //   delay slot
    prog.push_back(SLT(5, 29, 28));              //   t0 = t4 < t3
    prog.push_back(BEQ(5, 0, 5 * 4));            //   -> exit2
    prog.push_back(SW(29, 0, 7));                //   swap
    prog.push_back(SW(28, 4, 7));
    prog.push_back(ADDI(9, 9, -1));              //   j -= 1
    prog.push_back(JAL(0, -(11 + d) * 4));       //   -> for2tst
    prog.push_back(ADDI(8, 8, 1));               // exit2: i += 1
    prog.push_back(JAL(0, -(15 + d) * 4));       //   -> outer
    prog.push_back(ECALL());                     // done
  endtask

  // dense register reuse over x1..x7 with many loads; x9 = 64 is a base
  task automatic random_program(int len);
    prologue();
    prog.push_back(ADDI(9, 0, 64));
    for (int k = 0; k < len; k++) begin
      int kind, rd, a, b, imm, skip;
      kind = $urandom_range(0, 11);
      rd = $urandom_range(0, 7); a = $urandom_range(0, 7); b = $urandom_range(0, 7);
      imm = $urandom_range(0, 255) - 128;
      skip = $urandom_range(1, 3);
      case (kind)
        0: prog.push_back(ADD(rd, a, b));
        1: prog.push_back(SUB(rd, a, b));
        2: prog.push_back(ADDI(rd, a, imm));
        3: prog.push_back(XOR_(rd, a, b));
        4, 5, 6: prog.push_back(LW(rd, $urandom_range(0, 15) * 4, (kind == 4) ? 9 : 0));
        7: prog.push_back(LW(rd, 0, a));   // address from a loaded or computed value
        8: prog.push_back(SW(b, $urandom_range(0, 15) * 4, ($urandom_range(0, 1) != 0) ? 9 : 0));
        9: prog.push_back(BNE(a, b, (skip + 1) * 4));
        10: prog.push_back(BLT(a, b, (skip + 1) * 4));
        default: prog.push_back(SLT(rd, a, b));
      endcase
    end
    for (int k = 0; k < 3; k++) prog.push_back(NOP());
    prog.push_back(ECALL());
  endtask

  initial begin
    longint stalled_cycles [NC];
    imem_we = 0; dmem_we = 0; imem_addr = 0; imem_wdata = 0;
    dmem_addr = 0; dmem_wdata = 0; dbg_reg_addr = 0; dbg_mem_addr = 0;
    foreach (data[k]) data[k] = 32'h100 + k;

    // 1: x1 = 5, then x1 = mem[3] = 0x103; the slot instruction adds to the
    //    old 5, the one after it to 0x103
    prologue();
    prog.push_back(ADDI(1, 0, 5));
    prog.push_back(LW(1, 12, 0));
    prog.push_back(ADDI(2, 1, 1));
    prog.push_back(ADDI(3, 1, 1));
    prog.push_back(ECALL());
    run_prog("old-value");
    for (int i = 0; i < NC; i++) begin
      expect_reg(i, 2, SLOT[i] ? 32'd6 : 32'h104, "old-value");
      expect_reg(i, 3, 32'h104, "old-value");
      check(perf[i].stall_load_use == (SLOT[i] ? 0 : 1), $sformatf("old-value core%0d stalls", i));
      check(perf[i].slot_reads == (SLOT[i] ? 1 : 0), $sformatf("old-value core%0d slot reads", i));
    end

    // 2: slot instruction uses the loaded register as a load base and as
    //    store data: x1 = 8, x1 = mem[4] = 0x104, then lw x2, 0(x1) and
    //    sw x1, 40(x0)
    prologue();
    prog.push_back(ADDI(1, 0, 8));
    prog.push_back(LW(1, 16, 0));
    prog.push_back(LW(2, 0, 1));
    prog.push_back(ECALL());
    run_prog("slot-base");
    for (int i = 0; i < NC; i++) expect_reg(i, 2, SLOT[i] ? 32'h102 : 32'h141, "slot-base");
    prologue();
    prog.push_back(ADDI(1, 0, 8));
    prog.push_back(LW(1, 16, 0));
    prog.push_back(SW(1, 40, 0));
    prog.push_back(ECALL());
    run_prog("slot-store");
    dbg_mem_addr = 40; #1;
    for (int i = 0; i < NC; i++)
      check(dbg_mem_data[i] == (SLOT[i] ? 32'd8 : 32'h104), $sformatf("slot-store core%0d mem[10]=%h", i, dbg_mem_data[i]));

    // 3: lw; addi user -- stalled on the interlocking cores -- against
    //    lw; nop; addi user on the delay-slot cores: same cycle count
    prologue();
    prog.push_back(LW(1, 12, 0));
    prog.push_back(ADDI(2, 1, 1));
    prog.push_back(ECALL());
    run_prog("stall");
    stalled_cycles = slot_cycles;
    prologue();
    prog.push_back(LW(1, 12, 0));
    prog.push_back(NOP());
    prog.push_back(ADDI(2, 1, 1));
    prog.push_back(ECALL());
    run_prog("nop-fill");
    for (int i = 0; i < NC; i++) expect_reg(i, 2, 32'h104, "nop-fill");
    for (int i = 2; i < 4; i++)
      check(slot_cycles[i] == stalled_cycles[i - 2],
            $sformatf("nop in slot: %0d cycles, stall: %0d", slot_cycles[i], stalled_cycles[i - 2]));

    // 3b: load, then store of the loaded value (mem[3] = 0x103 to byte 40),
    //     then read back. The delay-slot cores store the old x1 (-463).
    prologue();
    prog.push_back(LW(1, 12, 0));
    prog.push_back(SW(1, 40, 0));
    prog.push_back(LW(2, 40, 0));
    prog.push_back(ECALL());
    run_prog("load-store");
    for (int i = 0; i < NC; i++) begin
      expect_reg(i, 2, SLOT[i] ? -32'sd463 : 32'h103, "load-store");
      check(perf[i].stall_load_use == ((SLOT[i] || SFWD[i]) ? 0 : 1), $sformatf("load-store core%0d stalls %0d", i, perf[i].stall_load_use));
      check(perf[i].fwd_store == (SFWD[i] ? 1 : 0), $sformatf("load-store core%0d store forwards %0d", i, perf[i].fwd_store));
    end
    // 3c: the loaded value is the store's base: that still stalls
    prologue();
    prog.push_back(LW(1, 16, 0));
    prog.push_back(SW(5, 0, 1));
    prog.push_back(ECALL());
    run_prog("load-base");
    for (int i = 0; i < NC; i++)
      check(perf[i].stall_load_use == (SLOT[i] ? 0 : 1) && perf[i].fwd_store == 0, $sformatf("load-base core%0d", i));

    // 4: an independent instruction in the slot: nobody loses a cycle
    prologue();
    prog.push_back(LW(1, 12, 0));
    prog.push_back(ADDI(5, 0, 7));
    prog.push_back(ADDI(2, 1, 1));
    prog.push_back(ECALL());
    run_prog("indep-fill");
    for (int i = 0; i < NC; i++) begin
      expect_reg(i, 2, 32'h104, "indep-fill");
      check(perf[i].cycles == 31 + 4 + 4, $sformatf("indep-fill core%0d cycles %0d", i, perf[i].cycles));
    end

    // 5: insertion sort of 20 words: stalled loop against NOP-filled loop
    for (int k = 0; k < 20; k++) data[32 + k] = $urandom_range(0, 999);
    sort_program(128, 20, 1'b0);
    run_prog("sort");
    stalled_cycles = slot_cycles;
    sort_program(128, 20, 1'b1);
    run_prog("sort-nop");
    for (int i = 2; i < 4; i++)
      check(slot_cycles[i] == stalled_cycles[i - 2],
            $sformatf("sort: nop-filled %0d cycles, stalled %0d", slot_cycles[i], stalled_cycles[i - 2]));
    for (int i = 0; i < NC; i++) begin
      automatic word_t prev = 0, cur = 0;
      automatic int unsorted = 0;
      for (int k = 0; k < 20; k++) begin
        dbg_mem_addr = 128 + 4 * k; #1;
        cur = dbg_mem_data[i];
        if (k > 0 && $signed(cur) < $signed(prev)) unsorted++;
        prev = cur;
      end
      check(unsorted == 0, $sformatf("sort core%0d result sorted", i));
    end
    $display("sort of 20 words: stalled %0d/%0d cycles, nop-filled %0d/%0d cycles",
             stalled_cycles[0], stalled_cycles[1], slot_cycles[2], slot_cycles[3]);
    foreach (data[k]) data[k] = 32'h100 + k;

    // 6: random programs
    for (int t = 0; t < 8; t++) begin
      for (int k = 0; k < 32; k++) data[k] = $urandom_range(0, 60) * 4;
      random_program(100);
      run_prog($sformatf("random%0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
