// tb_hazard_top: end-to-end test of the whole design at its default sizes.
// The same program runs on the five cores (interlock only, forwarding in
// ID, forwarding in EX, forwarding in EX with a load delay slot, forwarding
// in EX with store data forwarded in MEM). For every program the testbench
// runs rv_ref, an independent instruction-level model with a hazard timing
// model, and compares every register, the first 256 data-memory words, and
// each core's retired, stall, flush, delay-slot-read, MEM-store-forward and
// cycle counts with it.
// Programs:
//   - the insertion-sort inner-loop body as one straight pass: the
//     interlocked core must lose 6 x 3 = 18 cycles, the forwarding cores 1,
//     the delay-slot core 0
//   - a copy of 8 words, each store right behind its load: 8 load-use
//     stalls on cores 1 and 2, none and 8 MEM store forwards on core 4
//   - insertion sort of a random array (result must be sorted)
//   - random programs with dense register reuse, loads, stores, x0 writes,
//     forward branches and jumps
// Then it drives the staggered adder with chains of back-to-back dependent
// additions, and the unstaggered adder with the same kind of stream (each
// addition held while in_ready is low). Every mechanism (interlock stall,
// load-use stall, each forwarding path, internal register-file forward,
// flush, delay-slot read, store data forwarded in MEM, dependent adds
// without stall, a held addition in the unstaggered adder) must happen at
// least once.
module tb_hazard_top;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     imem_we [5], dmem_we [5];
  word_t    imem_addr [5], imem_wdata [5], dmem_addr [5], dmem_wdata [5];
  reg_idx_t dbg_reg_addr [5];
  word_t    dbg_reg_data [5], dbg_mem_addr [5], dbg_mem_data [5];
  logic     halted [5];
  perf_t    perf [5];
  logic     add_in_valid, add_dep_a, add_dep_b, add_in_ready, add_out_valid;
  word_t    add_a, add_b, add_sum;
  logic     uadd_in_valid, uadd_dep_a, uadd_dep_b, uadd_in_ready, uadd_out_valid;
  word_t    uadd_a, uadd_b, uadd_sum;

  hazard_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters, summed over all programs
  longint m_stall_raw = 0, m_load_use = 0, m_flush = 0;
  longint m_v1_ex = 0, m_v1_mem = 0, m_v1_wb = 0, m_v2_ex = 0, m_v2_mem = 0, m_v2_rf = 0;
  longint m_dep_adds = 0, m_slot = 0, m_sfwd = 0, m_uadd_waits = 0;

  u32 prog [$];
  u32 data [256];
  longint last_stalls [5];

  task automatic prologue();
    prog = {};
    for (int r = 1; r < 32; r++) prog.push_back(ADDI(r, 0, r * 37 - 500));
  endtask

  task automatic run_prog(string name);
    rv_ref ref_m [5];
    for (int i = 0; i < 5; i++) begin
      ref_m[i] = new(i == 0 ? MODE_STALL : i == 3 ? MODE_DSLOT : i == 4 ? MODE_SFWD : MODE_FWD);
      foreach (prog[k]) ref_m[i].imem[k] = prog[k];
      foreach (data[k]) ref_m[i].dmem[k] = data[k];
      ref_m[i].run(200000);
    end
    rst_n = 0;
    @(negedge clk);
    for (int k = 0; k < 1024; k++) begin
      for (int i = 0; i < 5; i++) begin
        imem_we[i] = 1; imem_addr[i] = k * 4;
        imem_wdata[i] = (k < prog.size()) ? prog[k] : NOP();
        dmem_we[i] = (k < 256); dmem_addr[i] = k * 4;
        dmem_wdata[i] = (k < 256) ? data[k] : 0;
      end
      @(negedge clk);
    end
    for (int i = 0; i < 5; i++) begin imem_we[i] = 0; dmem_we[i] = 0; end
    rst_n = 1;
    for (int c = 0; c < 200000 && !(halted[0] && halted[1] && halted[2] && halted[3] && halted[4]); c++) @(negedge clk);
    check(halted[0] && halted[1] && halted[2] && halted[3] && halted[4], {name, ": all cores halt"});
    for (int i = 0; i < 5; i++) begin
      int bad = 0;
      for (int r = 1; r < 32; r++) begin
        dbg_reg_addr[i] = r[4:0]; #1;
        if (dbg_reg_data[i] != ref_m[i].x[r]) begin
          bad++;
          if (bad < 4) $display("  %s core%0d x%0d=%h exp %h", name, i, r, dbg_reg_data[i], ref_m[i].x[r]);
        end
      end
      check(bad == 0, $sformatf("%s core%0d registers", name, i));
      bad = 0;
      for (int k = 0; k < 256; k++) begin
        dbg_mem_addr[i] = k * 4; #1;
        if (dbg_mem_data[i] != ref_m[i].dmem[k]) bad++;
      end
      check(bad == 0, $sformatf("%s core%0d memory (%0d words differ)", name, i, bad));
      check(perf[i].retired == ref_m[i].retired, $sformatf("%s core%0d retired %0d exp %0d", name, i, perf[i].retired, ref_m[i].retired));
      check(perf[i].flushes == ref_m[i].flushes, $sformatf("%s core%0d flushes %0d exp %0d", name, i, perf[i].flushes, ref_m[i].flushes));
      check(perf[i].cycles == ref_m[i].cycles, $sformatf("%s core%0d cycles %0d exp %0d", name, i, perf[i].cycles, ref_m[i].cycles));
      last_stalls[i] = (i == 0) ? perf[i].stall_raw : perf[i].stall_load_use;
      check(last_stalls[i] == ref_m[i].stalls, $sformatf("%s core%0d stalls %0d exp %0d", name, i, last_stalls[i], ref_m[i].stalls));
      check(longint'(perf[i].fwd_store) == ref_m[i].fwd_store, $sformatf("%s core%0d store forwards %0d exp %0d", name, i, perf[i].fwd_store, ref_m[i].fwd_store));
      check(longint'(perf[i].slot_reads) == ref_m[i].slot_reads, $sformatf("%s core%0d slot reads %0d exp %0d", name, i, perf[i].slot_reads, ref_m[i].slot_reads));
    end
    m_stall_raw += perf[0].stall_raw;
    m_load_use  += perf[1].stall_load_use + perf[2].stall_load_use;
    m_flush     += perf[0].flushes;
    m_v1_ex += perf[1].fwd_ex; m_v1_mem += perf[1].fwd_mem; m_v1_wb += perf[1].fwd_wb;
    m_slot += perf[3].slot_reads;
    m_sfwd += perf[4].fwd_store;
    m_v2_ex += perf[2].fwd_ex; m_v2_mem += perf[2].fwd_mem; m_v2_rf += perf[2].rf_bypass;
    $display("%-10s retired %0d  cycles %0d/%0d/%0d/%0d  stalls %0d/%0d/%0d/%0d  IPC %.2f/%.2f/%.2f/%.2f", name,
             perf[0].retired, perf[0].cycles, perf[1].cycles, perf[2].cycles, perf[3].cycles,
             perf[0].stall_raw, perf[1].stall_load_use, perf[2].stall_load_use, perf[3].stall_load_use,
             real'(perf[0].retired) / perf[0].cycles, real'(perf[1].retired) / perf[1].cycles,
             real'(perf[2].retired) / perf[2].cycles, real'(perf[3].retired) / perf[3].cycles);
  endtask

  // insertion sort (x10 = array base, x11 = n, x8 = i, x9 = j)
  task automatic sort_program(int base, int n);
    prologue();
    prog.push_back(ADDI(10, 0, base));
    prog.push_back(ADDI(11, 0, n));
    prog.push_back(ADDI(8, 0, 1));           // i = 1
    prog.push_back(BGE(8, 11, 16 * 4));      // outer: if (i >= n) done
    prog.push_back(ADDI(9, 8, -1));          // j = i - 1
    prog.push_back(SLTI(5, 9, 0));           // for2tst: t0 = j < 0
    prog.push_back(BNE(5, 0, 11 * 4));       //   -> exit2
    prog.push_back(SLLI(6, 9, 2));           //   t1 = j * 4
    prog.push_back(ADD(7, 10, 6));           //   t2 = &v[j]
    prog.push_back(LW(28, 0, 7));            //   t3 = v[j]
    prog.push_back(LW(29, 4, 7));            //   t4 = v[j+1]
    prog.push_back(SLT(5, 29, 28));          //   t0 = t4 < t3
    prog.push_back(BEQ(5, 0, 5 * 4));        //   -> exit2
    prog.push_back(SW(29, 0, 7));            //   swap
    prog.push_back(SW(28, 4, 7));
    prog.push_back(ADDI(9, 9, -1));          //   j -= 1
    prog.push_back(JAL(0, -11 * 4));         //   -> for2tst
    prog.push_back(ADDI(8, 8, 1));           // exit2: i += 1
    prog.push_back(JAL(0, -15 * 4));         //   -> outer
    prog.push_back(ECALL());                 // done
  endtask

  task automatic random_program(int len);
    int pool_hi = 7;
    prologue();
    prog.push_back(ADDI(9, 0, 64));
    prog.push_back(ADDI(12, 0, 256));
    for (int k = 0; k < len; k++) begin
      int kind, rd, a, b, imm, skip;
      kind = $urandom_range(0, 16);
      rd = $urandom_range(0, pool_hi); a = $urandom_range(0, pool_hi); b = $urandom_range(0, pool_hi);
      imm = $urandom_range(0, 255) - 128;
      skip = $urandom_range(1, 3);
      case (kind)
        0: prog.push_back(ADD(rd, a, b));
        1: prog.push_back(SUB(rd, a, b));
        2: prog.push_back(SLT(rd, a, b));
        3: prog.push_back(XOR_(rd, a, b));
        4: prog.push_back(OR_(rd, a, b));
        5: prog.push_back(SRA(rd, a, b));
        6: prog.push_back(ADDI(rd, a, imm));
        7: prog.push_back(XORI(rd, a, imm));
        8: prog.push_back(SLLI(rd, a, imm & 31));
        9, 10: prog.push_back(LW(rd, $urandom_range(0, 15) * 4, (kind == 9) ? 9 : 0));
        11: prog.push_back(SW(b, $urandom_range(0, 15) * 4, ($urandom_range(0, 1) != 0) ? 9 : 0));
        12: begin
          case ($urandom_range(0, 3))
            0: prog.push_back(BEQ(a, b, (skip + 1) * 4));
            1: prog.push_back(BNE(a, b, (skip + 1) * 4));
            2: prog.push_back(BLT(a, b, (skip + 1) * 4));
            default: prog.push_back(BGE(a, b, (skip + 1) * 4));
          endcase
        end
        13: prog.push_back(JAL(rd, (skip + 1) * 4));
        14: begin
          // x12 always holds 256, so even when a branch skips the ADDI the
          // JALR lands two instructions ahead (control only moves forward)
          prog.push_back(ADDI(12, 0, 256));
          prog.push_back(JALR(rd, 12, (prog.size() + 2) * 4 - 256));
        end
        15: prog.push_back(AUIPC(rd, $urandom_range(0, 'hfffff)));
        default: prog.push_back(LUI(rd, $urandom_range(0, 'hfffff)));
      endcase
    end
    for (int k = 0; k < 3; k++) prog.push_back(NOP());
    prog.push_back(ECALL());
  endtask

  // staggered adder: chains of dependent additions issued every cycle
  word_t add_last;
  word_t add_exp [$];
  int add_seen = 0;
  word_t uadd_exp [$];
  int uadd_seen = 0;
  always @(posedge clk) begin
    if (uadd_out_valid && rst_n) begin
      word_t e;
      e = uadd_exp.pop_front();
      uadd_seen++;
      check(uadd_sum == e, $sformatf("unstaggered adder sum %h exp %h", uadd_sum, e));
    end
  end
  always @(posedge clk) begin
    if (add_out_valid && rst_n) begin
      word_t e;
      e = add_exp.pop_front();
      add_seen++;
      check(add_sum == e, $sformatf("adder sum %h exp %h", add_sum, e));
    end
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      imem_we[i] = 0; dmem_we[i] = 0; imem_addr[i] = 0; imem_wdata[i] = 0;
      dmem_addr[i] = 0; dmem_wdata[i] = 0; dbg_reg_addr[i] = 0; dbg_mem_addr[i] = 0;
    end
    add_in_valid = 0; add_a = 0; add_b = 0; add_dep_a = 0; add_dep_b = 0;
    uadd_in_valid = 0; uadd_a = 0; uadd_b = 0; uadd_dep_a = 0; uadd_dep_b = 0;

    // 1. the inner-loop body of insertion sort as one straight pass
    foreach (data[k]) data[k] = $urandom_range(0, 1000);
    prologue();
    prog.push_back(ADDI(8, 0, 3));
    prog.push_back(ADDI(10, 0, 128));
    for (int k = 0; k < 3; k++) prog.push_back(NOP());
    prog.push_back(ADDI(9, 8, -1));     // addi  s1, s0, -1
    prog.push_back(SLTI(5, 9, 0));      // slti  t0, s1, 0
    prog.push_back(BNE(5, 0, 28));      // bne   t0, zero, exit2
    prog.push_back(SLLI(6, 9, 2));      // sll   t1, s1, 2
    prog.push_back(ADD(7, 10, 6));      // add   t2, a0, t1
    prog.push_back(LW(28, 0, 7));       // lw    t3, 0(t2)
    prog.push_back(LW(29, 4, 7));       // lw    t4, 4(t2)
    prog.push_back(SLT(5, 29, 28));     // slt   t0, t4, t3
    prog.push_back(BEQ(5, 0, 4));       // beq   t0, zero, exit2
    prog.push_back(ECALL());            // exit2
    run_prog("pnh_body");
    check(last_stalls[0] == 18, $sformatf("P&H body: interlock stalls %0d exp 18", last_stalls[0]));
    check(last_stalls[1] == 1 && last_stalls[2] == 1 && last_stalls[4] == 1, "P&H body: forwarding stalls exp 1");
    check(last_stalls[3] == 0 && perf[3].slot_reads == 1, "P&H body: delay-slot core 0 stalls, 1 slot read");

    // 1b. copy 8 words, each store right behind the load of its data
    prologue();
    for (int k = 0; k < 8; k++) begin
      prog.push_back(LW(5, 128 + 4 * k, 0));
      prog.push_back(SW(5, 256 + 4 * k, 0));
    end
    prog.push_back(ECALL());
    run_prog("copy8");
    check(last_stalls[1] == 8 && last_stalls[2] == 8, "copy8: load-use stall per store on the forwarding cores");
    check(last_stalls[4] == 0 && perf[4].fwd_store == 8, "copy8: MEM store forward core 0 stalls, 8 forwards");

    // 2. insertion sort of 24 random words at byte address 128
    foreach (data[k]) data[k] = $urandom_range(0, 100000);
    sort_program(128, 24);
    run_prog("sort24");
    // core 3 runs the loop unscheduled: slt reads t4 in the load's delay
    // slot and so sees the previous value, so only the register and memory
    // match with its reference model is checked for it, not the sort order;
    // the other four must all sort
    for (int i = 0; i < 5; i++) begin
      automatic bit ok = 1;
      if (i == 3) continue;
      for (int k = 0; k < 23; k++) begin
        word_t v0, v1;
        dbg_mem_addr[i] = 128 + k * 4; #1; v0 = dbg_mem_data[i];
        dbg_mem_addr[i] = 132 + k * 4; #1; v1 = dbg_mem_data[i];
        if (v0 > v1) ok = 0;
      end
      check(ok, $sformatf("sort24 core%0d array sorted", i));
    end
    begin
      automatic int inversions = 0;
      for (int k = 0; k < 23; k++) begin
        word_t v0, v1;
        dbg_mem_addr[3] = 128 + k * 4; #1; v0 = dbg_mem_data[3];
        dbg_mem_addr[3] = 132 + k * 4; #1; v1 = dbg_mem_data[3];
        if (v0 > v1) inversions++;
      end
      $display("sort24 on the delay-slot core (loop not scheduled for the slot): %0d of 23 neighbour pairs out of order", inversions);
    end

    // 3. random programs
    for (int p = 0; p < 12; p++) begin
      foreach (data[k]) data[k] = $urandom();
      random_program(120);
      run_prog($sformatf("random%0d", p));
    end

    // 4. staggered adder: dependent chains, one addition per cycle
    add_last = 0;
    for (int i = 0; i < 400; i++) begin
      word_t oa, ob;
      @(negedge clk);
      add_in_valid = 1;
      add_a = $urandom(); add_b = (i % 4 == 0) ? 32'h0000_ffff : $urandom();
      add_dep_a = (i % 5 != 0); add_dep_b = (i % 7 == 0);
      oa = add_dep_a ? add_last : add_a;
      ob = add_dep_b ? add_last : add_b;
      add_last = oa + ob;
      add_exp.push_back(add_last);
      if ((add_dep_a || add_dep_b) && i > 0) m_dep_adds++;
    end
    @(negedge clk); add_in_valid = 0;
    repeat (5) @(negedge clk);
    check(add_seen == 400 && add_exp.size() == 0, $sformatf("adder produced %0d of 400 sums", add_seen));

    // 5. the same kind of stream on the unstaggered adder: a dependent
    //    addition right after its producer is held one cycle
    add_last = 0;
    for (int i = 0; i < 400; i++) begin
      word_t oa, ob;
      @(negedge clk);
      uadd_in_valid = 1;
      uadd_a = $urandom(); uadd_b = (i % 4 == 0) ? 32'h0000_ffff : $urandom();
      uadd_dep_a = (i % 5 != 0); uadd_dep_b = (i % 7 == 0);
      #1;
      while (!uadd_in_ready) begin m_uadd_waits++; @(negedge clk); #1; end
      oa = uadd_dep_a ? add_last : uadd_a;
      ob = uadd_dep_b ? add_last : uadd_b;
      add_last = oa + ob;
      uadd_exp.push_back(add_last);
    end
    @(negedge clk); uadd_in_valid = 0;
    repeat (5) @(negedge clk);
    check(uadd_seen == 400 && uadd_exp.size() == 0, $sformatf("unstaggered adder produced %0d of 400 sums", uadd_seen));
    check(add_in_ready, "staggered adder always ready");

    $display("mechanisms: interlock stalls %0d, load-use stalls %0d, flushes %0d", m_stall_raw, m_load_use, m_flush);
    $display("            v1 forwards EX/MEM/WB %0d/%0d/%0d, v2 forwards EX/MEM %0d/%0d, RF internal %0d",
             m_v1_ex, m_v1_mem, m_v1_wb, m_v2_ex, m_v2_mem, m_v2_rf);
    $display("            store data forwarded in MEM %0d", m_sfwd);
    $display("            load delay slot reads %0d, back-to-back dependent adds %0d, unstaggered adder waits %0d",
             m_slot, m_dep_adds, m_uadd_waits);
    check(m_stall_raw > 0, "interlock stall happened");
    check(m_load_use > 0, "load-use stall happened");
    check(m_flush > 0, "taken-branch flush happened");
    check(m_v1_ex > 0 && m_v1_mem > 0 && m_v1_wb > 0, "every v1 forwarding path used");
    check(m_v2_ex > 0 && m_v2_mem > 0, "every v2 forwarding path used");
    check(m_v2_rf > 0, "register-file internal forward used");
    check(m_dep_adds > 0, "dependent additions without stall");
    check(m_slot > 0, "load delay slot read the pre-load value");
    check(m_sfwd > 0, "store took its data from the load just ahead, in MEM");
    check(m_uadd_waits > 0, "unstaggered adder held a dependent addition");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
