// rv_asm_pkg: testbench helpers for the 5-stage pipeline.
//  - Encoders for the RV32I instructions the core implements, so tests can
//    write programs as readable lists of calls.
//  - rv_ref, a reference model written independently of the RTL: it executes
//    a program instruction by instruction (architectural result) and, for a
//    given hazard mode, computes when each instruction leaves ID from the
//    hazard rules alone:
//      enter(k) = leave(k-1) + 1, or + 3 after a taken branch/jump
//      interlock only : leave(k) >= leave(p) + 4 for each source written by p
//      forwarding     : leave(k) >= leave(p) + 2 if p is a load, else no wait
//      load delay slot: no wait at all; instead the instruction right after
//                       a load reads its sources before the load's write
//      store data in MEM: as forwarding, but a store's data source (rs2)
//                       never waits
//    Summing leave - enter gives the expected stall cycles; the program's
//    cycle count is leave(ECALL) + 4.
package rv_asm_pkg;

  typedef bit [31:0] u32;

  function automatic u32 enc_r(int f7, int rs2, int rs1, int f3, int rd, int opc);
    return {f7[6:0], rs2[4:0], rs1[4:0], f3[2:0], rd[4:0], opc[6:0]};
  endfunction
  function automatic u32 enc_i(int imm, int rs1, int f3, int rd, int opc);
    return {imm[11:0], rs1[4:0], f3[2:0], rd[4:0], opc[6:0]};
  endfunction
  function automatic u32 enc_s(int imm, int rs2, int rs1, int f3, int opc);
    return {imm[11:5], rs2[4:0], rs1[4:0], f3[2:0], imm[4:0], opc[6:0]};
  endfunction
  function automatic u32 enc_b(int off, int rs2, int rs1, int f3);
    return {off[12], off[10:5], rs2[4:0], rs1[4:0], f3[2:0], off[4:1], off[11], 7'b1100011};
  endfunction

  function automatic u32 ADD (int rd, int a, int b); return enc_r(0,  b, a, 0, rd, 'h33); endfunction
  function automatic u32 SUB (int rd, int a, int b); return enc_r(32, b, a, 0, rd, 'h33); endfunction
  function automatic u32 SLT (int rd, int a, int b); return enc_r(0,  b, a, 2, rd, 'h33); endfunction
  function automatic u32 XOR_(int rd, int a, int b); return enc_r(0,  b, a, 4, rd, 'h33); endfunction
  function automatic u32 OR_ (int rd, int a, int b); return enc_r(0,  b, a, 6, rd, 'h33); endfunction
  function automatic u32 AND_(int rd, int a, int b); return enc_r(0,  b, a, 7, rd, 'h33); endfunction
  function automatic u32 SRA (int rd, int a, int b); return enc_r(32, b, a, 5, rd, 'h33); endfunction
  function automatic u32 ADDI(int rd, int a, int imm); return enc_i(imm, a, 0, rd, 'h13); endfunction
  function automatic u32 SLTI(int rd, int a, int imm); return enc_i(imm, a, 2, rd, 'h13); endfunction
  function automatic u32 XORI(int rd, int a, int imm); return enc_i(imm, a, 4, rd, 'h13); endfunction
  function automatic u32 SLLI(int rd, int a, int sh);  return enc_i(sh,  a, 1, rd, 'h13); endfunction
  function automatic u32 SRLI(int rd, int a, int sh);  return enc_i(sh,  a, 5, rd, 'h13); endfunction
  function automatic u32 LW  (int rd, int off, int a); return enc_i(off, a, 2, rd, 'h03); endfunction
  function automatic u32 SW  (int rs, int off, int a); return enc_s(off, rs, a, 2, 'h23); endfunction
  function automatic u32 BEQ (int a, int b, int off);  return enc_b(off, b, a, 0); endfunction
  function automatic u32 BNE (int a, int b, int off);  return enc_b(off, b, a, 1); endfunction
  function automatic u32 BLT (int a, int b, int off);  return enc_b(off, b, a, 4); endfunction
  function automatic u32 BGE (int a, int b, int off);  return enc_b(off, b, a, 5); endfunction
  function automatic u32 JAL (int rd, int off);
    return {off[20], off[10:1], off[11], off[19:12], rd[4:0], 7'b1101111};
  endfunction
  function automatic u32 JALR(int rd, int a, int off); return enc_i(off, a, 0, rd, 'h67); endfunction
  function automatic u32 LUI (int rd, int imm20);      return {imm20[19:0], rd[4:0], 7'b0110111}; endfunction
  function automatic u32 AUIPC(int rd, int imm20);     return {imm20[19:0], rd[4:0], 7'b0010111}; endfunction
  function automatic u32 ECALL();                      return 32'h0000_0073; endfunction
  function automatic u32 NOP();                        return ADDI(0, 0, 0); endfunction

  localparam int MODE_STALL = 0;
  localparam int MODE_FWD   = 1;
  localparam int MODE_DSLOT = 2;
  localparam int MODE_SFWD  = 3;

  class rv_ref;
    u32  imem [1024];
    u32  dmem [1024];
    u32  x    [32];
    int  mode;
    // results
    longint retired, stalls, flushes, cycles, slot_reads, fwd_store;
    bit     halted;
    // timing state
    longint wr_leave [32];
    bit     wr_load  [32];

    function new(int m);
      mode = m;
      foreach (imem[i]) imem[i] = 32'h0000_0013;
      foreach (dmem[i]) dmem[i] = 0;
      foreach (x[i]) x[i] = 0;
    endfunction

    function void run(int max_steps);
      u32 pc = 0;
      longint prev_leave = 0, enter, leave;
      bit prev_redirect = 0, first = 1;
      bit pend = 0;          // delay-slot mode: load write not yet visible
      int pend_rd = 0;
      bit prev_ld = 0;       // previous instruction was a load, into prev_rd
      int prev_rd = 0;
      u32 pend_val = 0;
      foreach (wr_leave[i]) begin wr_leave[i] = -100; wr_load[i] = 0; end
      retired = 0; slot_reads = 0; fwd_store = 0; stalls = 0; flushes = 0; halted = 0; cycles = 0;
      for (int step = 0; step < max_steps && !halted; step++) begin
        u32 in = imem[pc[11:2]];
        bit [6:0] opc = in[6:0];
        bit [2:0] f3 = in[14:12];
        int rd = int'(in[11:7]), rs1 = int'(in[19:15]), rs2 = int'(in[24:20]);
        bit u1 = 0, u2 = 0, wr = 0, ld = 0, redirect = 0;
        u32 a, b, res = 0, npc, immi, imms, immb, immj, immu;
        immi = {{20{in[31]}}, in[31:20]};
        imms = {{20{in[31]}}, in[31:25], in[11:7]};
        immb = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
        immj = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
        immu = {in[31:12], 12'b0};
        a = x[rs1]; b = x[rs2];
        npc = pc + 4;
        case (opc)
          7'h33: begin
            u1 = 1; u2 = 1; wr = 1;
            case (f3)
              0: res = in[30] ? a - b : a + b;
              1: res = a << b[4:0];
              2: res = ($signed(a) < $signed(b)) ? 1 : 0;
              3: res = (a < b) ? 1 : 0;
              4: res = a ^ b;
              5: res = in[30] ? u32'($signed(a) >>> b[4:0]) : a >> b[4:0];
              6: res = a | b;
              7: res = a & b;
            endcase
          end
          7'h13: begin
            u1 = 1; wr = 1;
            case (f3)
              0: res = a + immi;
              1: res = a << in[24:20];
              2: res = ($signed(a) < $signed(immi)) ? 1 : 0;
              3: res = (a < immi) ? 1 : 0;
              4: res = a ^ immi;
              5: res = in[30] ? u32'($signed(a) >>> in[24:20]) : a >> in[24:20];
              6: res = a | immi;
              7: res = a & immi;
            endcase
          end
          7'h03: begin u1 = 1; wr = 1; ld = 1; res = dmem[(a + immi) >> 2 & 1023]; end
          7'h23: begin u1 = 1; u2 = 1; dmem[(a + imms) >> 2 & 1023] = b; end
          7'h63: begin
            bit t;
            u1 = 1; u2 = 1;
            case (f3)
              0: t = a == b;
              1: t = a != b;
              4: t = $signed(a) <  $signed(b);
              5: t = $signed(a) >= $signed(b);
              6: t = a <  b;
              default: t = a >= b;
            endcase
            if (t) begin npc = pc + immb; redirect = 1; end
          end
          7'h6f: begin wr = 1; res = pc + 4; npc = pc + immj; redirect = 1; end
          7'h67: begin u1 = 1; wr = 1; res = pc + 4; npc = (a + immi) & ~32'd1; redirect = 1; end
          7'h37: begin wr = 1; res = immu; end
          7'h17: begin wr = 1; res = pc + immu; end
          7'h73: halted = 1;
          default: ;
        endcase
        // timing
        enter = first ? 1 : prev_leave + (prev_redirect ? 3 : 1);
        leave = enter;
        for (int s = 0; s < 2; s++) begin
          int r = (s == 0) ? rs1 : rs2;
          bit u = (s == 0) ? u1 : u2;
          if (u && r != 0) begin
            if (mode == MODE_STALL && leave < wr_leave[r] + 4) leave = wr_leave[r] + 4;
            if ((mode == MODE_FWD || (mode == MODE_SFWD && !(s == 1 && opc == 7'h23))) &&
                wr_load[r] && leave < wr_leave[r] + 2) leave = wr_leave[r] + 2;
          end
        end
        stalls += leave - enter;
        // a store right behind the load of its data, not stalled: the data
        // is taken from MEM/WB in MEM
        if (mode == MODE_SFWD && opc == 7'h23 && prev_ld && rs2 != 0 && rs2 == prev_rd && leave == enter)
          fwd_store++;
        prev_ld = ld; prev_rd = rd;
        if (redirect) flushes++;
        if (pend && u1 && rs1 == pend_rd) slot_reads++;
        if (pend && u2 && rs2 == pend_rd) slot_reads++;
        // the load ahead of this instruction writes back before it does
        if (pend) begin x[pend_rd] = pend_val; pend = 0; end
        if (mode == MODE_DSLOT && ld && rd != 0) begin
          pend = 1; pend_rd = rd; pend_val = res;
        end else if (wr && rd != 0) begin
          x[rd] = res;
        end
        if (wr && rd != 0) begin
          wr_leave[rd] = leave;
          wr_load[rd]  = ld;
        end
        retired++;
        prev_leave = leave; prev_redirect = redirect; first = 0;
        pc = npc;
        if (halted) cycles = leave + 4;
        if (halted && pend) x[pend_rd] = pend_val;
      end
    endfunction
  endclass

endpackage
