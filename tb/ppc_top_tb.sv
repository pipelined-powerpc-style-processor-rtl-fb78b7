// ppc_top_tb: end-to-end test of the processor with all parameters at their
// defaults.
//
// A program is assembled by the functions below into the behavioural memory
// (mem_model, 16 KB, aliased, so the trap handler at 0x0FFF_F000 sits at
// 0x3000). It exercises every instruction class and every pipeline
// mechanism: forwarding from each of the four sources, the load-use stall,
// the late store-data path, byte accesses, carry/overflow in XER, the
// shifter, compares, a CTR loop that mispredicts and then predicts
// correctly, branch-and-link, instruction and data cache misses, a dirty-line
// writeback, uncached I/O writes and reads, an alignment trap, an
// illegal-instruction trap, an external interrupt returning with rti, both
// caches wanting the bus at once, and the data-cache flush on halt.
//
// Two marker instructions ("or rX,rX,rX", which change nothing) let the
// bench compare the register file with hand-computed values when each marker
// reaches write-back; the final state (registers, CR, SPRs, memory after the
// flush, the I/O register) is checked after 'halted'. Each mechanism's
// occurrences are counted and a mechanism that never happened counts as a
// failure. A watchdog ends the run after 40000 cycles.
module ppc_top_tb;
  import ppc_pkg::*;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [1:0]   ext_int = 2'b00;
  logic         mem_req, mem_we, mem_valid, halted;
  logic [31:0]  mem_addr, io_wdata, io_rdata;
  logic [127:0] mem_wdata, mem_rdata;

  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = !clk;

  ppc_top dut (
    .clk, .rst, .ext_int,
    .mem_req, .mem_addr, .mem_we, .mem_wdata, .mem_rdata, .mem_valid,
    .io_wdata, .io_rdata, .halted
  );

  mem_model #(.LATENCY(3), .LINES(1024)) u_mem (
    .clk, .mem_req, .mem_addr, .mem_we, .mem_wdata, .mem_rdata, .mem_valid,
    .io_wdata, .io_rdata
  );

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] D(input int op, rt, ra, input int imm);
    return {op[5:0], rt[4:0], ra[4:0], imm[15:0]};
  endfunction
  function automatic logic [31:0] X(input int rt, ra, rb, xo, input int rc = 0);
    return {6'd31, rt[4:0], ra[4:0], rb[4:0], xo[9:0], rc[0]};
  endfunction
  function automatic logic [31:0] BC(input int bo, bi, input int disp, input int lk = 0);
    return {6'd16, bo[4:0], bi[4:0], disp[15:2], 1'b0, lk[0]};
  endfunction
  function automatic logic [31:0] BCR(input int bo, bi);
    return {6'd19, bo[4:0], bi[4:0], 5'd0, 10'd16, 1'b0};
  endfunction
  localparam logic [31:0] RTI  = {6'd19, 15'd0, 10'd17, 1'b0};
  localparam logic [31:0] HALT = {6'd63, 26'd0};
  localparam logic [31:0] ILLEGAL = 32'h0400_0000;   // primary opcode 1

  // logical/shift forms put the source in the RT field and write RA
  function automatic logic [31:0] LOGIC(input int xo, ra, rs, rb);
    return X(rs, ra, rb, xo);
  endfunction
  function automatic logic [31:0] MTSPR(input int spr, rs);
    return X(rs, spr, 0, 467);
  endfunction
  function automatic logic [31:0] MFSPR(input int rt, spr);
    return X(rt, spr, 0, 339);
  endfunction
  function automatic logic [31:0] CMP(input int bf, ra, rb, input bit uns);
    return X(bf << 2, ra, rb, uns ? 32 : 0);
  endfunction

  localparam int AI = 12, AIREC = 13, L = 32, LU = 33, LBZU = 35,
                 ST = 36, STU = 37, STBU = 39;
  localparam logic [31:0] MARK1 = X(31, 31, 31, 444);   // or r31,r31,r31
  localparam logic [31:0] MARK2 = X(30, 30, 30, 444);   // or r30,r30,r30

  logic [31:0] prog [4096];          // 16 KB image, word addressed
  int pa;                            // assembly address (bytes)
  int fill_irq;                      // address at which the interrupt is raised

  task automatic e(input logic [31:0] w);
    prog[pa >> 2] = w;
    pa += 4;
  endtask

  int fix1, fix2, cont1, cont2, loop_top;

  task automatic assemble();
    for (int i = 0; i < 4096; i++) prog[i] = 32'd0;
    pa = 0;
    // --- A: arithmetic, forwarding, loads and stores
    e(D(AI, 1, 0, 5));            // r1 = 5
    e(D(AI, 2, 1, 7));            // r2 = 12          (EX/MEM port-1 forward)
    e(X(3, 1, 2, 10));            // addc r3 = 17     (both forwarding stages)
    e(D(AI, 4, 0, 'h1000));       // r4 = 0x1000
    e(D(ST, 3, 4, 0));            // [0x1000] = 17    (data miss)
    e(D(L, 5, 4, 0));             // r5 = 17
    e(D(AI, 6, 5, 1));            // r6 = 18          (load-use stall)
    e(D(STU, 6, 4, 4));           // [0x1004] = 18, r4 = 0x1004
    e(D(AI, 7, 4, 0));            // r7 = 0x1004      (port-2 forward)
    e(D(L, 8, 7, 0));             // r8 = 18
    e(D(ST, 8, 7, 8));            // [0x100C] = 18    (store data from WB)
    e(D(AI, 9, 0, 'h41));         // r9 = 0x41
    e(D(STBU, 9, 7, 1));          // byte [0x1005] = 0x41, r7 = 0x1005
    e(D(LBZU, 10, 7, 0));         // r10 = 0x41, r7 = 0x1005
    e(D(L, 11, 7, -1));           // r11 = [0x1004] = 0x0041_0012
    // --- B: carry
    e(D(AI, 12, 0, -1));          // r12 = -1, CA = 0
    e(D(AI, 13, 12, 1));          // r13 = 0,  CA = 1
    e(X(14, 1, 2, 138));          // adde r14 = 18, CA = 0
    e(X(15, 1, 2, 138));          // adde r15 = 17
    // --- C: shifter, logic, compares
    e(D(AI, 16, 0, 3));           // r16 = 3
    e(LOGIC(24, 17, 1, 16));      // slw r17 = 40
    e(D(AI, 18, 0, -128));        // r18 = 0xFFFFFF80
    e(LOGIC(792, 19, 18, 16));    // sraw r19 = 0xFFFFFFF0, CA = 0
    e(D(AI, 20, 0, -127));        // r20 = 0xFFFFFF81
    e(LOGIC(792, 21, 20, 16));    // sraw r21 = 0xFFFFFFF0, CA = 1
    e(X(22, 0, 0, 138));          // adde r22 = 1
    e(LOGIC(536, 24, 18, 16));    // srw r24 = 0x1FFFFFF0
    e(LOGIC(28, 25, 17, 2));      // and r25 = 8
    e(LOGIC(444, 26, 17, 2));     // or r26 = 44
    e(LOGIC(476, 27, 17, 2));     // nand r27 = 0xFFFFFFF7
    e(LOGIC(412, 28, 1, 2));      // orc r28 = 0xFFFFFFF7
    e(X(29, 1, 2, 8));            // subfc r29 = 12 - 5 = 7
    e(CMP(1, 1, 2, 0));           // cr1 = LT
    e(CMP(2, 12, 1, 1));          // cr2 = GT (unsigned)
    e(D(AIREC, 30, 12, 1));       // r30 = 0, cr0 = EQ
    e(MARK1);
    // --- D: overflow into XER
    e(D(AI, 1, 0, 1));            // r1 = 1
    e(LOGIC(536, 3, 12, 1));      // srw r3 = 0x7FFFFFFF
    e(X(3, 3, 1, 512 + 10));      // addco r3 = 0x80000000, OV = SO = 1
    e(MFSPR(7, 1));               // r7 = XER = 0xC0000000
    // --- E: CTR loop (4 iterations) and branch-and-link
    e(D(AI, 16, 0, 4));           // r16 = 4
    e(MTSPR(9, 16));              // CTR = 4
    loop_top = pa;
    e(D(AI, 5, 5, 1));            // r5 += 1 (17 -> 21)
    e(BC(16, 0, loop_top - pa));  // bdnz loop_top
    e(MFSPR(6, 9));               // r6 = CTR = 0
    e(BC(20, 0, 8, 1));           // branch always +8, LR = address of next
    e(D(AI, 5, 5, 100));          // skipped
    e(MFSPR(9, 8));               // r9 = LR
    // --- F: eviction of a dirty line (all map to set 0)
    e(D(L, 20, 4, 'h7C));         // r20 = [0x1080]
    e(D(L, 21, 4, 'hFC));         // r21 = [0x1100], 0x1000 line written back
    // --- G: uncached I/O
    e(D(AI, 22, 0, 3));
    e(D(AI, 25, 0, 30));
    e(LOGIC(24, 24, 22, 25));     // r24 = 0xC0000000
    e(D(AI, 26, 0, 13));          // r26 = 13
    e(D(ST, 26, 24, 'h10));       // I/O write of 13
    e(D(L, 27, 24, 'h20));        // I/O read -> r27
    e(MARK2);
    // --- H: traps and the interrupt; the handler counts them in r23
    e(D(AI, 31, 0, 3));           // r31 = 3 (the third entry returns by rti)
    fix1 = pa;
    e(D(AI, 28, 0, 0));           // r28 = cont1 (patched)
    e(MTSPR(8, 28));              // LR = cont1
    e(D(L, 29, 4, 2));            // misaligned load: alignment trap
    cont1 = pa;
    fix2 = pa;
    e(D(AI, 28, 0, 0));           // r28 = cont2 (patched)
    e(MTSPR(8, 28));
    e(ILLEGAL);                   // illegal-instruction trap
    cont2 = pa;
    for (int i = 0; i < 8; i++) begin
      if (i == 3) fill_irq = pa;
      e(D(AI, 2, 2, 1));          // r2 += 1 eight times (12 -> 20)
    end
    // --- I: load miss at the start of a new instruction line
    while ((pa & 15) != 4) e(D(AI, 2, 2, 0));
    e(D(L, 15, 4, 'h17C));        // r15 = [0x1180] while IF misses too
    e(D(AI, 14, 15, 1));          // r14 = r15 + 1
    // --- J: dirty line left for the flush, then halt
    e(D(ST, 26, 4, 'hC));         // [0x1010] = 13
    e(HALT);
    e(D(AI, 1, 0, 99));           // never executed
    prog[fix1 >> 2][15:0] = cont1[15:0];
    prog[fix2 >> 2][15:0] = cont2[15:0];
    // trap handler at 0x3000 (0x0FFF_F000 aliased)
    pa = 'h3000;
    e(D(AI, 23, 23, 1));          // count
    e(CMP(3, 23, 31, 0));         // cr3: r23 vs 3
    e(BC(12, 14, 8));             // equal: go to rti
    e(BCR(20, 0));                // otherwise return to LR
    e(RTI);
  endtask

  // ----------------------------------------------------------- utilities
  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] memw(input int addr);
    logic [127:0] line;
    line = u_mem.mem[(addr >> 4) & 1023];
    return line[127 - 32*((addr >> 2) & 3) -: 32];
  endfunction

  function automatic logic [31:0] reg_of(input int r);
    return dut.u_gpr.regs[r];
  endfunction

  // ------------------------------------------------------ mechanism counts
  int n_load_stall, n_br_hazard, n_pred_used, n_imiss, n_dmiss, n_wb_evict;
  int n_fwd_ex1, n_fwd_ex2, n_fwd_mem1, n_fwd_mem2, n_s_late;
  int n_align, n_illegal, n_irq, n_save, n_rti, n_bcr, n_contention;
  int n_flush_wr, n_ovf, n_io_wr, n_io_rd, n_byte;

  function automatic int fwd_hits(input fwd_t f, input int k);
    case (k)
      0: return int'(f.ex1);
      1: return int'(f.ex2);
      2: return int'(f.mem1);
      default: return int'(f.mem2);
    endcase
  endfunction

  always @(posedge clk) if (!rst) begin
    cycles++;
    if (dut.load_stall && !dut.d_req)                    n_load_stall++;
    if (dut.branch_hazard)                               n_br_hazard++;
    if (dut.choose_bp && dut.pc_en && !dut.branch_hazard) n_pred_used++;
    if (dut.i_valid)                                     n_imiss++;
    if (dut.d_valid && !dut.d_mem_we && !dut.wb_halt)    n_dmiss++;
    if (dut.d_valid && dut.d_mem_we && !dut.wb_halt &&
        dut.d_mem_addr[31:30] != 2'b11)                  n_wb_evict++;
    if (dut.d_valid && dut.wb_halt)                      n_flush_wr++;
    if (!dut.d_req) begin
      n_fwd_ex1  += fwd_hits(dut.idex.fwd_a, 0) + fwd_hits(dut.idex.fwd_b, 0) + fwd_hits(dut.idex.fwd_s, 0);
      n_fwd_ex2  += fwd_hits(dut.idex.fwd_a, 1) + fwd_hits(dut.idex.fwd_b, 1) + fwd_hits(dut.idex.fwd_s, 1);
      n_fwd_mem1 += fwd_hits(dut.idex.fwd_a, 2) + fwd_hits(dut.idex.fwd_b, 2) + fwd_hits(dut.idex.fwd_s, 2);
      n_fwd_mem2 += fwd_hits(dut.idex.fwd_a, 3) + fwd_hits(dut.idex.fwd_b, 3) + fwd_hits(dut.idex.fwd_s, 3);
      if (dut.exmem.s_late && dut.exmem.ctrl.store)      n_s_late++;
      if (dut.d_access && dut.exmem.ctrl.byte_acc)       n_byte++;
    end
    if (dut.u_trap.m_throw)                              n_align++;
    if (dut.u_trap.id_throw)                             n_illegal++;
    if (dut.u_trap.io_throw)                             n_irq++;
    if (dut.trap_save)                                   n_save++;
    if (dut.if_is_rti && dut.pc_en && !dut.branch_hazard && !dut.trap_set_pc) n_rti++;
    if (dut.idex.ctrl.bcr && dut.ex_commit)              n_bcr++;
    if (dut.i_req && dut.d_bus_req)                      n_contention++;
    if (dut.idex.ctrl.use_oe && dut.alu_ovf && dut.ex_commit) n_ovf++;
  end

  // +trace prints the pipeline every cycle
  bit trace;
  initial trace = $test$plusargs("trace");
  always @(posedge clk) if (trace && !rst)
    $display("%0d pc=%h ihit=%b id=%h ex=%h mem=%h wb=%h dreq=%b wd1=%h wd2=%h we=%b%b",
             cycles, dut.pc, dut.i_hit, dut.ifid.ir, dut.idex.ir, dut.exmem.ir,
             dut.memwb.ir, dut.d_req, dut.wb_wd1, dut.wb_wd2,
             dut.memwb.ctrl.wre1, dut.memwb.ctrl.wre2);

  // ------------------------------------------------------- the interrupt
  bit irq_done = 1'b0;
  always @(negedge clk) begin
    ext_int <= 2'b00;
    if (!rst && !irq_done && dut.pc == 32'(fill_irq) && dut.i_hit && !dut.d_req) begin
      ext_int  <= 2'b01;
      irq_done <= 1'b1;
    end
  end

  // ----------------------------------------------------------- markers
  bit m1_seen = 0, m2_seen = 0;
  always @(posedge clk) if (!rst && dut.memwb_en) begin
    if (dut.memwb.ir == MARK1 && !m1_seen) begin
      m1_seen = 1;
      @(negedge clk);
      check("r1",  reg_of(1),  32'd5);
      check("r2",  reg_of(2),  32'd12);
      check("r3",  reg_of(3),  32'd17);
      check("r4",  reg_of(4),  32'h1004);
      check("r5",  reg_of(5),  32'd17);
      check("r6",  reg_of(6),  32'd18);
      check("r7",  reg_of(7),  32'h1005);
      check("r8",  reg_of(8),  32'd18);
      check("r9",  reg_of(9),  32'h41);
      check("r10", reg_of(10), 32'h41);
      check("r11", reg_of(11), 32'h0041_0012);
      check("r12", reg_of(12), 32'hFFFF_FFFF);
      check("r13", reg_of(13), 32'd0);
      check("r14", reg_of(14), 32'd18);
      check("r15", reg_of(15), 32'd17);
      check("r17", reg_of(17), 32'd40);
      check("r19", reg_of(19), 32'hFFFF_FFF0);
      check("r21", reg_of(21), 32'hFFFF_FFF0);
      check("r22", reg_of(22), 32'd1);
      check("r24", reg_of(24), 32'h1FFF_FFF0);
      check("r25", reg_of(25), 32'd8);
      check("r26", reg_of(26), 32'd44);
      check("r27", reg_of(27), 32'hFFFF_FFF7);
      check("r28", reg_of(28), 32'hFFFF_FFF7);
      check("r29", reg_of(29), 32'd7);
      check("r30", reg_of(30), 32'd0);
      check("CR",  dut.cr,     32'h2840_0000);
      check("XER.CA after addic. -1+1", {31'd0, dut.xer[29]}, 32'd1);
    end
    if (dut.memwb.ir == MARK2 && !m2_seen) begin
      m2_seen = 1;
      @(negedge clk);
      check("r3 addco", reg_of(3), 32'h8000_0000);
      check("r7 XER",   reg_of(7), 32'hC000_0000);
      check("r5 loop",  reg_of(5), 32'd21);
      check("r6 CTR",   reg_of(6), 32'd0);
      check("r9 LR",    reg_of(9), 32'(loop_top + 16));
      check("r16",      reg_of(16), 32'd4);
      check("r20",      reg_of(20), 32'hDEAD_BEEF);
      check("r21",      reg_of(21), 32'h1234_5678);
      check("r24",      reg_of(24), 32'hC000_0000);
      check("r27 I/O",  reg_of(27), 32'hCAFE_F00D);
      check("io_reg",   u_mem.io_reg, 32'd13);
      check("written-back line w0", memw('h1000), 32'd17);
      check("written-back line w1", memw('h1004), 32'h0041_0012);
      check("written-back line w3", memw('h100C), 32'd18);
    end
  end

  // ---------------------------------------------------------- main flow
  initial begin
    assemble();
    for (int i = 0; i < 1024; i++)
      u_mem.mem[i] = {prog[4*i], prog[4*i+1], prog[4*i+2], prog[4*i+3]};
    u_mem.mem['h108] = {32'hDEAD_BEEF, 96'd0};
    u_mem.mem['h110] = {32'h1234_5678, 96'd0};
    u_mem.mem['h118] = {32'h0BAD_F00D, 96'd0};
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    wait (halted);
    repeat (2) @(posedge clk);
    @(negedge clk);
    check("marker 1 reached", {31'd0, m1_seen}, 32'd1);
    check("marker 2 reached", {31'd0, m2_seen}, 32'd1);
    check("r2 interrupted run", reg_of(2), 32'd20);
    check("r23 trap count", reg_of(23), 32'd3);
    check("r29 not loaded", reg_of(29), 32'd7);
    check("r15 load",  reg_of(15), 32'h0BAD_F00D);
    check("r14 use",   reg_of(14), 32'h0BAD_F00E);
    check("r1 after halt", reg_of(1), 32'd1);
    check("CR final", dut.cr, 32'h2843_0000);
    check("SRR0 = interrupted PC", dut.srr0, 32'(fill_irq));
    check("MSR restored", dut.msr, 32'hFFFF_FFFF);
    check("flushed [0x1010]", memw('h1010), 32'd13);
    check("halt PC frozen", {31'd0, dut.halt_fetched}, 32'd1);

    // every mechanism must have happened
    check("load-use stall",    {31'd0, n_load_stall > 0}, 32'd1);
    check("branch mispredict", {31'd0, n_br_hazard  > 0}, 32'd1);
    check("prediction used",   {31'd0, n_pred_used  > 0}, 32'd1);
    check("i-cache miss",      {31'd0, n_imiss      > 0}, 32'd1);
    check("d-cache miss",      {31'd0, n_dmiss      > 0}, 32'd1);
    check("dirty writeback",   {31'd0, n_wb_evict   > 0}, 32'd1);
    check("flush writeback",   {31'd0, n_flush_wr   > 0}, 32'd1);
    check("forward EX/MEM p1", {31'd0, n_fwd_ex1    > 0}, 32'd1);
    check("forward EX/MEM p2", {31'd0, n_fwd_ex2    > 0}, 32'd1);
    check("forward MEM/WB p1", {31'd0, n_fwd_mem1   > 0}, 32'd1);
    check("forward MEM/WB p2", {31'd0, n_fwd_mem2   > 0}, 32'd1);
    check("late store data",   {31'd0, n_s_late     > 0}, 32'd1);
    check("byte access",       {31'd0, n_byte       > 0}, 32'd1);
    check("alignment trap",    32'(n_align),   32'd1);
    check("illegal trap",      32'(n_illegal), 32'd1);
    check("interrupt",         32'(n_irq),     32'd1);
    check("state saves",       32'(n_save),    32'd3);
    check("rti",               32'(n_rti),     32'd1);
    check("bcr returns",       32'(n_bcr),     32'd2);
    check("bus contention",    {31'd0, n_contention > 0}, 32'd1);
    check("overflow",          {31'd0, n_ovf > 0},        32'd1);
    check("I/O writes",        32'(u_mem.io_writes), 32'd1);
    check("I/O reads",         32'(u_mem.io_reads),  32'd1);
    $display("mechanisms: stall=%0d mispredict=%0d predicted=%0d imiss=%0d dmiss=%0d evict_wb=%0d flush_wb=%0d",
             n_load_stall, n_br_hazard, n_pred_used, n_imiss, n_dmiss, n_wb_evict, n_flush_wr);
    $display("mechanisms: fwd ex1=%0d ex2=%0d mem1=%0d mem2=%0d s_late=%0d byte=%0d contention=%0d ovf=%0d",
             n_fwd_ex1, n_fwd_ex2, n_fwd_mem1, n_fwd_mem2, n_s_late, n_byte, n_contention, n_ovf);
    $display("mechanisms: align=%0d illegal=%0d irq=%0d saves=%0d rti=%0d bcr=%0d io_w=%0d io_r=%0d cycles=%0d",
             n_align, n_illegal, n_irq, n_save, n_rti, n_bcr, u_mem.io_writes, u_mem.io_reads, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: no halt after 40000 cycles, pc=%08h", dut.pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
