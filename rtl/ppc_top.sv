// ppc_top: five-stage pipelined processor for a PowerPC instruction subset.
//
// Stages and what they do:
//   IF  - fetch from the instruction cache at PC; the branch predictor is
//         looked up with the same PC, and a fetched bc/bcr that is predicted
//         taken redirects the next PC to the stored target; rti redirects to
//         SRR0 and restores the MSR from SRR1; a fetched halt freezes the PC.
//   ID  - decode, read RA/RB/RS from the register file, detect data hazards
//         (load-use stall, forwarding flags), raise the illegal-instruction
//         trap.
//   EX  - operand forwarding, ALU/shifter, compare and record-form CR update,
//         XER/LR/CTR updates, mtspr/mfspr, branch resolution. A branch whose
//         direction or target differs from the prediction (branch hazard)
//         redirects the PC and turns the two younger instructions into
//         bubbles; the predictor is updated with the outcome.
//   MEM - data-cache access (load, store, I/O); a store whose data is the
//         result of the load just ahead gets it here from WB.
//   WB  - write RT (port 1) and RA (port 2) into the register file; a halt
//         reaching WB flushes the data cache, after which 'halted' is set.
//
// Stalls: an instruction-cache miss freezes PC and feeds bubbles into ID; a
// data-cache miss (or the flush on halt) holds every pipeline register; a
// load-use hazard holds PC and IF/ID for one cycle and puts a bubble into EX.
// Traps and interrupts go through trap_interrupt, which invalidates the
// faulting stage and the younger ones, lets the older ones finish, saves PC
// and MSR in SRR0/SRR1 and jumps to the handler address.
//
// Memory: both caches share one external bus through bus_arbiter (data cache
// first). The bus carries 16-byte lines: the processor raises mem_req with
// mem_addr (line address), mem_we and mem_wdata; the memory answers with a
// one-cycle mem_valid pulse (with mem_rdata for a read), after which it must
// leave at least one idle cycle. Addresses 0xC000_0000 and up are uncached
// I/O: single words on io_wdata / io_rdata with the same handshake.
//
// The control fields, stage contents and hazard rules follow the document;
// the handshake names on the memory bus, the single rising clock edge and the
// gating of EX-stage side effects while the pipeline is held are this
// design's choices. Three more choices of this design: an instruction in ID
// or IF behind a mispredicted branch in EX may not trap (and an external
// interrupt waits one cycle then), so no wrong-path address reaches SRR0; the
// word fetched in the cycle the PC is loaded with the handler address is
// dropped, so the interrupted instruction is not executed twice; and, as in
// the document, the MSR is restored when rti is fetched (speculatively; rti
// behind a mispredicted branch would still restore it). The predictor is
// indexed by PC[4:0] as in the document, so with word-aligned code only 8 of
// its 32 entries are used. Synchronous active-high reset; the PC resets to
// RESET_PC and the MSR to all ones, as in the document.
// Tool notes: the instruction cache's write-side pins, its halt output, the
// unused translation exceptions of both caches and the branch-condition
// detail outputs are left open on purpose (the instruction cache never
// writes and no translation is done); fr_xer is decoded with the other
// move-from-SPR selects but mfspr reads XER through the common SPR mux.
module ppc_top
  import ppc_pkg::*;
#(
  parameter logic [31:0] RESET_PC     = 32'h0000_0000,
  parameter logic [31:0] HANDLER_ADDR = 32'h0FFF_F000,
  parameter int          CACHE_SETS   = 8,
  parameter int          BP_ENTRIES   = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [1:0]   ext_int,
  // memory bus
  output logic         mem_req,
  output logic [31:0]  mem_addr,
  output logic         mem_we,
  output logic [127:0] mem_wdata,
  input  logic [127:0] mem_rdata,
  input  logic         mem_valid,
  // uncached I/O data
  output logic [31:0]  io_wdata,
  input  logic [31:0]  io_rdata,
  output logic         halted
);

  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic        valid;
    logic [31:0] ir;
    logic [31:0] pc;
    logic [31:0] npc;
    logic        pred_taken;
    logic [31:0] pred_target;
  } ifid_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] ir;
    logic [31:0] pc;
    logic [31:0] npc;
    logic [31:0] rf_a;
    logic [31:0] rf_b;
    logic [31:0] rf_s;
    logic [31:0] imm;
    fwd_t        fwd_a;
    fwd_t        fwd_b;
    fwd_t        fwd_s;
    logic        pred_taken;
    logic [31:0] pred_target;
  } idex_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] ir;
    logic [31:0] pc;
    logic [31:0] result;
    logic [31:0] sdata;
    logic        s_late;     // store data must come from the load now in WB
    logic [31:0] spr;
  } exmem_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] ir;
    logic [31:0] ldata;
    logic [31:0] result;
    logic [31:0] spr;
  } memwb_t;

  // bubble control words (all-zero instruction, no effects)
  localparam ctrl_t CTRL_BUBBLE = CTRL_NOP;

  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  // ------------------------------------------------------------ signals
  logic [31:0] pc, pc_next, npc;
  logic        pc_en;
  logic [31:0] i_rdata;
  logic        i_hit, i_req, i_grant, i_valid, i_align;
  logic [31:0] i_mem_addr;
  logic        d_hit, d_req, d_grant, d_valid, d_align, d_halt;
  logic [31:0] d_rdata, d_mem_addr;
  logic        d_mem_we;
  logic [127:0] d_mem_wdata;
  logic        d_access, d_bus_req;

  logic        if_is_bc, if_is_bcr, if_is_rti, if_is_halt, if_branch;
  logic        pred_taken, choose_bp, halt_fetched, if_halt;
  logic [31:0] pred_target;
  logic        ifid_en, ifid_bubble, idex_en, idex_bubble, exmem_en, memwb_en;

  ctrl_t       id_ctrl;
  logic [31:0] rf_a, rf_b, rf_s, id_imm;
  fwd_t        fwd_a, fwd_b, fwd_s;
  logic        load_stall, id_exc;

  logic [31:0] op_a, op_b, op_s, alu_out, new_pc, b_haz_pc, spr_val;
  logic        alu_cout, alu_ovf, zero_a, ex_cin;
  logic        ex_is_br, taken, dec_ctr, branch_hazard, ex_commit;
  logic        ld_lr, ld_ctr, ld_xer, fr_lr, fr_ctr, fr_xer;
  logic [31:0] xer, lr, ctr, cr, srr0, srr1, msr;

  logic [31:0] exmem_wd1, exmem_wd2, wb_wd1, wb_wd2, mem_sdata;
  logic        wb_halt;

  logic        trap_save, trap_if_inval, trap_id_inval, trap_ex_inval, trap_m_inval;
  logic        trap_bubble, trap_set_pc;
  logic [31:0] trap_pc, trap_handler;
  logic [4:0]  if_exc, m_exc;

  // ============================================================ IF stage
  assign npc        = pc + 32'd4;
  assign if_is_bc   = (f_op(i_rdata) == OP_BC);
  assign if_is_bcr  = (f_op(i_rdata) == OP_XL) && (f_xo(i_rdata) == 10'd16);
  assign if_is_rti  = (f_op(i_rdata) == OP_XL) && (f_xo(i_rdata) == 10'd17) && i_hit;
  assign if_is_halt = (f_op(i_rdata) == OP_HALT);
  assign if_branch  = (if_is_bc || if_is_bcr) && i_hit;
  assign choose_bp  = if_branch && pred_taken;
  assign if_halt    = if_is_halt && i_hit && !branch_hazard && !halt_fetched;

  branch_predictor #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk, .rst,
    .hold_n      (!d_req),
    .q_pc        (pc),
    .pred_taken  (pred_taken),
    .pred_target (pred_target),
    .u_pc        (idex.pc),
    .u_en        (ex_is_br && ex_commit),
    .u_taken     (taken),
    .u_target    (new_pc)
  );

  choose_pc u_choose_pc (
    .int_s  (trap_set_pc),
    .bcr_s  (1'b0),            // bcr goes through the predictor
    .rti_s  (if_is_rti),
    .res_s  (branch_hazard),
    .pred_s (choose_bp),
    .int_a  (trap_handler),
    .lr_a   (lr),
    .srr0_a (srr0),
    .res_a  (b_haz_pc),
    .pred_a (pred_target),
    .pc4_a  (npc),
    .pc_out (pc_next)
  );

  assign pc_en = branch_hazard || trap_set_pc ||
                 !(load_stall || !i_hit || d_req || if_halt || halt_fetched || trap_bubble);

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else if (pc_en) pc <= pc_next;
  end

  // a halt is passed on once; the fetch then stays frozen behind it
  always_ff @(posedge clk) begin
    if (rst || branch_hazard || trap_set_pc) halt_fetched <= 1'b0;
    else if (if_halt && ifid_en)             halt_fetched <= 1'b1;
  end

  cache_tlb_seg #(.SETS(CACHE_SETS)) u_icache (
    .clk, .rst,
    .valid_in        (1'b1),
    .addr            (pc),
    .wr              (1'b0),
    .byte_sz         (1'b0),
    .wdata           (32'd0),
    .cache_active_in (1'b1),
    .flush           (1'b0),
    .hit             (i_hit),
    .rdata           (i_rdata),
    .halt            (),
    .exc_protection  (),
    .exc_page_fault  (),
    .exc_align       (i_align),
    .bus_req         (i_req),
    .grant           (i_grant),
    .mem_valid       (i_valid),
    .mem_addr        (i_mem_addr),
    .mem_we          (),
    .mem_wdata       (),
    .mem_rdata       (mem_rdata),
    .io_wdata        (),
    .io_rdata        (32'd0)
  );

  // IF/ID
  assign ifid_en     = !load_stall && !d_req && !wb_halt;
  // (the word fetched while the PC is loaded with the handler address is dropped)
  assign ifid_bubble = !i_hit || halt_fetched || branch_hazard || trap_if_inval ||
                       trap_bubble || trap_set_pc;

  always_ff @(posedge clk) begin
    if (rst) ifid <= '0;
    else if (ifid_en) begin
      ifid.valid       <= !ifid_bubble;
      ifid.ir          <= ifid_bubble ? 32'd0 : i_rdata;
      ifid.pc          <= pc;
      ifid.npc         <= npc;
      ifid.pred_taken  <= !ifid_bubble && choose_bp;
      ifid.pred_target <= pred_target;
    end
  end

  // ============================================================ ID stage
  opcode_decoder u_dec (.ir(ifid.ir), .ctrl(id_ctrl));

  gpr_regfile u_gpr (
    .clk, .rst,
    .ra1 (f_ra(ifid.ir)), .ra2 (f_rb(ifid.ir)), .ra3 (f_rt(ifid.ir)),
    .rd1 (rf_a), .rd2 (rf_b), .rd3 (rf_s),
    .wa1 (f_rt(memwb.ir)), .wd1 (wb_wd1), .we1 (memwb.ctrl.wre1),
    .wa2 (f_ra(memwb.ir)), .wd2 (wb_wd2), .we2 (memwb.ctrl.wre2)
  );

  // the operand A register: RS for logical/shift, else RA
  logic [31:0] rf_opa;
  assign rf_opa = (id_ctrl.sel_a == A_RS) ? rf_s : rf_a;
  assign id_imm = {{16{ifid.ir[15]}}, ifid.ir[15:0]};
  // an instruction on the wrong side of a mispredicted branch may not trap
  assign id_exc = ifid.valid && !id_ctrl.valid && !branch_hazard;

  hazard_detect u_haz (
    .id_ir    (ifid.ir),
    .id_ctrl  (id_ctrl),
    .ex_wr1   (f_rt(idex.ir)),  .ex_wre1  (idex.ctrl.wre1),
    .ex_wr2   (f_ra(idex.ir)),  .ex_wre2  (idex.ctrl.wre2),
    .ex_load  (idex.ctrl.load),
    .mem_wr1  (f_rt(exmem.ir)), .mem_wre1 (exmem.ctrl.wre1),
    .mem_wr2  (f_ra(exmem.ir)), .mem_wre2 (exmem.ctrl.wre2),
    .fwd_a, .fwd_b, .fwd_s,
    .load_stall
  );

  // ID/EX
  assign idex_en     = !d_req;
  assign idex_bubble = load_stall || branch_hazard || trap_id_inval;

  always_ff @(posedge clk) begin
    if (rst) begin
      idex      <= '0;
      idex.ctrl <= CTRL_BUBBLE;
    end else if (idex_en) begin
      if (idex_bubble) begin
        idex      <= '0;
        idex.ctrl <= CTRL_BUBBLE;
      end else begin
        idex.ctrl        <= id_ctrl;
        idex.ir          <= ifid.ir;
        idex.pc          <= ifid.pc;
        idex.npc         <= ifid.npc;
        idex.rf_a        <= rf_opa;
        idex.rf_b        <= rf_b;
        idex.rf_s        <= rf_s;
        idex.imm         <= id_imm;
        idex.fwd_a       <= fwd_a;
        idex.fwd_b       <= fwd_b;
        idex.fwd_s       <= fwd_s;
        idex.pred_taken  <= ifid.pred_taken;
        idex.pred_target <= ifid.pred_target;
      end
    end
  end

  // ============================================================ EX stage
  // EX-stage side effects (SPRs, CR, predictor) happen once, when the
  // instruction leaves EX, and not for an instruction a trap invalidates.
  assign ex_commit = !d_req && !trap_ex_inval;

  assign zero_a = ((idex.ctrl.load || idex.ctrl.store) && f_ra(idex.ir) == 5'd0) ||
                  (idex.ctrl.sel_a == A_ZERO);

  assign exmem_wd1 = exmem.ctrl.mfspr ? exmem.spr : exmem.result;
  assign exmem_wd2 = exmem.result;

  forward_select u_fwd (
    .zero_a, .sel_b_imm (idex.ctrl.sel_b_imm),
    .fwd_a (idex.fwd_a), .fwd_b (idex.fwd_b), .fwd_s (idex.fwd_s),
    .rf_a (idex.rf_a), .rf_b (idex.rf_b), .rf_s (idex.rf_s), .imm (idex.imm),
    .exmem_wd1, .exmem_wd2, .memwb_wd1 (wb_wd1), .memwb_wd2 (wb_wd2),
    .op_a, .op_b, .op_s
  );

  assign ex_cin = idex.ctrl.use_ca ? xer[29] : idex.ctrl.cin;

  super_alu u_alu (
    .a (op_a), .b (op_b), .op (idex.ctrl.alu_op), .sub (idex.ctrl.sub),
    .cin (ex_cin), .shift (idex.ctrl.shift),
    .shift_right (idex.ctrl.shift_right), .shift_arith (idex.ctrl.shift_arith),
    .result (alu_out), .cout (alu_cout), .ovf (alu_ovf)
  );

  // branch resolution
  assign ex_is_br = idex.ctrl.branch || idex.ctrl.bcr;

  branch_logic u_brl (
    .branch   (ex_is_br),
    .bo       (f_rt(idex.ir)),
    .cr_bit   (cr[31 - f_ra(idex.ir)]),
    .ctr      (ctr),
    .dec_ctr  (dec_ctr),
    .zero_ctr (), .use_ctr (), .on_false (), .on_true (),
    .taken    (taken)
  );

  assign new_pc = idex.ctrl.bcr ? lr :
                  ((f_aa(idex.ir) ? 32'd0 : idex.pc) +
                   {{16{idex.ir[15]}}, idex.ir[15:2], 2'b00});
  assign b_haz_pc = taken ? new_pc : idex.npc;
  assign branch_hazard = ex_is_br && !trap_ex_inval &&
                         ((taken && new_pc != idex.pred_target) ||
                          (taken != idex.pred_taken));

  // special-purpose registers
  spr_logic u_spr (
    .spr (f_ra(idex.ir)), .mtspr (idex.ctrl.mtspr), .mfspr (idex.ctrl.mfspr),
    .load_lr (ld_lr), .load_ctr (ld_ctr), .load_xer (ld_xer),
    .from_lr (fr_lr), .from_ctr (fr_ctr), .from_xer (fr_xer)
  );
  assign spr_val = fr_lr ? lr : fr_ctr ? ctr : xer;

  xer_register u_xer (
    .clk, .rst, .ovf (alu_ovf), .cout (alu_cout), .rs (op_s),
    .set_so (ex_commit && idex.ctrl.use_oe && f_oe(idex.ir)),
    .set_ov (ex_commit && idex.ctrl.use_oe && f_oe(idex.ir)),
    .set_ca (ex_commit && idex.ctrl.set_ca),
    .load   (ex_commit && ld_xer),
    .xer
  );

  lr_register u_lr (
    .clk, .rst, .npc (idex.npc), .rs (op_s),
    .set_lr (ex_commit && ex_is_br && f_rc(idex.ir)),
    .load   (ex_commit && ld_lr),
    .lr
  );

  ctr_register u_ctr (
    .clk, .rst, .rs (op_s),
    .dec  (ex_commit && dec_ctr),
    .load (ex_commit && ld_ctr),
    .ctr
  );

  cr_register u_cr (
    .clk, .rst,
    .we (ex_commit && (idex.ctrl.compare || idex.ctrl.set_cr ||
                       (idex.ctrl.use_rc && f_rc(idex.ir)))),
    .compare (idex.ctrl.compare), .unsigned_cmp (idex.ctrl.cmp_unsigned),
    .bf (f_bf(idex.ir)), .a (op_a), .b (op_b), .result (alu_out),
    .so (xer[31] || (idex.ctrl.use_oe && f_oe(idex.ir) && alu_ovf)),
    .cr
  );

  // EX/MEM
  assign exmem_en = !d_req;

  always_ff @(posedge clk) begin
    if (rst) begin
      exmem      <= '0;
      exmem.ctrl <= CTRL_BUBBLE;
    end else if (exmem_en) begin
      if (trap_ex_inval) begin
        exmem      <= '0;
        exmem.ctrl <= CTRL_BUBBLE;
      end else begin
        exmem.ctrl   <= idex.ctrl;
        exmem.ir     <= idex.ir;
        exmem.pc     <= idex.pc;
        exmem.result <= alu_out;
        exmem.sdata  <= op_s;
        exmem.s_late <= idex.ctrl.store && idex.fwd_s.ex1 && exmem.ctrl.load;
        exmem.spr    <= spr_val;
      end
    end
  end

  // =========================================================== MEM stage
  assign d_access  = exmem.ctrl.load || exmem.ctrl.store;
  assign mem_sdata = exmem.s_late ? wb_wd1 : exmem.sdata;

  cache_tlb_seg #(.SETS(CACHE_SETS)) u_dcache (
    .clk, .rst,
    .valid_in        (d_access),
    .addr            (exmem.result),
    .wr              (exmem.ctrl.store),
    .byte_sz         (exmem.ctrl.byte_acc),
    .wdata           (mem_sdata),
    .cache_active_in (1'b1),
    .flush           (wb_halt),
    .hit             (d_hit),
    .rdata           (d_rdata),
    .halt            (d_halt),
    .exc_protection  (),
    .exc_page_fault  (),
    .exc_align       (d_align),
    .bus_req         (d_bus_req),
    .grant           (d_grant),
    .mem_valid       (d_valid),
    .mem_addr        (d_mem_addr),
    .mem_we          (d_mem_we),
    .mem_wdata       (d_mem_wdata),
    .mem_rdata       (mem_rdata),
    .io_wdata        (io_wdata),
    .io_rdata        (io_rdata)
  );

  // the data cache stalls the pipe while it misses, and while it flushes
  assign d_req = (d_access && !d_hit && !d_align) || wb_halt;
  assign halted = d_halt;

  bus_arbiter u_arb (
    .clk, .rst,
    .req0 (i_req), .req1 (d_bus_req),
    .addr0 (i_mem_addr), .addr1 (d_mem_addr),
    .wdata1 (d_mem_wdata), .we1 (d_mem_we),
    .grant0 (i_grant), .grant1 (d_grant),
    .valid0 (i_valid), .valid1 (d_valid),
    .mem_req, .mem_addr, .mem_wdata, .mem_we, .mem_valid
  );

  // traps and interrupts
  // TLB, page, protection, translation, alignment; IF-stage causes and the
  // interrupt wait while a mispredicted branch redirects the fetch
  assign if_exc = {1'b0, 1'b0, 1'b0, 1'b0, i_align && !branch_hazard};
  assign m_exc  = {1'b0, 1'b0, 1'b0, 1'b0, d_align};

  trap_interrupt #(.HANDLER_ADDR(HANDLER_ADDR)) u_trap (
    .clk, .rst,
    .if_pc (pc), .id_pc (ifid.pc), .m_pc (exmem.pc),
    .if_exc, .id_exc, .m_exc, .io_int (branch_hazard ? 2'b00 : ext_int),
    .save_state (trap_save), .if_inval (trap_if_inval), .id_inval (trap_id_inval),
    .ex_inval (trap_ex_inval), .m_inval (trap_m_inval),
    .insert_bubble (trap_bubble), .set_pc (trap_set_pc),
    .saved_pc (trap_pc), .handler_addr (trap_handler)
  );

  // SRR0, SRR1 and MSR
  always_ff @(posedge clk) begin
    if (rst) begin
      srr0 <= '0;
      srr1 <= '1;
      msr  <= '1;
    end else begin
      if (trap_save) begin
        srr0 <= trap_pc;
        srr1 <= msr;
      end
      if (if_is_rti && pc_en && !branch_hazard && !trap_set_pc)
        msr <= srr1;
    end
  end

  // MEM/WB
  assign memwb_en = !d_req;

  always_ff @(posedge clk) begin
    if (rst) begin
      memwb      <= '0;
      memwb.ctrl <= CTRL_BUBBLE;
    end else if (memwb_en) begin
      if (trap_m_inval) begin
        memwb      <= '0;
        memwb.ctrl <= CTRL_BUBBLE;
      end else begin
        memwb.ctrl   <= exmem.ctrl;
        memwb.ir     <= exmem.ir;
        memwb.ldata  <= d_rdata;
        memwb.result <= exmem.result;
        memwb.spr    <= exmem.spr;
      end
    end
  end

  // ============================================================ WB stage
  assign wb_wd1 = (memwb.ctrl.wb_sel == WB_MEM) ? memwb.ldata :
                  (memwb.ctrl.wb_sel == WB_SPR) ? memwb.spr : memwb.result;
  assign wb_wd2 = memwb.result;
  assign wb_halt = memwb.ctrl.halt;

endmodule
