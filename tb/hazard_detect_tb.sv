// hazard_detect_tb: random test of the forwarding and load-use logic.
//
// An instruction of a random class (addic, addc, and/shift, load, indexed
// load, store, indexed store, compare, mtspr, mfspr, branch) is placed in
// ID with random registers drawn from a small set, so that they often match
// the random destinations of the instructions in EX and MEM. The expected
// forwarding flags follow from which operands each class reads (RA, or RS
// for logical forms; RB; RS as store data or mtspr source; RA = 0 of a load
// or store reads no register), and a load-use stall is expected when a load
// in EX writes RT to a register the ID instruction needs as an ALU operand
// (or as mtspr source). Combinational; checked 1 ns after each vector.
// Watchdog included.
module hazard_detect_tb;
  import ppc_pkg::*;

  logic [31:0] id_ir;
  ctrl_t       id_ctrl;
  logic [4:0]  ex_wr1, ex_wr2, mem_wr1, mem_wr2;
  logic        ex_wre1, ex_wre2, ex_load, mem_wre1, mem_wre2;
  fwd_t        fwd_a, fwd_b, fwd_s;
  logic        load_stall;
  int checks = 0, failures = 0;
  int n_stall = 0;

  hazard_detect dut (.*);

  function automatic fwd_t ref_match(input logic [4:0] r, input bit used);
    fwd_t f;
    f.ex1  = used && ex_wre1  && ex_wr1  == r;
    f.ex2  = used && ex_wre2  && ex_wr2  == r;
    f.mem1 = used && mem_wre1 && mem_wr1 == r;
    f.mem2 = used && mem_wre2 && mem_wr2 == r;
    return f;
  endfunction

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s class ir=%h: got %h exp %h", what, id_ir, got, exp);
    end
  endtask

  initial begin
    logic [4:0] rt, ra, rb, a_reg;
    bit         a_use, b_use, s_use, mt;
    fwd_t       ea, eb, es;
    repeat (20000) begin
      rt = 5'($urandom_range(0, 3)); ra = 5'($urandom_range(0, 3)); rb = 5'($urandom_range(0, 3));
      id_ctrl = CTRL_NOP;
      a_reg = ra; a_use = 0; b_use = 0; s_use = 0; mt = 0;
      case ($urandom_range(0, 10))
        0: begin id_ir = {6'd12, rt, ra, 16'd5}; id_ctrl.sel_b_imm = 1; id_ctrl.wre1 = 1;
                 id_ctrl.set_ca = 1; a_use = 1; end
        1: begin id_ir = {6'd31, rt, ra, rb, 10'd10, 1'b0}; id_ctrl.wre1 = 1; id_ctrl.set_ca = 1;
                 a_use = 1; b_use = 1; end
        2: begin id_ir = {6'd31, rt, ra, rb, 10'd28, 1'b0}; id_ctrl.sel_a = A_RS; id_ctrl.wre2 = 1;
                 a_reg = rt; a_use = 1; b_use = 1; end
        3: begin id_ir = {6'd32, rt, ra, 16'd4}; id_ctrl.load = 1; id_ctrl.sel_b_imm = 1;
                 id_ctrl.wre1 = 1; id_ctrl.wb_sel = WB_MEM; a_use = (ra != 0); end
        4: begin id_ir = {6'd31, rt, ra, rb, 10'd23, 1'b0}; id_ctrl.load = 1; id_ctrl.wre1 = 1;
                 id_ctrl.wb_sel = WB_MEM; a_use = (ra != 0); b_use = 1; end
        5: begin id_ir = {6'd36, rt, ra, 16'd4}; id_ctrl.store = 1; id_ctrl.sel_b_imm = 1;
                 a_use = (ra != 0); s_use = 1; end
        6: begin id_ir = {6'd31, rt, ra, rb, 10'd151, 1'b0}; id_ctrl.store = 1;
                 a_use = (ra != 0); b_use = 1; s_use = 1; end
        7: begin id_ir = {6'd31, rt, ra, rb, 10'd0, 1'b0}; id_ctrl.compare = 1;
                 a_use = 1; b_use = 1; end
        8: begin id_ir = {6'd31, rt, 5'd8, 5'd0, 10'd467, 1'b0}; id_ctrl.mtspr = 1;
                 s_use = 1; mt = 1; end
        9: begin id_ir = {6'd31, rt, 5'd8, 5'd0, 10'd339, 1'b0}; id_ctrl.mfspr = 1;
                 id_ctrl.wre1 = 1; id_ctrl.wb_sel = WB_SPR; end
        default: begin id_ir = {6'd16, 5'd20, 5'd0, 14'd4, 2'b00}; id_ctrl.branch = 1; end
      endcase
      ex_wr1 = 5'($urandom_range(0, 3)); ex_wr2 = 5'($urandom_range(0, 3));
      mem_wr1 = 5'($urandom_range(0, 3)); mem_wr2 = 5'($urandom_range(0, 3));
      {ex_wre1, ex_wre2, mem_wre1, mem_wre2, ex_load} = 5'($urandom);
      #1;
      ea = ref_match(a_reg, a_use);
      eb = ref_match(rb, b_use);
      es = ref_match(rt, s_use);
      check("fwd_a", 32'(fwd_a), 32'(ea));
      check("fwd_b", 32'(fwd_b), 32'(eb));
      check("fwd_s", 32'(fwd_s), 32'(es));
      check("load_stall", 32'(load_stall), 32'(ex_load && (ea.ex1 || eb.ex1 || (mt && es.ex1))));
      if (load_stall) n_stall++;
    end
    check("stalls seen", 32'(n_stall > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
