// opcode_decoder_tb: directed and random test of the instruction decoder.
//
// Every instruction of the subset is decoded and the whole control word is
// compared with one built here, field by field, from the instruction's
// PowerPC definition (including the update forms' RA write rule for RA = 0
// and RA = RT, and the record/overflow bits). Random words with opcodes
// outside the subset, and opcode-31 words with unused extended opcodes, must
// decode as invalid. Combinational; checked 1 ns after each word. Watchdog
// included.
module opcode_decoder_tb;
  import ppc_pkg::*;

  logic [31:0] ir;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  opcode_decoder dut (.ir, .ctrl);

  function automatic logic [31:0] D(input int op, rt, ra, imm);
    return {op[5:0], rt[4:0], ra[4:0], imm[15:0]};
  endfunction
  function automatic logic [31:0] X(input int rt, ra, rb, xo, rc);
    return {6'd31, rt[4:0], ra[4:0], rb[4:0], xo[9:0], rc[0]};
  endfunction

  task automatic expect_ctrl(input string name, input logic [31:0] w, input ctrl_t e);
    ir = w;
    #1;
    checks++;
    if (ctrl !== e) begin
      failures++;
      $display("FAIL %s (%h): got %h exp %h", name, w, ctrl, e);
    end
  endtask

  ctrl_t c;
  localparam ctrl_t INVALID = '{valid: 1'b0, sel_a: A_RA, alu_op: ALU_ADD,
                                wb_sel: WB_ALU, default: 1'b0};

  initial begin
    ir = '0;
    expect_ctrl("bubble", 32'd0, CTRL_NOP);
    // loads
    c = CTRL_NOP; c.load = 1; c.sel_b_imm = 1; c.wre1 = 1; c.wb_sel = WB_MEM;
    expect_ctrl("l", D(32, 3, 4, 8), c);
    c.update = 1; c.wre2 = 1;
    expect_ctrl("lu", D(33, 3, 4, 8), c);
    c.wre2 = 0;
    expect_ctrl("lu ra=rt", D(33, 4, 4, 8), c);
    expect_ctrl("lu ra=0", D(33, 4, 0, 8), c);
    c.wre2 = 1; c.byte_acc = 1;
    expect_ctrl("lbzu", D(35, 3, 4, 8), c);
    // indexed loads
    c = CTRL_NOP; c.load = 1; c.wre1 = 1; c.wb_sel = WB_MEM;
    expect_ctrl("lwzx", X(3, 4, 5, 23, 0), c);
    c.update = 1; c.wre2 = 1;
    expect_ctrl("lwzux", X(3, 4, 5, 55, 0), c);
    c.byte_acc = 1;
    expect_ctrl("lbzux", X(3, 4, 5, 119, 0), c);
    // stores
    c = CTRL_NOP; c.store = 1; c.sel_b_imm = 1;
    expect_ctrl("st", D(36, 3, 4, 8), c);
    c.update = 1; c.wre2 = 1;
    expect_ctrl("stu", D(37, 3, 4, 8), c);
    expect_ctrl("stu ra=rs", D(37, 4, 4, 8), c);
    c.byte_acc = 1;
    expect_ctrl("stbu", D(39, 3, 4, 8), c);
    c.wre2 = 0;
    expect_ctrl("stbu ra=0", D(39, 3, 0, 8), c);
    c = CTRL_NOP; c.store = 1;
    expect_ctrl("stwx", X(3, 4, 5, 151, 0), c);
    c.update = 1; c.wre2 = 1;
    expect_ctrl("stwux", X(3, 4, 5, 183, 0), c);
    c.byte_acc = 1;
    expect_ctrl("stbux", X(3, 4, 5, 247, 0), c);
    // immediate add
    c = CTRL_NOP; c.sel_b_imm = 1; c.set_ca = 1; c.wre1 = 1;
    expect_ctrl("ai", D(12, 3, 4, -1), c);
    c.set_cr = 1;
    expect_ctrl("ai.", D(13, 3, 4, -1), c);
    // XO arithmetic with and without OE
    c = CTRL_NOP; c.wre1 = 1; c.set_ca = 1; c.use_oe = 1; c.use_rc = 1;
    expect_ctrl("addc", X(3, 4, 5, 10, 0), c);
    expect_ctrl("addco.", X(3, 4, 5, 512 + 10, 1), c);
    c.use_ca = 1;
    expect_ctrl("adde", X(3, 4, 5, 138, 0), c);
    c.use_ca = 0; c.sub = 1; c.cin = 1;
    expect_ctrl("subfc", X(3, 4, 5, 8, 0), c);
    // logical
    c = CTRL_NOP; c.sel_a = A_RS; c.wre2 = 1; c.use_rc = 1;
    c.alu_op = ALU_AND;  expect_ctrl("and",  X(3, 4, 5, 28, 0), c);
    c.alu_op = ALU_OR;   expect_ctrl("or",   X(3, 4, 5, 444, 0), c);
    c.alu_op = ALU_NAND; expect_ctrl("nand", X(3, 4, 5, 476, 1), c);
    c.alu_op = ALU_ORC;  expect_ctrl("orc",  X(3, 4, 5, 412, 0), c);
    // shifts
    c = CTRL_NOP; c.sel_a = A_RS; c.wre2 = 1; c.use_rc = 1; c.shift = 1;
    expect_ctrl("slw", X(3, 4, 5, 24, 0), c);
    c.shift_right = 1;
    expect_ctrl("srw", X(3, 4, 5, 536, 0), c);
    c.shift_arith = 1; c.set_ca = 1;
    expect_ctrl("sraw", X(3, 4, 5, 792, 0), c);
    // compares
    c = CTRL_NOP; c.compare = 1;
    expect_ctrl("cmp", X(4, 4, 5, 0, 0), c);
    c.cmp_unsigned = 1;
    expect_ctrl("cmpl", X(8, 4, 5, 32, 0), c);
    // SPR moves
    c = CTRL_NOP; c.mfspr = 1; c.wre1 = 1; c.wb_sel = WB_SPR;
    expect_ctrl("mfspr", X(3, 8, 0, 339, 0), c);
    c = CTRL_NOP; c.mtspr = 1;
    expect_ctrl("mtspr", X(3, 9, 0, 467, 0), c);
    // branches, rti, halt
    c = CTRL_NOP; c.branch = 1;
    expect_ctrl("bc", {6'd16, 5'd20, 5'd0, 14'd4, 2'b01}, c);
    c = CTRL_NOP; c.bcr = 1;
    expect_ctrl("bcr", {6'd19, 5'd20, 5'd0, 5'd0, 10'd16, 1'b0}, c);
    c = CTRL_NOP; c.rti = 1;
    expect_ctrl("rti", {6'd19, 15'd0, 10'd17, 1'b0}, c);
    c = CTRL_NOP; c.halt = 1;
    expect_ctrl("halt", {6'd63, 26'd0}, c);
    // invalid words
    expect_ctrl("opcode 19 xo 50", {6'd19, 15'd0, 10'd50, 1'b0}, INVALID);
    repeat (300) begin
      int op;
      do op = $urandom_range(1, 62);
      while (op inside {12, 13, 16, 19, 31, 32, 33, 35, 36, 37, 39});
      expect_ctrl("bad opcode", {6'(op), 26'($urandom)}, INVALID);
    end
    repeat (300) begin
      int xo;
      do xo = $urandom_range(0, 1023);
      while (xo inside {0, 8, 10, 23, 24, 28, 32, 55, 119, 138, 151, 183, 247,
                        339, 412, 444, 467, 476, 536, 792, 520, 522, 650});
      expect_ctrl("bad xo", X(1, 2, 3, xo, 0), INVALID);
    end
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
