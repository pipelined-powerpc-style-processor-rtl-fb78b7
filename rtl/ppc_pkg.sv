// ppc_pkg: types and constants shared by the pipelined PowerPC-subset core.
//
// Bit numbering: the PowerPC architecture numbers bits from the most
// significant end (bit 0 = MSB). All vectors here are declared [31:0], so the
// architectural bit k of a word is bit (31-k) of the vector. The instruction
// field helpers below hide that conversion.
//
// ctrl_t is the decoded control word that travels down the pipeline with each
// instruction. Its fields follow the named bits of the original 64-bit
// control word (Load, Direct, SelB, ALUOp, SetCA, SetCR, PCCond, MTSPR,
// MemToReg, byte, WRE1, WRE2, Logical, Shift, Store, Branch, valid, halt);
// the ALU operation is a named enum instead of a raw function-select code.
// Some opcode and SPR constants are listed for completeness and only used by
// the testbenches; each field function reads only its own bits of the word.
package ppc_pkg;

  // ALU operations (the document's alu16$ cell selects these with a 4-bit
  // code plus a mode bit; the encoding of that cell is not used here)
  typedef enum logic [2:0] {
    ALU_ADD   = 3'd0,   // a + b + cin
    ALU_AND   = 3'd1,
    ALU_OR    = 3'd2,
    ALU_NAND  = 3'd3,
    ALU_ORC   = 3'd4,   // a | ~b
    ALU_PASSB = 3'd5
  } alu_op_e;

  // First ALU operand source
  typedef enum logic [1:0] {
    A_RA   = 2'd0,      // GPR[RA]
    A_ZERO = 2'd1,      // 0 (RA field = 0 in a load/store, or absolute branch)
    A_RS   = 2'd2       // GPR[RS] (logical and shift instructions)
  } sel_a_e;

  // Write-back source for port 1 (the RT/RS destination)
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_SPR = 2'd2
  } wb_sel_e;

  typedef struct packed {
    logic    valid;      // a decoded, legal instruction (0 = illegal)
    logic    halt;       // halt instruction (opcode 63)
    logic    load;       // memory read
    logic    store;      // memory write
    logic    byte_acc;   // byte-sized access (lbzu, stbu, lbzux, stbux)
    logic    update;     // RA <- effective address (update forms)
    sel_a_e  sel_a;
    logic    sel_b_imm;  // second operand is the sign-extended D field
    alu_op_e alu_op;
    logic    sub;        // invert operand A (subfc: ~RA + RB + 1)
    logic    cin;        // carry in when use_ca = 0
    logic    use_ca;     // carry in = XER[CA] (adde)
    logic    set_ca;     // write XER[CA]
    logic    use_oe;     // OE bit may set XER[SO,OV]
    logic    shift;      // result from shifter
    logic    shift_right;
    logic    shift_arith;
    logic    set_cr;     // record form: may write CR field 0 (if Rc = 1)
    logic    use_rc;     // honour the Rc bit
    logic    compare;    // cmp/cmpl: write CR field BF
    logic    cmp_unsigned;
    logic    wre1;       // write GPR[RT]
    logic    wre2;       // write GPR[RA]
    wb_sel_e wb_sel;
    logic    mtspr;
    logic    mfspr;
    logic    branch;     // bc: conditional relative/absolute branch
    logic    bcr;        // bcr: branch to LR
    logic    rti;        // return from interrupt
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    valid: 1'b1, halt: 1'b0, load: 1'b0, store: 1'b0, byte_acc: 1'b0,
    update: 1'b0, sel_a: A_RA, sel_b_imm: 1'b0, alu_op: ALU_ADD, sub: 1'b0,
    cin: 1'b0, use_ca: 1'b0, set_ca: 1'b0, use_oe: 1'b0, shift: 1'b0,
    shift_right: 1'b0, shift_arith: 1'b0, set_cr: 1'b0, use_rc: 1'b0,
    compare: 1'b0, cmp_unsigned: 1'b0, wre1: 1'b0, wre2: 1'b0,
    wb_sel: WB_ALU, mtspr: 1'b0, mfspr: 1'b0, branch: 1'b0, bcr: 1'b0,
    rti: 1'b0};

  // Forwarding flags of one source operand, set in ID: the operand's
  // register is written by port 1 (RT) or port 2 (RA) of the instruction one
  // stage ahead (ex*) or two stages ahead (mem*).
  typedef struct packed {
    logic ex1;
    logic ex2;
    logic mem1;
    logic mem2;
  } fwd_t;

  // Primary opcodes (instruction bits 0..5)
  localparam logic [5:0] OP_AI    = 6'd12;  // addic
  localparam logic [5:0] OP_AIREC = 6'd13;  // addic.
  localparam logic [5:0] OP_BC    = 6'd16;
  localparam logic [5:0] OP_XL    = 6'd19;  // bcr (XO 16), rti (XO 17)
  localparam logic [5:0] OP_X     = 6'd31;
  localparam logic [5:0] OP_L     = 6'd32;  // lwz
  localparam logic [5:0] OP_LU    = 6'd33;  // lwzu
  localparam logic [5:0] OP_LBZU  = 6'd35;
  localparam logic [5:0] OP_ST    = 6'd36;  // stw
  localparam logic [5:0] OP_STU   = 6'd37;  // stwu
  localparam logic [5:0] OP_STBU  = 6'd39;
  localparam logic [5:0] OP_HALT  = 6'd63;

  // SPR numbers (low five bits of the SPR field)
  localparam logic [4:0] SPR_XER = 5'd1;
  localparam logic [4:0] SPR_LR  = 5'd8;
  localparam logic [4:0] SPR_CTR = 5'd9;

  // Instruction field helpers (architectural bit ranges in comments)
  function automatic logic [5:0] f_op(input logic [31:0] ir);  return ir[31:26]; endfunction // 0:5
  function automatic logic [4:0] f_rt(input logic [31:0] ir);  return ir[25:21]; endfunction // 6:10
  function automatic logic [4:0] f_ra(input logic [31:0] ir);  return ir[20:16]; endfunction // 11:15
  function automatic logic [4:0] f_rb(input logic [31:0] ir);  return ir[15:11]; endfunction // 16:20
  function automatic logic [9:0] f_xo(input logic [31:0] ir);  return ir[10:1];  endfunction // 21:30
  function automatic logic       f_rc(input logic [31:0] ir);  return ir[0];     endfunction // 31
  function automatic logic       f_oe(input logic [31:0] ir);  return ir[10];    endfunction // 21
  function automatic logic       f_aa(input logic [31:0] ir);  return ir[1];     endfunction // 30
  function automatic logic [2:0] f_bf(input logic [31:0] ir);  return ir[25:23]; endfunction // 6:8

endpackage
