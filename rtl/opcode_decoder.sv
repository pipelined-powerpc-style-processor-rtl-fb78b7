// opcode_decoder: instruction decode for the ID stage.
//
// Turns a 32-bit instruction into the control word (ppc_pkg::ctrl_t) that
// travels with it down the pipeline. Purely combinational.
//
// Primary opcodes decoded, as in the document's opcode decoder: l (lwz),
// lu (lwzu), lbzu, st (stw), stu (stwu), stbu, ai (addic), ai. (addic.),
// bc, bcr, rti and halt. Opcode 0 is the all-zero bubble and decodes as a
// valid no-op. Opcode 31 selects a second table indexed by the extended
// opcode; the document kept that table in a ROM whose contents are not
// reproduced, so its rows here are filled from the PowerPC definitions of the
// twenty extended opcodes the document's extended-opcode decoder recognises:
// cmp, cmpl, subfc, addc, adde, and, or, nand, orc, slw, srw, sraw, lwzx,
// lwzux, lbzux, stwx, stwux, stbux, mfspr, mtspr.
//
// Anything else decodes with valid = 0, which raises the illegal-instruction
// trap in ID.
//
// The RA write enable of the update forms is dropped when RA = 0 or, for a
// load, when RA = RT, as the document's write-enable logic does.
module opcode_decoder
  import ppc_pkg::*;
(
  input  logic [31:0] ir,
  output ctrl_t       ctrl
);

  logic [5:0] op;
  logic [9:0] xo;
  logic       ra_zero, ra_is_rt;

  assign op       = f_op(ir);
  assign xo       = f_xo(ir);
  assign ra_zero  = (f_ra(ir) == 5'd0);
  assign ra_is_rt = (f_ra(ir) == f_rt(ir));

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (op)
      6'd0: ;                                       // bubble / no-op
      OP_L, OP_LU, OP_LBZU: begin
        ctrl.load      = 1'b1;
        ctrl.sel_b_imm = 1'b1;
        ctrl.wre1      = 1'b1;
        ctrl.wb_sel    = WB_MEM;
        ctrl.update    = (op != OP_L);
        ctrl.byte_acc  = (op == OP_LBZU);
      end
      OP_ST, OP_STU, OP_STBU: begin
        ctrl.store     = 1'b1;
        ctrl.sel_b_imm = 1'b1;
        ctrl.update    = (op != OP_ST);
        ctrl.byte_acc  = (op == OP_STBU);
      end
      OP_AI, OP_AIREC: begin
        ctrl.sel_b_imm = 1'b1;
        ctrl.set_ca    = 1'b1;
        ctrl.wre1      = 1'b1;
        ctrl.set_cr    = (op == OP_AIREC);
      end
      OP_BC:   ctrl.branch = 1'b1;
      OP_XL: begin
        if (xo == 10'd16)      ctrl.bcr = 1'b1;
        else if (xo == 10'd17) ctrl.rti = 1'b1;
        else                   ctrl.valid = 1'b0;
      end
      OP_HALT: ctrl.halt = 1'b1;
      OP_X: begin
        unique case (xo)
          10'd0, 10'd32: begin                      // cmp, cmpl
            ctrl.compare      = 1'b1;
            ctrl.cmp_unsigned = (xo == 10'd32);
          end
          10'd28, 10'd444, 10'd476, 10'd412: begin   // and, or, nand, orc
            ctrl.sel_a  = A_RS;
            ctrl.wre2   = 1'b1;
            ctrl.use_rc = 1'b1;
            ctrl.alu_op = (xo == 10'd28)  ? ALU_AND :
                          (xo == 10'd444) ? ALU_OR  :
                          (xo == 10'd476) ? ALU_NAND : ALU_ORC;
          end
          10'd24, 10'd536, 10'd792: begin            // slw, srw, sraw
            ctrl.sel_a       = A_RS;
            ctrl.shift       = 1'b1;
            ctrl.shift_right = (xo != 10'd24);
            ctrl.shift_arith = (xo == 10'd792);
            ctrl.set_ca      = (xo == 10'd792);
            ctrl.wre2        = 1'b1;
            ctrl.use_rc      = 1'b1;
          end
          10'd23, 10'd55, 10'd119: begin             // lwzx, lwzux, lbzux
            ctrl.load     = 1'b1;
            ctrl.wre1     = 1'b1;
            ctrl.wb_sel   = WB_MEM;
            ctrl.update   = (xo != 10'd23);
            ctrl.byte_acc = (xo == 10'd119);
          end
          10'd151, 10'd183, 10'd247: begin           // stwx, stwux, stbux
            ctrl.store    = 1'b1;
            ctrl.update   = (xo != 10'd151);
            ctrl.byte_acc = (xo == 10'd247);
          end
          10'd339: begin                             // mfspr
            ctrl.mfspr  = 1'b1;
            ctrl.wre1   = 1'b1;
            ctrl.wb_sel = WB_SPR;
          end
          10'd467: ctrl.mtspr = 1'b1;                // mtspr
          default: begin
            // XO-form arithmetic: bit 21 is OE, the opcode is bits 22..30
            unique case (xo[8:0])
              9'd8, 9'd10, 9'd138: begin             // subfc, addc, adde
                ctrl.wre1   = 1'b1;
                ctrl.set_ca = 1'b1;
                ctrl.use_oe = 1'b1;
                ctrl.use_rc = 1'b1;
                ctrl.sub    = (xo[8:0] == 9'd8);
                ctrl.cin    = (xo[8:0] == 9'd8);
                ctrl.use_ca = (xo[8:0] == 9'd138);
              end
              default: ctrl.valid = 1'b0;
            endcase
          end
        endcase
      end
      default: ctrl.valid = 1'b0;
    endcase
    if (ctrl.update) ctrl.wre2 = !ra_zero && !(ctrl.load && ra_is_rt);
    if (!ctrl.valid) ctrl = '{valid: 1'b0, sel_a: A_RA, alu_op: ALU_ADD,
                              wb_sel: WB_ALU, default: 1'b0};
  end

endmodule
