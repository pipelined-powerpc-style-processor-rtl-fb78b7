// hazard_detect: data-hazard detection in the ID stage.
//
// Compares the source registers of the instruction in ID (RA or RS for the
// first operand, RB for the second, RS for store data and mtspr) with the two
// destinations (port 1 = RT, port 2 = RA) of the instructions now in EX and
// in MEM. The resulting flags are registered into ID/EX and steer the
// operand multiplexers in EX (forward_select) one cycle later, when those
// instructions have moved on to MEM and WB.
//
// A load in EX cannot forward its data in time for the next instruction's
// EX stage: if the ID instruction's first or second operand (or the RS of an
// mtspr) needs that load's RT, load_stall holds IF/ID and sends a bubble into
// EX for one cycle. Store data needing a load result is not stalled: it is
// taken from WB in the MEM stage, as in the document.
//
// Combinational; all inputs are the current pipeline-register contents.
module hazard_detect
  import ppc_pkg::*;
(
  input  logic [31:0] id_ir,
  input  ctrl_t       id_ctrl,
  // instruction in EX
  input  logic [4:0]  ex_wr1,
  input  logic        ex_wre1,
  input  logic [4:0]  ex_wr2,
  input  logic        ex_wre2,
  input  logic        ex_load,
  // instruction in MEM
  input  logic [4:0]  mem_wr1,
  input  logic        mem_wre1,
  input  logic [4:0]  mem_wr2,
  input  logic        mem_wre2,
  output fwd_t        fwd_a,
  output fwd_t        fwd_b,
  output fwd_t        fwd_s,
  output logic        load_stall
);

  logic [4:0] src_a, src_b, src_s;
  logic       a_used, b_used, s_used;

  assign src_a = (id_ctrl.sel_a == A_RS) ? f_rt(id_ir) : f_ra(id_ir);
  assign src_b = f_rb(id_ir);
  assign src_s = f_rt(id_ir);

  assign a_used = (id_ctrl.sel_a == A_RS) || id_ctrl.compare ||
                  ((id_ctrl.load || id_ctrl.store) && f_ra(id_ir) != 5'd0) ||
                  (id_ctrl.wre1 && !id_ctrl.load && !id_ctrl.mfspr);
  assign b_used = !id_ctrl.sel_b_imm &&
                  (id_ctrl.load || id_ctrl.store || id_ctrl.compare ||
                   id_ctrl.sel_a == A_RS || (id_ctrl.wre1 && !id_ctrl.mfspr));
  assign s_used = id_ctrl.store || id_ctrl.mtspr;

  function automatic fwd_t match(input logic [4:0] src, input logic used);
    match.ex1  = used && ex_wre1  && (ex_wr1  == src);
    match.ex2  = used && ex_wre2  && (ex_wr2  == src);
    match.mem1 = used && mem_wre1 && (mem_wr1 == src);
    match.mem2 = used && mem_wre2 && (mem_wr2 == src);
  endfunction

  assign fwd_a = match(src_a, a_used);
  assign fwd_b = match(src_b, b_used);
  assign fwd_s = match(src_s, s_used);

  assign load_stall = ex_load &&
                      (fwd_a.ex1 || fwd_b.ex1 || (id_ctrl.mtspr && fwd_s.ex1));

endmodule
