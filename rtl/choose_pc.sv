// choose_pc: selects the next program counter.
//
// Priority, as in the document: a later pipeline stage wins over an earlier
// one, and sources raised in the same stage never occur together.
//   1. trap / interrupt handler address (int_s, from MEM)
//   2. resolved-branch address after a misprediction (res_s, from EX)
//   3. LR (bcr_s), SRR0 (rti_s) or the predicted target (pred_s), all from IF
//   4. PC + 4
// The document drives a shared bus with tri-state buffers; here it is a
// priority multiplexer. Combinational.
module choose_pc (
  input  logic        int_s,
  input  logic        bcr_s,
  input  logic        rti_s,
  input  logic        res_s,
  input  logic        pred_s,
  input  logic [31:0] int_a,
  input  logic [31:0] lr_a,
  input  logic [31:0] srr0_a,
  input  logic [31:0] res_a,
  input  logic [31:0] pred_a,
  input  logic [31:0] pc4_a,
  output logic [31:0] pc_out
);

  always_comb begin
    if (int_s)       pc_out = int_a;
    else if (res_s)  pc_out = res_a;
    else if (bcr_s)  pc_out = lr_a;
    else if (rti_s)  pc_out = srr0_a;
    else if (pred_s) pc_out = pred_a;
    else             pc_out = pc4_a;
  end

endmodule
